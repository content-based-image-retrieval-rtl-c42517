// cbir_coprocessor: content-based image retrieval coprocessor of a SMILE node.
//
// The processor loads a query signature (42 words) into the signature
// register, gives the address and number of database signatures, and starts a
// search. The bus interface's DMA controller then streams the database from
// memory, 64 bits (two words) per beat. The distance unit turns each
// 21-beat signature into a squared Euclidean distance, and the sorter keeps the
// 15 closest images in order. When the last signature has been sorted the
// interface sets done (and raises irq if enabled); the processor reads the 15
// results through the register map and merges them with other nodes' results
// in software.
//
//   memory --DMA--> plbci FIFO --> distance_calc --> topk_sorter
//                                      ^                  |
//                   signature_reg -----+                  v
//                   plbci register map  <------------- results
//
// Steady-state rate: one beat (two words) per cycle, i.e. one signature every
// 21 cycles when memory keeps up. Block split follows the SMILE design; the
// register map and bus handshake are described in plbci.
module cbir_coprocessor
  import smile_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned BURST      = 16,
  localparam int unsigned LENW      = $clog2(BURST + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bus_req,
  input  logic              bus_we,
  input  logic [7:0]        bus_addr,
  input  logic [31:0]       bus_wdata,
  output logic              bus_ack,
  output logic [31:0]       bus_rdata,
  output logic              irq,
  output logic              mem_req,
  output logic [31:0]       mem_addr,
  output logic [LENW-1:0]   mem_len,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [BEAT_W-1:0] mem_rdata
);

  logic              clear, beat_valid;
  logic [BEAT_W-1:0] beat_data;
  logic              sig_wr_en;
  logic [5:0]        sig_wr_idx, sig_rd_idx;
  logic [WORD_W-1:0] sig_wr_data, sig_rd_data, sig_w0, sig_w1;
  logic [$clog2(SIG_BEATS)-1:0] sig_beat_idx;
  logic              dist_valid;
  logic [DIST_W-1:0] dist_val;
  logic [ID_W-1:0]   dist_id;
  logic              res_valid [TOPK];
  logic [DIST_W-1:0] res_dist  [TOPK];
  logic [ID_W-1:0]   res_id    [TOPK];

  plbci #(.FIFO_DEPTH(FIFO_DEPTH), .BURST(BURST)) u_plbci (
    .clk, .rst_n,
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_ack, .bus_rdata, .irq,
    .mem_req, .mem_addr, .mem_len, .mem_gnt, .mem_rvalid, .mem_rdata,
    .clear, .beat_valid, .beat_data,
    .sig_wr_en, .sig_wr_idx, .sig_wr_data, .sig_rd_idx, .sig_rd_data,
    .dist_valid, .res_valid, .res_dist, .res_id
  );

  signature_reg u_sig (
    .clk, .rst_n,
    .wr_en   (sig_wr_en),
    .wr_idx  (sig_wr_idx),
    .wr_data (sig_wr_data),
    .rd_idx  (sig_rd_idx),
    .rd_data (sig_rd_data),
    .beat_idx(sig_beat_idx),
    .beat_word0(sig_w0),
    .beat_word1(sig_w1)
  );

  distance_calc u_dist (
    .clk, .rst_n, .clear,
    .in_valid    (beat_valid),
    .in_beat     (beat_data),
    .sig_beat_idx(sig_beat_idx),
    .sig_word0   (sig_w0),
    .sig_word1   (sig_w1),
    .out_valid   (dist_valid),
    .out_dist    (dist_val),
    .out_id      (dist_id)
  );

  topk_sorter u_sort (
    .clk, .rst_n, .clear,
    .in_valid  (dist_valid),
    .in_dist   (dist_val),
    .in_id     (dist_id),
    .slot_valid(res_valid),
    .slot_dist (res_dist),
    .slot_id   (res_id),
    .inserted  ()
  );

endmodule
