// plbci: processor-bus custom interface of the CBIR coprocessor.
//
// Two jobs, as in the SMILE design: it maps the coprocessor's registers into the
// processor's address space, and it contains a DMA controller that copies the
// signature database from main memory into an internal FIFO feeding the
// distance unit.
//
// Processor side: a simplified single-word register bus. A request (bus_req)
// with bus_we=1 writes bus_wdata at word address bus_addr; with bus_we=0 it
// reads. bus_ack rises one cycle after the request and bus_rdata is valid with
// it. The real bus is IBM CoreConnect PLB; its protocol is not part of this
// design, so a bus bridge would sit in front of this port.
//
// Register map (word addresses):
//   0x00 CTRL      W: bit0 start a search (1 = start), bit1 irq enable
//                  R: bit1 irq enable
//   0x01 STATUS    R: bit0 busy, bit1 done; W: writing bit1 = 1 clears done
//   0x02 DMA_ADDR  byte address of the first signature (8-byte aligned)
//   0x03 DMA_COUNT number of signatures to compare
//   0x04 PROCESSED R: signatures whose distance has been computed
//   0x40+w         query signature word w (w = 0..41), read/write
//   0x80+4i+0      result i image identifier
//   0x80+4i+1..3   result i distance bits [31:0], [63:32], and in the third
//                  word bits [5:0] = distance [69:64], bit 31 = entry valid
// Result i = 0 is the best (smallest) distance.
//
// Memory side: burst read requests (mem_req/mem_addr/mem_len, accepted by
// mem_gnt) and a read data stream (mem_rvalid/mem_rdata) that cannot be
// stalled. A burst is only requested when the FIFO has room for it and for all
// data still in flight, so the FIFO never overflows. Bursts are BURST beats
// except the last.
//
// Start clears the sorter and the distance unit (clear, one cycle), then the
// DMA streams DMA_COUNT * 21 beats. done rises one cycle after the last
// distance has entered the sorter; irq follows done when enabled.
// Register layout, FIFO depth and burst length are this design's choices.
module plbci
  import smile_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned BURST      = 16,
  parameter int unsigned K          = TOPK,
  parameter int unsigned DW         = DIST_W,
  parameter int unsigned IDW        = ID_W,
  localparam int unsigned LENW      = $clog2(BURST + 1),
  localparam int unsigned FAW       = $clog2(FIFO_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // register bus
  input  logic              bus_req,
  input  logic              bus_we,
  input  logic [7:0]        bus_addr,
  input  logic [31:0]       bus_wdata,
  output logic              bus_ack,
  output logic [31:0]       bus_rdata,
  output logic              irq,
  // DMA memory master
  output logic              mem_req,
  output logic [31:0]       mem_addr,
  output logic [LENW-1:0]   mem_len,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [BEAT_W-1:0] mem_rdata,
  // coprocessor datapath
  output logic              clear,
  output logic              beat_valid,
  output logic [BEAT_W-1:0] beat_data,
  output logic              sig_wr_en,
  output logic [5:0]        sig_wr_idx,
  output logic [WORD_W-1:0] sig_wr_data,
  output logic [5:0]        sig_rd_idx,
  input  logic [WORD_W-1:0] sig_rd_data,
  input  logic              dist_valid,
  input  logic              res_valid [K],
  input  logic [DW-1:0]     res_dist  [K],
  input  logic [IDW-1:0]    res_id    [K]
);

  localparam int unsigned TBW = IDW + $clog2(SIG_BEATS) + 1;  // total beats

  // ---------------- registers ----------------
  logic            irq_en, busy, done;
  logic [31:0]     dma_addr, dma_count;
  logic [IDW:0]    processed;
  logic [TBW-1:0]  total_beats, beats_req, beats_rcv;
  logic [31:0]     next_addr;

  // ---------------- input FIFO ----------------
  logic            fifo_full, fifo_empty;
  logic [FAW:0]    fifo_count;

  sync_fifo #(.WIDTH(BEAT_W), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .wr_en  (mem_rvalid),
    .wr_data(mem_rdata),
    .full   (fifo_full),
    .rd_en  (!fifo_empty),
    .rd_data(beat_data),
    .empty  (fifo_empty),
    .count  (fifo_count)
  );

  // The distance unit takes a beat every cycle, so the FIFO drains freely.
  assign beat_valid = !fifo_empty;

  // ---------------- DMA burst issue ----------------
  logic [TBW-1:0] remaining, in_flight;
  logic [TBW:0]   room;

  always_comb begin
    remaining = total_beats - beats_req;
    in_flight = beats_req - beats_rcv;
    room      = (TBW+1)'(FIFO_DEPTH) - (TBW+1)'(fifo_count) - (TBW+1)'(in_flight);
    mem_len   = (remaining > TBW'(BURST)) ? LENW'(BURST) : LENW'(remaining);
    mem_addr  = next_addr;
    mem_req   = busy && (remaining != '0) && (room >= (TBW+1)'(mem_len));
  end

  // ---------------- control ----------------
  logic wr, rd;
  assign wr = bus_req && bus_we;
  assign rd = bus_req && !bus_we;

  assign sig_wr_en   = wr && (bus_addr >= 8'h40) && (bus_addr < 8'h40 + 8'(SIG_WORDS));
  assign sig_wr_idx  = 6'(bus_addr - 8'h40);
  assign sig_wr_data = bus_wdata;
  assign sig_rd_idx  = 6'(bus_addr - 8'h40);

  logic start;
  assign start = wr && (bus_addr == 8'h00) && bus_wdata[0] && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_en      <= 1'b0;
      busy        <= 1'b0;
      done        <= 1'b0;
      dma_addr    <= '0;
      dma_count   <= '0;
      processed   <= '0;
      total_beats <= '0;
      beats_req   <= '0;
      beats_rcv   <= '0;
      next_addr   <= '0;
      clear       <= 1'b0;
    end else begin
      clear <= start;
      if (wr && bus_addr == 8'h00) irq_en <= bus_wdata[1];
      if (wr && bus_addr == 8'h01 && bus_wdata[1]) done <= 1'b0;
      if (wr && bus_addr == 8'h02 && !busy) dma_addr  <= bus_wdata;
      if (wr && bus_addr == 8'h03 && !busy) dma_count <= bus_wdata;

      if (start) begin
        busy        <= 1'b1;
        done        <= 1'b0;
        processed   <= '0;
        total_beats <= TBW'(dma_count[IDW:0] * SIG_BEATS);
        beats_req   <= '0;
        beats_rcv   <= '0;
        next_addr   <= dma_addr;
      end else if (busy) begin
        if (mem_req && mem_gnt) begin
          beats_req <= beats_req + TBW'(mem_len);
          next_addr <= next_addr + 32'({mem_len, 3'b000});
        end
        if (mem_rvalid) beats_rcv <= beats_rcv + 1'b1;
        if (dist_valid) processed <= processed + 1'b1;
        // finished when every signature has produced a distance; the
        // sorter has taken the last one at the same edge
        if (!clear && (processed + (IDW+1)'(dist_valid) == dma_count[IDW:0])) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign irq = done && irq_en;

  // ---------------- register read ----------------
  logic [31:0] rdata_c;
  always_comb begin
    int unsigned ri;
    logic [7:0]  ro;
    rdata_c = '0;
    ro = bus_addr - 8'h80;
    ri = 32'(ro[7:2]);
    case (bus_addr)
      8'h00: rdata_c = {30'b0, irq_en, 1'b0};
      8'h01: rdata_c = {30'b0, done, busy};
      8'h02: rdata_c = dma_addr;
      8'h03: rdata_c = dma_count;
      8'h04: rdata_c = 32'(processed);
      default: begin
        if (bus_addr >= 8'h40 && bus_addr < 8'h40 + 8'(SIG_WORDS)) begin
          rdata_c = sig_rd_data;
        end else if (bus_addr >= 8'h80 && ri < K) begin
          case (ro[1:0])
            2'd0: rdata_c = 32'(res_id[ri]);
            2'd1: rdata_c = res_dist[ri][31:0];
            2'd2: rdata_c = res_dist[ri][63:32];
            default: rdata_c = {res_valid[ri], 31'(res_dist[ri] >> 64)};
          endcase
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_ack   <= 1'b0;
      bus_rdata <= '0;
    end else begin
      bus_ack   <= bus_req;
      bus_rdata <= rd ? rdata_c : '0;
    end
  end

  a_no_fifo_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(mem_rvalid && fifo_full));

endmodule
