// smile_node: FPGA logic of one SMILE cluster node.
//
// A SMILE cluster is a set of low-cost FPGA boards, each running Linux on an
// embedded processor, that cooperate through MPI. The FPGA logic of a node
// holds two independent parts, both attached to the node's processor:
//   - the CBIR coprocessor (cbir_coprocessor): the processor loads a query
//     signature, the coprocessor's DMA streams the node's share of the image
//     signature database from memory, and the coprocessor returns the 15
//     closest images of that share;
//   - the SMILE Communication Element (sce): a three-link packet switch used by
//     the message-passing library, through which nodes exchange data and
//     forward packets for each other, e.g. the per-node top-15 lists that are
//     merged node by node into the cluster result.
// The processor, its memory controller and the three serial-link cores are
// not part of this module: their connections are ports. Processor bus,
// memory DMA port and link streams are described in plbci and sce.
module smile_node
  import smile_pkg::*;
#(
  parameter int unsigned COP_FIFO_DEPTH = 64,
  parameter int unsigned COP_BURST      = 16,
  parameter int unsigned SCE_DEPTH      = 512,
  localparam int unsigned LENW          = $clog2(COP_BURST + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // coprocessor register bus and interrupt
  input  logic              cop_req,
  input  logic              cop_we,
  input  logic [7:0]        cop_addr,
  input  logic [31:0]       cop_wdata,
  output logic              cop_ack,
  output logic [31:0]       cop_rdata,
  output logic              cop_irq,
  // coprocessor DMA port to main memory
  output logic              mem_req,
  output logic [31:0]       mem_addr,
  output logic [LENW-1:0]   mem_len,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [BEAT_W-1:0] mem_rdata,
  // SCE routing set-up and processor packet streams
  input  sce_cfg_t          sce_cfg,
  input  logic              host_tx_valid,
  input  beat_t             host_tx_beat,
  output logic              host_tx_ready,
  output logic              host_rx_valid,
  output beat_t             host_rx_beat,
  input  logic              host_rx_ready,
  // serial links
  output logic              link_tx_valid [NLINKS],
  output beat_t             link_tx_beat  [NLINKS],
  input  logic              link_tx_ready [NLINKS],
  input  logic              link_rx_valid [NLINKS],
  input  beat_t             link_rx_beat  [NLINKS],
  output logic              link_rx_ready [NLINKS]
);

  cbir_coprocessor #(.FIFO_DEPTH(COP_FIFO_DEPTH), .BURST(COP_BURST)) u_cop (
    .clk, .rst_n,
    .bus_req(cop_req), .bus_we(cop_we), .bus_addr(cop_addr), .bus_wdata(cop_wdata),
    .bus_ack(cop_ack), .bus_rdata(cop_rdata), .irq(cop_irq),
    .mem_req, .mem_addr, .mem_len, .mem_gnt, .mem_rvalid, .mem_rdata
  );

  sce #(.DEPTH(SCE_DEPTH)) u_sce (
    .clk, .rst_n, .cfg(sce_cfg),
    .host_tx_valid, .host_tx_beat, .host_tx_ready,
    .host_rx_valid, .host_rx_beat, .host_rx_ready,
    .link_tx_valid, .link_tx_beat, .link_tx_ready,
    .link_rx_valid, .link_rx_beat, .link_rx_ready
  );

endmodule
