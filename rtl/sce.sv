// sce: SMILE Communication Element, the packet switch of a SMILE node.
//
// The node has three serial links (one per connector, each driven by a
// serial-link core outside this module). For every link the SCE has three
// FIFOs, nine in all:
//   txf[j]  send FIFO: packets from this node's processor to go out on link j
//   rxf[i]  receive FIFO: packets that arrived on link i addressed to this node
//   fwf[i]  routing buffer: packets that arrived on link i for another node,
//           held while the outgoing link is busy
// The routing logic (sce_router) inspects each packet's header word, whose low
// 5 bits are the destination node address:
//   - on the processor's send stream it picks the send FIFO of the right link
//     (a packet addressed to the node itself is dropped);
//   - on a link's receive stream it picks the receive FIFO or the routing
//     buffer;
//   - at the head of each routing buffer it picks the outgoing link.
// Each link output has a packet-level round-robin arbiter between its send
// FIFO and the three routing buffers; a further arbiter merges the three
// receive FIFOs into one stream to the processor.
//
// Streams use valid/ready with beat_t words (sof on the header, eof on the last
// word). The link receive side has ready, i.e. the link core is assumed to use
// flow control; without it a full FIFO would lose data.
//
// FIFO depth defaults to 512 words of 32 bits: the largest packet measured in
// the SMILE network tests is 2048 bytes. The FIFO set, the three links and the routing
// rules follow the SMILE design; the stream format, FIFO depth and arbitration
// are this design's choices. cfg is the routing set-up the driver writes at
// start-up and must be stable while traffic flows.
module sce
  import smile_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic     clk,
  input  logic     rst_n,
  input  sce_cfg_t cfg,
  // processor side
  input  logic     host_tx_valid,
  input  beat_t    host_tx_beat,
  output logic     host_tx_ready,
  output logic     host_rx_valid,
  output beat_t    host_rx_beat,
  input  logic     host_rx_ready,
  // link side, to/from the serial-link cores
  output logic     link_tx_valid [NLINKS],
  output beat_t    link_tx_beat  [NLINKS],
  input  logic     link_tx_ready [NLINKS],
  input  logic     link_rx_valid [NLINKS],
  input  beat_t    link_rx_beat  [NLINKS],
  output logic     link_rx_ready [NLINKS]
);

  localparam int unsigned BW = $bits(beat_t);

  // ---------------- FIFO signals ----------------
  logic  txf_wr [NLINKS], txf_full [NLINKS], txf_rd [NLINKS], txf_empty [NLINKS];
  logic  rxf_wr [NLINKS], rxf_full [NLINKS], rxf_rd [NLINKS], rxf_empty [NLINKS];
  logic  fwf_wr [NLINKS], fwf_full [NLINKS], fwf_rd [NLINKS], fwf_empty [NLINKS];
  beat_t txf_q  [NLINKS], rxf_q [NLINKS], fwf_q [NLINKS];
  beat_t txf_d;

  // ---------------- processor send stream ----------------
  port_t host_route, host_port_q, host_port;

  sce_router u_route_host (.cfg, .dest(host_tx_beat.data[NODE_W-1:0]), .port(host_route));

  assign host_port = host_tx_beat.sof ? host_route : host_port_q;

  always_comb begin
    txf_d         = host_tx_beat;
    host_tx_ready = 1'b1;                       // a self-addressed packet is dropped
    for (int j = 0; j < NLINKS; j++) begin
      txf_wr[j] = 1'b0;
      if (host_port == port_t'(j)) begin
        host_tx_ready = !txf_full[j];
        txf_wr[j]     = host_tx_valid && !txf_full[j];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) host_port_q <= PORT_LOCAL;
    else if (host_tx_valid && host_tx_ready && host_tx_beat.sof) host_port_q <= host_route;
  end

  // ---------------- per-link receive, FIFOs and routing buffers ----------------
  port_t fw_route [NLINKS];      // outgoing link of the routing buffer's head packet

  for (genvar i = 0; i < NLINKS; i++) begin : g_link
    logic  rx_local, rx_local_q, rx_is_local;
    port_t rx_route;
    port_t fw_head_route, fw_port_q;

    sce_router u_route_rx (.cfg, .dest(link_rx_beat[i].data[NODE_W-1:0]), .port(rx_route));
    assign rx_local    = (rx_route == PORT_LOCAL);
    assign rx_is_local = link_rx_beat[i].sof ? rx_local : rx_local_q;

    always_comb begin
      rxf_wr[i]        = link_rx_valid[i] &&  rx_is_local && !rxf_full[i];
      fwf_wr[i]        = link_rx_valid[i] && !rx_is_local && !fwf_full[i];
      link_rx_ready[i] = rx_is_local ? !rxf_full[i] : !fwf_full[i];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) rx_local_q <= 1'b0;
      else if (link_rx_valid[i] && link_rx_ready[i] && link_rx_beat[i].sof) rx_local_q <= rx_local;
    end

    sync_fifo #(.WIDTH(BW), .DEPTH(DEPTH)) u_txf (
      .clk, .rst_n, .wr_en(txf_wr[i]), .wr_data(txf_d), .full(txf_full[i]),
      .rd_en(txf_rd[i]), .rd_data(txf_q[i]), .empty(txf_empty[i]), .count());

    sync_fifo #(.WIDTH(BW), .DEPTH(DEPTH)) u_rxf (
      .clk, .rst_n, .wr_en(rxf_wr[i]), .wr_data(link_rx_beat[i]), .full(rxf_full[i]),
      .rd_en(rxf_rd[i]), .rd_data(rxf_q[i]), .empty(rxf_empty[i]), .count());

    sync_fifo #(.WIDTH(BW), .DEPTH(DEPTH)) u_fwf (
      .clk, .rst_n, .wr_en(fwf_wr[i]), .wr_data(link_rx_beat[i]), .full(fwf_full[i]),
      .rd_en(fwf_rd[i]), .rd_data(fwf_q[i]), .empty(fwf_empty[i]), .count());

    // outgoing link of the routing buffer's head, latched for the packet
    sce_router u_route_fw (.cfg, .dest(fwf_q[i].data[NODE_W-1:0]), .port(fw_head_route));
    assign fw_route[i] = fwf_q[i].sof ? fw_head_route : fw_port_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) fw_port_q <= '0;
      else if (fwf_rd[i] && fwf_q[i].sof) fw_port_q <= fw_head_route;
    end
  end

  // ---------------- link output arbiters ----------------
  logic arb_ready [NLINKS][1+NLINKS];

  for (genvar j = 0; j < NLINKS; j++) begin : g_out
    logic  a_valid [1+NLINKS];
    beat_t a_beat  [1+NLINKS];
    logic  a_ready [1+NLINKS];

    always_comb begin
      a_valid[0] = !txf_empty[j];
      a_beat[0]  = txf_q[j];
      for (int i = 0; i < NLINKS; i++) begin
        a_valid[1+i] = !fwf_empty[i] && (fw_route[i] == port_t'(j));
        a_beat[1+i]  = fwf_q[i];
      end
      for (int k = 0; k <= NLINKS; k++) arb_ready[j][k] = a_ready[k];
      txf_rd[j] = a_ready[0];
    end

    pkt_arbiter #(.N(1+NLINKS)) u_arb (
      .clk, .rst_n,
      .in_valid(a_valid), .in_beat(a_beat), .in_ready(a_ready),
      .out_valid(link_tx_valid[j]), .out_beat(link_tx_beat[j]), .out_ready(link_tx_ready[j]));
  end

  always_comb begin
    for (int i = 0; i < NLINKS; i++) begin
      fwf_rd[i] = 1'b0;
      for (int j = 0; j < NLINKS; j++) fwf_rd[i] = fwf_rd[i] | arb_ready[j][1+i];
    end
  end

  // ---------------- receive merge towards the processor ----------------
  logic rx_valid [NLINKS];
  always_comb
    for (int i = 0; i < NLINKS; i++) rx_valid[i] = !rxf_empty[i];

  pkt_arbiter #(.N(NLINKS)) u_rx_arb (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_beat(rxf_q), .in_ready(rxf_rd),
    .out_valid(host_rx_valid), .out_beat(host_rx_beat), .out_ready(host_rx_ready));

endmodule
