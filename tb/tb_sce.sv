// tb_sce: one SMILE Communication Element (node 5, second SBE) with random
// traffic on all four inputs (processor send stream and three links) and
// random stalls on all four outputs. Every packet must leave on the output the
// routing rules give (or be dropped when the processor addresses its own
// node), complete, uninterleaved and in order per input. Counts the routing
// cases (local delivery, previous/next neighbour, lower/higher SBE, dropped)
// and the routing buffers holding packets while their link is busy; each must
// happen.
module tb_sce;
  import smile_pkg::*;
  localparam int NPKT = 80;          // packets per input
  localparam int NSRC = 4;           // 0..2 links, 3 processor
  localparam int NSNK = 4;           // 0..2 links, 3 processor
  logic clk = 0, rst_n = 0;
  sce_cfg_t cfg;
  logic  src_valid [NSRC];
  beat_t src_beat  [NSRC];
  logic  src_ready [NSRC];
  logic  snk_valid [NSNK];
  beat_t snk_beat  [NSNK];
  logic  snk_ready [NSNK];
  logic  link_tx_valid [NLINKS], link_tx_ready [NLINKS];
  beat_t link_tx_beat [NLINKS];
  logic  link_rx_valid [NLINKS], link_rx_ready [NLINKS];
  beat_t link_rx_beat [NLINKS];
  int checks = 0, failures = 0;
  int plen [NSRC][NPKT];
  int pdst [NSRC][NPKT];
  int exp_q [NSNK][NSRC][$];         // expected packet numbers per sink and source
  int recv_total = 0, expected_total = 0;
  int n_case [6];                    // local, prev, next, sbe_dn, sbe_up, dropped
  int fw_held = 0;

  sce #(.DEPTH(64)) dut (
    .clk, .rst_n, .cfg,
    .host_tx_valid(src_valid[3]), .host_tx_beat(src_beat[3]), .host_tx_ready(src_ready[3]),
    .host_rx_valid(snk_valid[3]), .host_rx_beat(snk_beat[3]), .host_rx_ready(snk_ready[3]),
    .link_tx_valid, .link_tx_beat, .link_tx_ready,
    .link_rx_valid, .link_rx_beat, .link_rx_ready);

  for (genvar i = 0; i < NLINKS; i++) begin : g_wire
    assign link_rx_valid[i] = src_valid[i];
    assign link_rx_beat[i]  = src_beat[i];
    assign src_ready[i]     = link_rx_ready[i];
    assign snk_valid[i]     = link_tx_valid[i];
    assign snk_beat[i]      = link_tx_beat[i];
    assign link_tx_ready[i] = snk_ready[i];
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int route(input int d);
    if (d == int'(cfg.node_addr)) return int'(PORT_LOCAL);
    if (d / 4 == int'(cfg.node_addr) / 4) return (d < int'(cfg.node_addr)) ? int'(cfg.port_prev) : int'(cfg.port_next);
    if (d / 4 < int'(cfg.node_addr) / 4) return int'(cfg.port_sbe_dn);
    return int'(cfg.port_sbe_up);
  endfunction

  function automatic int route_case(input int d);
    if (d == int'(cfg.node_addr)) return 0;
    if (d / 4 == int'(cfg.node_addr) / 4) return (d < int'(cfg.node_addr)) ? 1 : 2;
    return (d / 4 < int'(cfg.node_addr) / 4) ? 3 : 4;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sources
  for (genvar s = 0; s < NSRC; s++) begin : g_src
    int pkt = 0, pos = 0;
    always @(posedge clk)
      if (rst_n && src_valid[s] && src_ready[s]) begin
        if (pos == plen[s][pkt] - 1) begin pkt <= pkt + 1; pos <= 0; end else pos <= pos + 1;
      end
    always @(negedge clk) begin
      src_valid[s] = rst_n && pkt < NPKT && ($urandom_range(0, 3) != 0);
      src_beat[s].sof = (pos == 0);
      src_beat[s].eof = (pkt < NPKT) && (pos == plen[s][pkt] - 1);
      src_beat[s].data = (pos == 0) ? {4'(s), 12'(pkt), 11'b0, 5'(pdst[s][pkt % NPKT])}
                                    : {4'(s), 12'(pkt), 16'(pos)};
    end
  end

  // sinks
  for (genvar k = 0; k < NSNK; k++) begin : g_snk
    int cur_src = -1, cur_pkt = 0, cur_pos = 0;
    always @(negedge clk) snk_ready[k] = ($urandom_range(0, 9) < ((k == 1) ? 3 : 8));
    always @(posedge clk) if (rst_n && snk_valid[k] && snk_ready[k]) begin
      int s, p, q;
      s = int'(snk_beat[k].data[31:28]); p = int'(snk_beat[k].data[27:16]);
      q = snk_beat[k].sof ? 0 : int'(snk_beat[k].data[15:0]);
      if (cur_src < 0) begin
        check(snk_beat[k].sof, "packet starts with header");
        check(s < NSRC && exp_q[k][s].size() > 0 && exp_q[k][s][0] == p,
              $sformatf("sink %0d got packet %0d of source %0d out of order or misrouted", k, p, s));
        if (s < NSRC && exp_q[k][s].size() > 0) void'(exp_q[k][s].pop_front());
        cur_src = s; cur_pkt = p;
      end else begin
        check(s == cur_src && p == cur_pkt && q == cur_pos, "no interleaving");
      end
      cur_pos = q + 1;
      if (snk_beat[k].eof) begin
        check(s < NSRC && q == plen[s][p] - 1, "packet length");
        recv_total++;
        cur_src = -1;
      end
    end
  end

  // routing buffers holding a packet for a busy link
  always @(posedge clk)
    for (int i = 0; i < NLINKS; i++)
      if (!dut.fwf_empty[i] && !dut.fwf_rd[i]) fw_held++;

  initial begin
    cfg.node_addr = 5'd5; cfg.port_prev = 2'd0; cfg.port_next = 2'd1;
    cfg.port_sbe_dn = 2'd0; cfg.port_sbe_up = 2'd2;
    for (int c = 0; c < 6; c++) n_case[c] = 0;
    for (int s = 0; s < NSRC; s++)
      for (int p = 0; p < NPKT; p++) begin
        int d, r;
        d = (p % 7 == 0) ? 5 : $urandom_range(0, 31);
        plen[s][p] = (p == 10) ? 60 : $urandom_range(1, 12);
        pdst[s][p] = d;
        r = route(d);
        if (s == 3 && r == int'(PORT_LOCAL)) n_case[5]++;     // dropped
        else begin
          n_case[route_case(d)]++;
          exp_q[r == int'(PORT_LOCAL) ? 3 : r][s].push_back(p);
          expected_total++;
        end
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (recv_total < expected_total) @(posedge clk);
    repeat (50) @(posedge clk);
    check(recv_total == expected_total, "no extra packets");
    for (int k = 0; k < NSNK; k++)
      for (int s = 0; s < NSRC; s++) check(exp_q[k][s].size() == 0, "all packets delivered");
    for (int c = 0; c < 6; c++) check(n_case[c] > 0, $sformatf("routing case %0d exercised", c));
    check(fw_held > 0, "routing buffer held data for a busy link");
    $display("cases local=%0d prev=%0d next=%0d sbe_dn=%0d sbe_up=%0d dropped=%0d held=%0d",
             n_case[0], n_case[1], n_case[2], n_case[3], n_case[4], n_case[5], fw_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
