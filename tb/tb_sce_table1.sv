// tb_sce_table1: the communication test on SCEs at their default parameters.
// Eight SCEs form the ring of two SBEs used in the cluster testbenches (0-1-2-3
// and 4-5-6-7, joined by a link between nodes 0 and 7), with ideal links.
// Node 0 sends packets of 256, 512, 1024 and 2048 bytes (64..512 data words
// plus a header) to nodes 1, 2, 3 and 4, which are 1, 2, 3 and 4 link hops
// away. Each packet must arrive intact; the time from its first word leaving
// node 0's processor port to its last word reaching the destination's
// processor port is printed in cycles. Checks: time grows with packet size,
// and each extra hop adds only a few cycles (cut-through forwarding).
module tb_sce_table1;
  import smile_pkg::*;
  localparam int NN = 8;
  logic clk = 0, rst_n = 0;
  sce_cfg_t cfg [NN];
  logic  htx_valid [NN], htx_ready [NN], hrx_valid [NN], hrx_ready [NN];
  beat_t htx_beat [NN], hrx_beat [NN];
  logic  ltx_valid [NN][NLINKS], ltx_ready [NN][NLINKS];
  logic  lrx_valid [NN][NLINKS], lrx_ready [NN][NLINKS];
  beat_t ltx_beat [NN][NLINKS], lrx_beat [NN][NLINKS];
  int checks = 0, failures = 0;
  longint cyc = 0, t_last [NN];
  beat_t rxw [NN][$];
  longint lat [4][4];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  for (genvar n = 0; n < NN; n++) begin : g_node
    sce u_sce (
      .clk, .rst_n, .cfg(cfg[n]),
      .host_tx_valid(htx_valid[n]), .host_tx_beat(htx_beat[n]), .host_tx_ready(htx_ready[n]),
      .host_rx_valid(hrx_valid[n]), .host_rx_beat(hrx_beat[n]), .host_rx_ready(hrx_ready[n]),
      .link_tx_valid(ltx_valid[n]), .link_tx_beat(ltx_beat[n]), .link_tx_ready(ltx_ready[n]),
      .link_rx_valid(lrx_valid[n]), .link_rx_beat(lrx_beat[n]), .link_rx_ready(lrx_ready[n]));
    localparam int PREV = ((n % 4) == 0) ? -1 : n - 1;
    localparam int NEXT = ((n % 4) == 3) ? -1 : n + 1;
    localparam int PEER = (n == 0) ? 7 : (n == 7) ? 0 : -1;
    localparam int PEERS [3] = '{PREV, NEXT, PEER};
    localparam int BACK [3] = '{1, 0, 2};
    for (genvar l = 0; l < NLINKS; l++) begin : g_l
      if (PEERS[l] < 0) begin : g_open
        assign lrx_valid[n][l] = 1'b0;
        assign lrx_beat[n][l]  = '0;
        assign ltx_ready[n][l] = 1'b1;
      end else begin : g_link
        assign lrx_valid[PEERS[l]][BACK[l]] = ltx_valid[n][l];
        assign lrx_beat[PEERS[l]][BACK[l]]  = ltx_beat[n][l];
        assign ltx_ready[n][l] = lrx_ready[PEERS[l]][BACK[l]];
      end
    end
    assign hrx_ready[n] = 1'b1;
    always @(posedge clk) if (rst_n && hrx_valid[n]) begin
      rxw[n].push_back(hrx_beat[n]);
      if (hrx_beat[n].eof) t_last[n] = cyc;
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NN; n++) begin
      htx_valid[n] = 0; htx_beat[n] = '0;
      cfg[n].node_addr   = 5'(n);
      cfg[n].port_prev   = 2'd0;
      cfg[n].port_next   = 2'd1;
      cfg[n].port_sbe_up = (n == 0) ? 2'd2 : 2'd0;
      cfg[n].port_sbe_dn = (n == 7) ? 2'd2 : 2'd1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int si = 0; si < 4; si++)
      for (int d = 1; d <= 4; d++) begin
        int words;
        longint t0;
        words = (256 << si) / 4;
        t0 = -1;
        for (int i = 0; i <= words; i++) begin
          @(negedge clk);
          htx_valid[0] = 1;
          htx_beat[0].sof = (i == 0);
          htx_beat[0].eof = (i == words);
          htx_beat[0].data = (i == 0) ? 32'(d) : 32'(si * 100000 + d * 10000 + i);
          @(posedge clk);
          while (!htx_ready[0]) @(posedge clk);
          if (i == 0) t0 = cyc;
        end
        @(negedge clk); htx_valid[0] = 0;
        while (rxw[d].size() < words + 1) @(posedge clk);
        check(rxw[d][0].sof && rxw[d][0].data == 32'(d), "header");
        for (int i = 1; i <= words; i++)
          check(rxw[d][i].data == 32'(si * 100000 + d * 10000 + i) && (rxw[d][i].eof == (i == words)),
                "payload word");
        rxw[d].delete();
        lat[si][d-1] = t_last[d] - t0;
        repeat (5) @(posedge clk);
      end
    $display("packet bytes:   d=1   d=2   d=3   d=4   (cycles)");
    for (int si = 0; si < 4; si++)
      $display("%6d        %5d %5d %5d %5d", 256 << si, lat[si][0], lat[si][1], lat[si][2], lat[si][3]);
    for (int si = 0; si < 4; si++)
      for (int d = 0; d < 4; d++) begin
        if (si > 0) check(lat[si][d] > lat[si-1][d], "time grows with packet size");
        if (d > 0) check(lat[si][d] > lat[si][d-1] && lat[si][d] - lat[si][d-1] <= 4,
                         "one hop adds at most a few cycles");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
