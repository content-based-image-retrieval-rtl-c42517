// tb_sce_cluster32: a full 32-node network of SCEs at default parameters.
// Eight SBEs of four nodes; inside an SBE the nodes are chained (link 0 to the
// previous node, link 1 to the next), and SBE k is joined to SBE k+1 by a link
// between its last node (4k+3) and the next SBE's first node (4k+4) on link 2.
// Every node sends one packet to every other node (992 packets, random
// lengths, all injected concurrently, random stalls at the receivers); each
// must arrive once, intact, in order per sender. The number of SCEs a packet
// passes through is counted from the forwarding events and must equal the
// distance along this chain of SBEs. Headers carry the sender in bits [15:8],
// which the SCE ignores.
module tb_sce_cluster32;
  import smile_pkg::*;
  localparam int NN = 32;
  logic clk = 0, rst_n = 0;
  sce_cfg_t cfg [NN];
  logic  htx_valid [NN], htx_ready [NN], hrx_valid [NN], hrx_ready [NN];
  beat_t htx_beat [NN], hrx_beat [NN];
  logic  ltx_valid [NN][NLINKS], ltx_ready [NN][NLINKS];
  logic  lrx_valid [NN][NLINKS], lrx_ready [NN][NLINKS];
  beat_t ltx_beat [NN][NLINKS], lrx_beat [NN][NLINKS];
  int checks = 0, failures = 0, received = 0, max_hops = 0;
  int fwd_count [NN][NN];            // forwarding events per (source, destination)
  int next_seq [NN][NN];             // next expected packet per (destination, source)
  int plen [NN][NN];
  int dorder [NN][NN-1];             // each sender's destinations, shuffled

  always #5 clk = ~clk;

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
    localparam int PEER = ((n % 4) == 3 && n < NN - 1) ? n + 1 : ((n % 4) == 0 && n > 0) ? n - 1 : -1;
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

    // sender: one packet to every other node, in random order of destinations
    int pi = 0, pos = 0;
    always @(posedge clk)
      if (rst_n && htx_valid[n] && htx_ready[n]) begin
        if (pos == plen[n][dorder[n][pi]]) begin pi <= pi + 1; pos <= 0; end else pos <= pos + 1;
      end
    always @(negedge clk) begin
      htx_valid[n] = rst_n && pi < NN - 1 && ($urandom_range(0, 3) != 0);
      if (pi < NN - 1) begin
        htx_beat[n].sof  = (pos == 0);
        htx_beat[n].eof  = (pos == plen[n][dorder[n][pi]]);
        htx_beat[n].data = (pos == 0) ? {16'b0, 8'(n), 8'(dorder[n][pi])} : {8'(n), 8'(dorder[n][pi]), 16'(pos)};
      end
    end

    // receiver
    int cur_src = -1, cur_pos = 0;
    always @(negedge clk) hrx_ready[n] = ($urandom_range(0, 4) != 0);
    always @(posedge clk) if (rst_n && hrx_valid[n] && hrx_ready[n]) begin
      if (hrx_beat[n].sof) begin
        check(cur_src < 0 && hrx_beat[n].data[NODE_W-1:0] == 5'(n), "header for this node");
        cur_src = -2; cur_pos = 1;
      end else begin
        int s;
        s = int'(hrx_beat[n].data[31:24]);
        if (cur_src == -2) cur_src = s;
        check(s == cur_src && int'(hrx_beat[n].data[23:16]) == n && int'(hrx_beat[n].data[15:0]) == cur_pos,
              "payload word");
        cur_pos++;
      end
      if (hrx_beat[n].eof) begin
        if (cur_src >= 0) begin
          int expect_hops, a, b, sa, sb;
          check(cur_pos - 1 == plen[cur_src][n], "packet length");
          next_seq[n][cur_src]++;
          check(next_seq[n][cur_src] == 1, "one packet per sender");
          // distance along the chain of SBEs: the node addresses are a line
          expect_hops = (cur_src > n) ? cur_src - n : n - cur_src;
          check(fwd_count[cur_src][n] == expect_hops - 1,
                $sformatf("%0d -> %0d forwarded %0d times, expected %0d", cur_src, n, fwd_count[cur_src][n], expect_hops - 1));
          if (expect_hops > max_hops) max_hops = expect_hops;
        end
        received++;
        cur_src = -1;
      end
    end

    // forwarding events: a header leaving a routing buffer; the header
    // carries the source in bits [15:8], which the SCE does not look at
    always @(posedge clk) if (rst_n)
      for (int l = 0; l < NLINKS; l++)
        if (u_sce.fwf_rd[l] && u_sce.fwf_q[l].sof)
          fwd_count[int'(u_sce.fwf_q[l].data[15:8])][int'(u_sce.fwf_q[l].data[NODE_W-1:0])]++;
  end

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NN; n++) begin
      int k;
      cfg[n].node_addr   = 5'(n);
      cfg[n].port_prev   = 2'd0;
      cfg[n].port_next   = 2'd1;
      cfg[n].port_sbe_up = (n % 4 == 3) ? 2'd2 : 2'd1;
      cfg[n].port_sbe_dn = (n % 4 == 0) ? 2'd2 : 2'd0;
      k = 0;
      for (int d = 0; d < NN; d++) begin
        next_seq[n][d] = 0;
        fwd_count[n][d] = 0;
        plen[n][d] = $urandom_range(1, 40);
        if (d != n) begin dorder[n][k] = d; k++; end
      end
      for (int i = NN - 2; i > 0; i--) begin
        int j, t;
        j = $urandom_range(0, i);
        t = dorder[n][i]; dorder[n][i] = dorder[n][j]; dorder[n][j] = t;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (received < NN * (NN - 1)) @(posedge clk);
    repeat (20) @(posedge clk);
    check(received == NN * (NN - 1), "all packets received once");
    check(max_hops == NN - 1, "longest path crosses all SBEs");
    $display("%0d packets delivered, longest path %0d links", received, max_hops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
