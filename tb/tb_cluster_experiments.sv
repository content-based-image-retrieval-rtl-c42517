// tb_cluster_experiments: the two search experiments run on an eight-node
// cluster (same ring of two SBEs as tb_smile_node), at the design's default
// parameters, with 1, 2, 4 and 8 active nodes:
//   experiment 1: a constant number of signatures per node (NPER1), so the
//                 database grows with the number of nodes;
//   experiment 2: a constant database (NDB2) split evenly over the nodes.
// For every run the active nodes search their share, merge their top-15 lists
// node by node towards node 0 through the network, and node 0's list is
// compared with a reference. The search time (start to last interrupt) and the
// response time (start to merged result at node 0) are printed in cycles.
// The testbench reads the nodes' results one node after another, which adds
// to the response time. Checked trends: in experiment 1 the search time does not depend on the
// number of nodes; in experiment 2 it falls as nodes are added.
module tb_cluster_experiments;
  import smile_pkg::*;
  localparam int NN    = 8;
  localparam int NPER1 = 24;
  localparam int NDB2  = 96;
  localparam int MAXS  = 96;           // most signatures on one node
  logic clk = 0, rst_n = 0;

  logic        cop_req [NN], cop_we [NN], cop_ack [NN], cop_irq [NN];
  logic [7:0]  cop_addr [NN];
  logic [31:0] cop_wdata [NN], cop_rdata [NN];
  logic        mem_req [NN], mem_gnt [NN], mem_rvalid [NN];
  logic [31:0] mem_addr [NN];
  logic [4:0]  mem_len [NN];
  logic [63:0] mem_rdata [NN];
  sce_cfg_t    cfg [NN];
  logic        htx_valid [NN], htx_ready [NN], hrx_valid [NN], hrx_ready [NN];
  beat_t       htx_beat [NN], hrx_beat [NN];
  logic        ltx_valid [NN][NLINKS], ltx_ready [NN][NLINKS];
  logic        lrx_valid [NN][NLINKS], lrx_ready [NN][NLINKS];
  beat_t       ltx_beat [NN][NLINKS], lrx_beat [NN][NLINKS];
  logic [63:0] img [NN][MAXS*SIG_BEATS];   // per-node memory image

  int checks = 0, failures = 0;
  longint cyc = 0;
  beat_t rxw [NN][$];
  longint search_t [2][4], resp_t [2][4];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  for (genvar n = 0; n < NN; n++) begin : g_node
    smile_node u_node (
      .clk, .rst_n,
      .cop_req(cop_req[n]), .cop_we(cop_we[n]), .cop_addr(cop_addr[n]), .cop_wdata(cop_wdata[n]),
      .cop_ack(cop_ack[n]), .cop_rdata(cop_rdata[n]), .cop_irq(cop_irq[n]),
      .mem_req(mem_req[n]), .mem_addr(mem_addr[n]), .mem_len(mem_len[n]), .mem_gnt(mem_gnt[n]),
      .mem_rvalid(mem_rvalid[n]), .mem_rdata(mem_rdata[n]),
      .sce_cfg(cfg[n]),
      .host_tx_valid(htx_valid[n]), .host_tx_beat(htx_beat[n]), .host_tx_ready(htx_ready[n]),
      .host_rx_valid(hrx_valid[n]), .host_rx_beat(hrx_beat[n]), .host_rx_ready(hrx_ready[n]),
      .link_tx_valid(ltx_valid[n]), .link_tx_beat(ltx_beat[n]), .link_tx_ready(ltx_ready[n]),
      .link_rx_valid(lrx_valid[n]), .link_rx_beat(lrx_beat[n]), .link_rx_ready(lrx_ready[n]));

    // memory: fixed latency, no gaps, contents from img[n]
    mem_model #(.WORDS(MAXS*SIG_BEATS), .LAT(8), .LENW(5)) u_mem (
      .clk, .rst_n, .gaps(1'b0), .req(mem_req[n]), .addr(mem_addr[n]), .len(mem_len[n]),
      .gnt(mem_gnt[n]), .rvalid(mem_rvalid[n]), .rdata(mem_rdata[n]));
    always @(negedge clk) if (!rst_n) u_mem.mem = img[n];

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
        link_model u_link (
          .clk,
          .in_valid(ltx_valid[n][l]), .in_beat(ltx_beat[n][l]), .in_ready(ltx_ready[n][l]),
          .out_valid(lrx_valid[PEERS[l]][BACK[l]]), .out_beat(lrx_beat[PEERS[l]][BACK[l]]),
          .out_ready(lrx_ready[PEERS[l]][BACK[l]]));
      end
    end
    assign hrx_ready[n] = 1'b1;
    always @(posedge clk) if (rst_n && hrx_valid[n]) rxw[n].push_back(hrx_beat[n]);
  end

  task automatic bus_write(input int n, input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); cop_req[n] = 1; cop_we[n] = 1; cop_addr[n] = a; cop_wdata[n] = d;
    @(negedge clk); cop_req[n] = 0; cop_we[n] = 0;
  endtask

  task automatic bus_read(input int n, input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); cop_req[n] = 1; cop_we[n] = 0; cop_addr[n] = a;
    @(negedge clk); cop_req[n] = 0; d = cop_rdata[n];
  endtask

  task automatic send(input int n, input int dest, input logic [31:0] words [$]);
    for (int i = 0; i <= words.size(); i++) begin
      @(negedge clk);
      htx_valid[n] = 1;
      htx_beat[n].sof = (i == 0);
      htx_beat[n].eof = (i == words.size());
      htx_beat[n].data = (i == 0) ? 32'(dest) : words[i-1];
      @(posedge clk);
      while (!htx_ready[n]) @(posedge clk);
    end
    @(negedge clk); htx_valid[n] = 0;
  endtask

  task automatic receive(input int n, output logic [31:0] words [$]);
    beat_t b;
    words.delete();
    while (rxw[n].size() == 0) @(posedge clk);
    b = rxw[n].pop_front();
    while (!b.eof) begin
      while (rxw[n].size() == 0) @(posedge clk);
      b = rxw[n].pop_front();
      words.push_back(b.data);
    end
  endtask

  typedef struct { logic [DIST_W-1:0] d; int id; logic v; } res_t;

  // One search over `k` nodes with `per` signatures each.
  task automatic run(input int e, input int ki, input int k, input int per);
    logic [31:0] q [SIG_WORDS];
    logic [DIST_W-1:0] gd [NN*MAXS];
    int order [NN*MAXS];
    res_t mine [NN][TOPK];
    res_t merged [TOPK];
    longint t0, t1;
    int total;
    total = k * per;
    for (int i = 0; i < SIG_WORDS; i++) q[i] = $urandom_range(0, 1 << 16);
    for (int g = 0; g < total; g++) begin
      logic [31:0] s [SIG_WORDS];
      gd[g] = 0;
      for (int i = 0; i < SIG_WORDS; i++) begin
        logic [63:0] dd;
        s[i] = $urandom_range(0, 1 << 16);
        dd = (s[i] >= q[i]) ? 64'(s[i] - q[i]) : 64'(q[i] - s[i]);
        gd[g] += DIST_W'(dd * dd);
      end
      for (int b = 0; b < SIG_BEATS; b++) img[g / per][(g % per) * SIG_BEATS + b] = {s[2*b], s[2*b+1]};
      order[g] = g;
    end
    for (int i = 1; i < total; i++)
      for (int j = i; j > 0 && gd[order[j]] < gd[order[j-1]]; j--) begin
        int t; t = order[j]; order[j] = order[j-1]; order[j-1] = t;
      end
    // reset loads the memory images
    rst_n = 0; repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < k; n++) begin
      for (int i = 0; i < SIG_WORDS; i++) bus_write(n, 8'h40 + 8'(i), q[i]);
      bus_write(n, 8'h02, 0);
      bus_write(n, 8'h03, per);
    end
    for (int n = 0; n < k; n++) begin
      @(negedge clk); cop_req[n] = 1; cop_we[n] = 1; cop_addr[n] = 8'h00; cop_wdata[n] = 32'h3;
    end
    t0 = cyc;
    @(negedge clk);
    for (int n = 0; n < k; n++) cop_req[n] = 0;
    for (int n = 0; n < k; n++) while (!cop_irq[n]) @(posedge clk);
    search_t[e][ki] = cyc - t0;
    for (int n = 0; n < k; n++)
      for (int i = 0; i < TOPK; i++) begin
        logic [31:0] id, d0, d1, d2;
        bus_read(n, 8'h80 + 8'(4*i), id);
        bus_read(n, 8'h81 + 8'(4*i), d0);
        bus_read(n, 8'h82 + 8'(4*i), d1);
        bus_read(n, 8'h83 + 8'(4*i), d2);
        mine[n][i] = '{{d2[5:0], d1, d0}, n * per + int'(id), d2[31]};
      end
    merged = mine[k-1];
    for (int n = k - 1; n > 0; n--) begin
      logic [31:0] w [$], rw [$];
      res_t a [TOPK], m [TOPK];
      int ia, ib;
      for (int i = 0; i < TOPK; i++) begin
        w.push_back(32'(merged[i].id));
        w.push_back(merged[i].d[31:0]);
        w.push_back(merged[i].d[63:32]);
        w.push_back({merged[i].v, 25'b0, merged[i].d[69:64]});
      end
      fork send(n, n - 1, w); join_none
      receive(n - 1, rw);
      for (int i = 0; i < TOPK; i++)
        a[i] = '{{rw[4*i+3][5:0], rw[4*i+2], rw[4*i+1]}, int'(rw[4*i]), rw[4*i+3][31]};
      ia = 0; ib = 0;
      for (int i = 0; i < TOPK; i++) begin
        if (!a[ia].v || (mine[n-1][ib].v && (mine[n-1][ib].d < a[ia].d ||
            (mine[n-1][ib].d == a[ia].d && mine[n-1][ib].id < a[ia].id))))
          begin m[i] = mine[n-1][ib]; ib++; end
        else begin m[i] = a[ia]; ia++; end
      end
      merged = m;
    end
    t1 = cyc;
    resp_t[e][ki] = t1 - t0;
    for (int i = 0; i < TOPK; i++)
      check(merged[i].v && merged[i].d == gd[order[i]],
            $sformatf("experiment %0d, %0d nodes, result %0d", e + 1, k, i));
    $display("experiment %0d: %0d nodes x %0d signatures: search %0d cycles, response %0d cycles",
             e + 1, k, per, search_t[e][ki], resp_t[e][ki]);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NN; n++) begin
      cop_req[n] = 0; cop_we[n] = 0; cop_addr[n] = 0; cop_wdata[n] = 0;
      htx_valid[n] = 0; htx_beat[n] = '0;
      cfg[n].node_addr   = 5'(n);
      cfg[n].port_prev   = 2'd0;
      cfg[n].port_next   = 2'd1;
      cfg[n].port_sbe_up = (n == 0) ? 2'd2 : 2'd0;
      cfg[n].port_sbe_dn = (n == 7) ? 2'd2 : 2'd1;
      for (int i = 0; i < MAXS * SIG_BEATS; i++) img[n][i] = '0;
    end
    for (int ki = 0; ki < 4; ki++) run(0, ki, 1 << ki, NPER1);
    for (int ki = 0; ki < 4; ki++) run(1, ki, 1 << ki, NDB2 >> ki);
    for (int ki = 1; ki < 4; ki++) begin
      check(search_t[0][ki] <= search_t[0][0] + 4 && search_t[0][ki] + 4 >= search_t[0][0],
            "experiment 1: search time independent of node count");
      check(search_t[1][ki] < search_t[1][ki-1], "experiment 2: search time falls with more nodes");
      check(resp_t[0][ki] > resp_t[0][ki-1], "experiment 1: merge adds time with more nodes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
