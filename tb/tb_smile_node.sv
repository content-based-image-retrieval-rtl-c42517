// tb_smile_node: end-to-end search on a cluster of eight SMILE nodes (two
// SBEs of four) at the design's default parameters.
//
// Topology: inside an SBE the nodes form a chain (link 0 = previous node,
// link 1 = next node); link 2 of node 0 (SBE 0) and of node 7 (SBE 1) joins
// the two SBEs, closing a ring 0-1-2-3 / 4-5-6-7-0. Other nodes reach the
// other SBE through their SBE's gateway node, so every forwarding case occurs.
// The testbench plays the software of every node:
//   1. node 2, where the query arrives, sends the query signature to all
//      other nodes through the network; each node loads it into its
//      coprocessor;
//   2. every coprocessor searches its own share of the database (NPER
//      signatures in its own memory model) and raises its interrupt;
//   3. the top-15 lists are merged along the chain 7 -> 6 -> ... -> 0: each
//      node sends its (merged) list to node n-1, which merges it with its own;
//   4. node 0 sends the final list back to node 2, where it must equal the
//      top 15 of the whole database, computed here independently.
// Also checks the search rate, and counts how often each mechanism happened:
// DMA bursts, sorter insertions and rejections, local delivery, forwarding to
// the previous/next neighbour and to the lower/higher SBE, routing buffers
// holding a packet, and link back-pressure. Each must happen at least once.
module tb_smile_node;
  import smile_pkg::*;
  localparam int NN   = 8;
  localparam int NPER = 40;
  localparam int BASE = 32'h0;
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

  int checks = 0, failures = 0;
  longint cyc = 0;
  logic [31:0] q [SIG_WORDS];
  logic [DIST_W-1:0] gdist [NN*NPER];
  beat_t rxw [NN][$];
  int n_bursts = 0, n_ins = 0, n_rej = 0, n_local = 0, n_fwd_case [4], n_held = 0, n_bp = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- nodes, memories, links ----------------
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

    mem_model #(.WORDS(1024), .LAT(8), .LENW(5)) u_mem (
      .clk, .rst_n, .gaps(1'b0), .req(mem_req[n]), .addr(mem_addr[n]), .len(mem_len[n]),
      .gnt(mem_gnt[n]), .rvalid(mem_rvalid[n]), .rdata(mem_rdata[n]));

    // links to the neighbours: 0 prev, 1 next (within the SBE), 2 other SBE
    localparam int PREV = ((n % 4) == 0) ? -1 : n - 1;
    localparam int NEXT = ((n % 4) == 3) ? -1 : n + 1;
    localparam int PEER = (n == 0) ? 7 : (n == 7) ? 0 : -1;
    localparam int PEERS [3] = '{PREV, NEXT, PEER};
    localparam int BACK [3] = '{1, 0, 2};      // link number at the far end
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

    // processor receive side: collect words, random stalls
    always @(negedge clk) hrx_ready[n] = ($urandom_range(0, 3) != 0);
    always @(posedge clk) if (rst_n && hrx_valid[n] && hrx_ready[n]) rxw[n].push_back(hrx_beat[n]);

    // mechanism counters
    always @(posedge clk) if (rst_n) begin
      if (mem_req[n] && mem_gnt[n]) n_bursts++;
      if (u_node.u_cop.dist_valid) begin
        if (u_node.u_cop.u_sort.better[TOPK-1]) n_ins++; else n_rej++;
      end
      for (int l = 0; l < NLINKS; l++) begin
        if (u_node.u_sce.rxf_wr[l] && lrx_beat[n][l].sof) n_local++;
        if (!u_node.u_sce.fwf_empty[l] && !u_node.u_sce.fwf_rd[l]) n_held++;
        if (ltx_valid[n][l] && !ltx_ready[n][l]) n_bp++;
        if (u_node.u_sce.fwf_rd[l] && u_node.u_sce.fwf_q[l].sof) begin
          node_addr_t d;
          d = u_node.u_sce.fwf_q[l].data[NODE_W-1:0];
          if (d[4:2] == cfg[n].node_addr[4:2]) n_fwd_case[(d < cfg[n].node_addr) ? 0 : 1]++;
          else n_fwd_case[(d[4:2] < cfg[n].node_addr[4:2]) ? 2 : 3]++;
        end
      end
    end
  end

  // ---------------- node software ----------------
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
    check(b.sof && b.data[NODE_W-1:0] == 5'(n), "received header addressed to this node");
    while (!b.eof) begin
      while (rxw[n].size() == 0) @(posedge clk);
      b = rxw[n].pop_front();
      words.push_back(b.data);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    typedef struct { logic [DIST_W-1:0] d; int id; logic v; } res_t;
    res_t mine [NN][TOPK];
    res_t merged [TOPK];
    int order [NN*NPER];
    logic [31:0] w [$];
    longint t0;

    for (int c = 0; c < 4; c++) n_fwd_case[c] = 0;
    for (int n = 0; n < NN; n++) begin
      cop_req[n] = 0; cop_we[n] = 0; cop_addr[n] = 0; cop_wdata[n] = 0;
      htx_valid[n] = 0; htx_beat[n] = '0;
      cfg[n].node_addr   = 5'(n);
      cfg[n].port_prev   = 2'd0;
      cfg[n].port_next   = 2'd1;
      // SBE 0 leaves through node 0, SBE 1 through node 7
      cfg[n].port_sbe_up = (n == 0) ? 2'd2 : 2'd0;
      cfg[n].port_sbe_dn = (n == 7) ? 2'd2 : 2'd1;
    end
    // query and database
    for (int i = 0; i < SIG_WORDS; i++) q[i] = $urandom_range(0, 1 << 20);
    for (int g = 0; g < NN * NPER; g++) begin
      logic [31:0] s [SIG_WORDS];
      gdist[g] = 0;
      for (int i = 0; i < SIG_WORDS; i++) begin
        logic [63:0] dd;
        s[i] = $urandom_range(0, 1 << 20);
        dd = (s[i] >= q[i]) ? 64'(s[i] - q[i]) : 64'(q[i] - s[i]);
        gdist[g] += DIST_W'(dd * dd);
      end
      for (int b = 0; b < SIG_BEATS; b++) begin
        case (g / NPER)
          0: g_node[0].u_mem.mem[(g % NPER) * SIG_BEATS + b] = {s[2*b], s[2*b+1]};
          1: g_node[1].u_mem.mem[(g % NPER) * SIG_BEATS + b] = {s[2*b], s[2*b+1]};
          2: g_node[2].u_mem.mem[(g % NPER) * SIG_BEATS + b] = {s[2*b], s[2*b+1]};
          3: g_node[3].u_mem.mem[(g % NPER) * SIG_BEATS + b] = {s[2*b], s[2*b+1]};
          4: g_node[4].u_mem.mem[(g % NPER) * SIG_BEATS + b] = {s[2*b], s[2*b+1]};
          5: g_node[5].u_mem.mem[(g % NPER) * SIG_BEATS + b] = {s[2*b], s[2*b+1]};
          6: g_node[6].u_mem.mem[(g % NPER) * SIG_BEATS + b] = {s[2*b], s[2*b+1]};
          default: g_node[7].u_mem.mem[(g % NPER) * SIG_BEATS + b] = {s[2*b], s[2*b+1]};
        endcase
      end
      order[g] = g;
    end
    for (int i = 1; i < NN * NPER; i++)
      for (int j = i; j > 0 && gdist[order[j]] < gdist[order[j-1]]; j--) begin
        int t; t = order[j]; order[j] = order[j-1]; order[j-1] = t;
      end

    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. distribute the query from node 2
    w.delete();
    for (int i = 0; i < SIG_WORDS; i++) w.push_back(q[i]);
    fork
      for (int n = 0; n < NN; n++) if (n != 2) send(2, n, w);
    join_none
    for (int n = 0; n < NN; n++) begin
      logic [31:0] rw [$];
      if (n == 2) continue;
      receive(n, rw);
      check(rw.size() == SIG_WORDS, "query packet length");
      for (int i = 0; i < SIG_WORDS; i++) begin
        check(rw[i] == q[i], "query word received");
        bus_write(n, 8'h40 + 8'(i), rw[i]);
      end
    end
    for (int i = 0; i < SIG_WORDS; i++) bus_write(2, 8'h40 + 8'(i), q[i]);

    // 2. search everywhere
    for (int n = 0; n < NN; n++) begin
      bus_write(n, 8'h02, BASE);
      bus_write(n, 8'h03, NPER);
    end
    for (int n = 0; n < NN; n++) begin
      @(negedge clk); cop_req[n] = 1; cop_we[n] = 1; cop_addr[n] = 8'h00; cop_wdata[n] = 32'h3;
    end
    t0 = cyc;
    @(negedge clk);
    for (int n = 0; n < NN; n++) cop_req[n] = 0;
    for (int n = 0; n < NN; n++) while (!cop_irq[n]) @(posedge clk);
    $display("all %0d searches of %0d signatures done after %0d cycles", NN, NPER, cyc - t0);
    check(cyc - t0 <= NPER * SIG_BEATS + 50, "search rate of two words per cycle");
    for (int n = 0; n < NN; n++)
      for (int i = 0; i < TOPK; i++) begin
        logic [31:0] id, d0, d1, d2;
        bus_read(n, 8'h80 + 8'(4*i), id);
        bus_read(n, 8'h81 + 8'(4*i), d0);
        bus_read(n, 8'h82 + 8'(4*i), d1);
        bus_read(n, 8'h83 + 8'(4*i), d2);
        mine[n][i] = '{{d2[5:0], d1, d0}, n * NPER + int'(id), d2[31]};
      end

    // 3. merge along the chain 7 -> 0
    merged = mine[NN-1];
    for (int n = NN - 1; n > 0; n--) begin
      logic [31:0] rw [$];
      res_t a [TOPK], m [TOPK];
      int ia, ib;
      w.delete();
      for (int i = 0; i < TOPK; i++) begin
        w.push_back(32'(merged[i].id));
        w.push_back(merged[i].d[31:0]);
        w.push_back(merged[i].d[63:32]);
        w.push_back({merged[i].v, 25'b0, merged[i].d[69:64]});
      end
      fork send(n, n - 1, w); join_none
      receive(n - 1, rw);
      check(rw.size() == 4 * TOPK, "merge packet length");
      for (int i = 0; i < TOPK; i++)
        a[i] = '{{rw[4*i+3][5:0], rw[4*i+2], rw[4*i+1]}, int'(rw[4*i]), rw[4*i+3][31]};
      // merge two sorted lists; on equal distance the lower identifier first
      ia = 0; ib = 0;
      for (int i = 0; i < TOPK; i++) begin
        if (!a[ia].v || (mine[n-1][ib].v && (mine[n-1][ib].d < a[ia].d ||
            (mine[n-1][ib].d == a[ia].d && mine[n-1][ib].id < a[ia].id))))
          begin m[i] = mine[n-1][ib]; ib++; end
        else begin m[i] = a[ia]; ia++; end
      end
      merged = m;
    end

    // 4. node 0 returns the cluster result to node 2; compare with the reference
    w.delete();
    for (int i = 0; i < TOPK; i++) begin
      w.push_back(32'(merged[i].id));
      w.push_back(merged[i].d[31:0]);
      w.push_back(merged[i].d[63:32]);
      w.push_back({merged[i].v, 25'b0, merged[i].d[69:64]});
    end
    fork send(0, 2, w); join_none
    begin
      logic [31:0] rw [$];
      receive(2, rw);
      check(rw.size() == 4 * TOPK, "final packet length");
      for (int i = 0; i < TOPK; i++)
        merged[i] = '{{rw[4*i+3][5:0], rw[4*i+2], rw[4*i+1]}, int'(rw[4*i]), rw[4*i+3][31]};
    end
    for (int i = 0; i < TOPK; i++) begin
      check(merged[i].v, "final result valid");
      check(merged[i].d == gdist[order[i]], $sformatf("final result %0d distance", i));
      check(merged[i].id == order[i] || gdist[merged[i].id] == gdist[order[i]],
            $sformatf("final result %0d image %0d expected %0d", i, merged[i].id, order[i]));
    end

    $display("bursts=%0d inserted=%0d rejected=%0d local=%0d fwd_prev=%0d fwd_next=%0d fwd_sbe_dn=%0d fwd_sbe_up=%0d held=%0d backpressure=%0d",
             n_bursts, n_ins, n_rej, n_local, n_fwd_case[0], n_fwd_case[1], n_fwd_case[2], n_fwd_case[3], n_held, n_bp);
    check(n_bursts > 0, "DMA bursts happened");
    check(n_ins > 0, "sorter insertions happened");
    check(n_rej > 0, "sorter rejections happened");
    check(n_local > 0, "local deliveries happened");
    for (int c = 0; c < 4; c++) check(n_fwd_case[c] > 0, $sformatf("forwarding case %0d happened", c));
    check(n_held > 0, "routing buffer held a packet");
    check(n_bp > 0, "link back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
