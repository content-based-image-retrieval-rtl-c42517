// tb_pkt_arbiter: three sources send random-length packets with random gaps
// into the arbiter while the output stalls at random. Every output packet must
// be one source's next packet, complete and uninterleaved; every packet must
// come out; under full load the grants must rotate between the sources.
module tb_pkt_arbiter;
  import smile_pkg::*;
  localparam int N = 3, NPKT = 60;
  logic clk = 0, rst_n = 0;
  logic in_valid [N];
  beat_t in_beat [N];
  logic in_ready [N];
  logic out_valid, out_ready;
  beat_t out_beat;
  int checks = 0, failures = 0;
  int sent [N], recv [N];
  int cur_src = -1, cur_pos = 0, cur_len = 0;
  int lastsrc = -1, rotations = 0, same = 0;
  int plen [N][NPKT];
  bit full_load = 0;

  pkt_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sources: beat word = {src, pkt, pos}
  for (genvar s = 0; s < N; s++) begin : g_src
    int pkt = 0, pos = 0;
    always @(posedge clk) begin
      if (rst_n && in_valid[s] && in_ready[s]) begin
        if (pos == plen[s][pkt] - 1) begin pkt <= pkt + 1; pos <= 0; end else pos <= pos + 1;
      end
    end
    always @(negedge clk) begin
      in_valid[s] = rst_n && pkt < NPKT && (full_load || $urandom_range(0, 3) != 0);
      in_beat[s].sof = (pos == 0);
      in_beat[s].eof = (pkt < NPKT) && (pos == plen[s][pkt] - 1);
      in_beat[s].data = {8'(s), 12'(pkt), 12'(pos)};
      sent[s] = pkt;
    end
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int s, p, q;
    s = int'(out_beat.data[31:24]); p = int'(out_beat.data[23:12]); q = int'(out_beat.data[11:0]);
    if (cur_src < 0) begin
      check(out_beat.sof && q == 0 && p == recv[s], "packet starts in order");
      cur_src = s;
      if (full_load) begin
        if (s != lastsrc) rotations++; else same++;
      end
      lastsrc = s;
    end else begin
      check(s == cur_src && q == cur_pos, $sformatf("no interleaving s=%0d cur=%0d q=%0d pos=%0d t=%0t", s, cur_src, q, cur_pos, $time));
    end
    cur_pos = q + 1;
    if (out_beat.eof) begin
      check(q == plen[s][p] - 1, "packet length");
      recv[s]++;
      cur_src = -1;
    end
  end

  initial begin
    for (int s = 0; s < N; s++) begin
      recv[s] = 0;
      for (int p = 0; p < NPKT; p++) plen[s][p] = $urandom_range(1, 9);
    end
    out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      forever begin @(negedge clk); out_ready = full_load || ($urandom_range(0, 4) != 0); end
      begin
        repeat (400) @(posedge clk);
        full_load = 1;
        repeat (400) @(posedge clk);
        full_load = 0;
        while (recv[0] < NPKT || recv[1] < NPKT || recv[2] < NPKT) @(posedge clk);
      end
    join_any
    for (int s = 0; s < N; s++) check(recv[s] == NPKT, "all packets delivered");
    check(rotations > 10 && same == 0, $sformatf("round robin under full load (%0d/%0d)", rotations, same));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
