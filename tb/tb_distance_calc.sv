// tb_distance_calc: streams random signatures, back to back and with gaps,
// against a random query; checks each squared Euclidean distance, the image
// identifier, the 3-cycle latency after the last beat and the rate of one
// signature per 21 cycles when beats arrive every cycle.
module tb_distance_calc;
  import smile_pkg::*;
  localparam int NSIG = 40;
  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid;
  logic [63:0] in_beat;
  logic [4:0] sig_beat_idx;
  logic [31:0] sig_word0, sig_word1;
  logic out_valid;
  logic [DIST_W-1:0] out_dist;
  logic [ID_W-1:0] out_id;
  logic [31:0] q [SIG_WORDS];
  logic [31:0] db [NSIG][SIG_WORDS];
  logic [DIST_W-1:0] expect_d [NSIG];
  int checks = 0, failures = 0, nout = 0;
  longint last_beat_cycle [NSIG];
  longint cyc = 0;
  longint out_cycle [NSIG];

  distance_calc dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // query signature read port model (combinational, as signature_reg)
  always_comb begin
    sig_word0 = q[2*sig_beat_idx];
    sig_word1 = q[2*sig_beat_idx+1];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    check(out_id == ID_W'(nout), "identifier");
    check(out_dist == expect_d[nout], $sformatf("distance %0d: %0h vs %0h", nout, out_dist, expect_d[nout]));
    check(cyc - last_beat_cycle[nout] == 3, $sformatf("latency %0d", cyc - last_beat_cycle[nout]));
    out_cycle[nout] = cyc;
    nout++;
  end

  initial begin
    for (int w = 0; w < SIG_WORDS; w++) q[w] = (w < 4) ? ((w % 2) ? 32'hffff_ffff : 32'h0) : $urandom;
    for (int s = 0; s < NSIG; s++) begin
      logic [DIST_W-1:0] acc;
      acc = 0;
      for (int w = 0; w < SIG_WORDS; w++) begin
        longint signed_d;
        logic [63:0] dd;
        // extremes in the first signatures exercise the full width
        db[s][w] = (s == 0 && w < 4) ? ((w % 2) ? 32'h0 : 32'hffff_ffff) : $urandom;
        dd = (db[s][w] >= q[w]) ? 64'(db[s][w] - q[w]) : 64'(q[w] - db[s][w]);
        acc += DIST_W'(dd * dd);
      end
      expect_d[s] = acc;
    end
    in_valid = 0; in_beat = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int s = 0; s < NSIG; s++) begin
      for (int b = 0; b < SIG_BEATS; b++) begin
        // first half back to back, second half with random gaps
        while (s >= NSIG / 2 && $urandom_range(0, 3) == 0) begin
          in_valid = 0; @(negedge clk);
        end
        in_valid = 1;
        in_beat = {db[s][2*b], db[s][2*b+1]};
        if (b == SIG_BEATS - 1) last_beat_cycle[s] = cyc;
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (10) @(negedge clk);
    check(nout == NSIG, "all distances produced");
    for (int s = 1; s < NSIG / 2; s++)
      check(out_cycle[s] - out_cycle[s-1] == SIG_BEATS, "one signature per 21 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
