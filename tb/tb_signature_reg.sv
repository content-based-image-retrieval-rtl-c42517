// tb_signature_reg: writes random words, reads them back through the word port
// and the two-word beat port, and checks reset clears and out-of-range writes.
module tb_signature_reg;
  import smile_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [5:0] wr_idx, rd_idx;
  logic [4:0] beat_idx;
  logic [31:0] wr_data, rd_data, beat_word0, beat_word1;
  logic [31:0] model [SIG_WORDS];
  int checks = 0, failures = 0;

  signature_reg dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_idx = 0; rd_idx = 0; beat_idx = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < SIG_WORDS; i++) begin
      rd_idx = 6'(i); #1;
      check(rd_data == 0, "reset value");
    end
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < SIG_WORDS; i++) begin
        @(negedge clk);
        wr_en = 1; wr_idx = 6'(i); wr_data = $urandom; model[i] = wr_data;
      end
      @(negedge clk);
      // write beyond the register: ignored
      wr_en = 1; wr_idx = 6'(SIG_WORDS); wr_data = 32'hdeadbeef;
      @(negedge clk);
      wr_en = 0;
      for (int i = 0; i < SIG_WORDS; i++) begin
        rd_idx = 6'(i); #1;
        check(rd_data == model[i], $sformatf("word %0d", i));
      end
      for (int b = 0; b < SIG_BEATS; b++) begin
        beat_idx = 5'(b); #1;
        check(beat_word0 == model[2*b] && beat_word1 == model[2*b+1], $sformatf("beat %0d", b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
