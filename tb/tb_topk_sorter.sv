// tb_topk_sorter: feeds random distances (a small range, so ties occur) with
// and without gaps and after clears; after every input compares all 15 slots
// with a reference list kept sorted by the testbench (ties in arrival order).
module tb_topk_sorter;
  import smile_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [DIST_W-1:0] in_dist;
  logic [ID_W-1:0] in_id;
  logic slot_valid [TOPK];
  logic [DIST_W-1:0] slot_dist [TOPK];
  logic [ID_W-1:0] slot_id [TOPK];
  logic inserted;
  int checks = 0, failures = 0, n_ins = 0, n_rej = 0;
  typedef struct { logic [DIST_W-1:0] d; int id; } ent_t;
  ent_t ref_l[$];

  topk_sorter dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic model_insert(input logic [DIST_W-1:0] d, input int id);
    int pos;
    pos = ref_l.size();
    for (int i = 0; i < ref_l.size(); i++) if (d < ref_l[i].d) begin pos = i; break; end
    if (pos < TOPK) begin
      ref_l.insert(pos, '{d, id});
      if (ref_l.size() > TOPK) void'(ref_l.pop_back());
      n_ins++;
    end else n_rej++;
  endtask

  task automatic compare();
    for (int i = 0; i < TOPK; i++) begin
      if (i < ref_l.size())
        check(slot_valid[i] && slot_dist[i] == ref_l[i].d && slot_id[i] == ID_W'(ref_l[i].id),
              $sformatf("slot %0d", i));
      else
        check(!slot_valid[i], $sformatf("slot %0d empty", i));
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_dist = 0; in_id = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      ref_l.delete();
      compare();
      for (int n = 0; n < 300; n++) begin
        in_valid = (round % 2 == 0) ? 1'b1 : 1'($urandom_range(0, 1));
        in_dist  = (round == 3) ? {$urandom, $urandom, 6'($urandom)} : DIST_W'($urandom_range(0, 200));
        in_id    = ID_W'(n);
        @(negedge clk);
        if (in_valid) model_insert(in_dist, n);
        compare();
      end
      in_valid = 0;
    end
    check(n_ins > 0 && n_rej > 0, "both insertions and rejections happened");
    $display("inserted=%0d rejected=%0d", n_ins, n_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
