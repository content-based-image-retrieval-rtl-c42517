// tb_cbir_coprocessor: complete searches through the register map. Loads a
// query signature, places a random signature database in the memory model,
// starts the search, waits for the interrupt and reads the 15 results, which
// must equal a reference top-15 of squared Euclidean distances computed here.
// Checks the processed count, the signature read-back, that done clears on
// restart, and the rate: with memory streaming without gaps a search of N
// signatures must take no more than about 21*N cycles plus a fixed overhead.
module tb_cbir_coprocessor;
  import smile_pkg::*;
  localparam int NSIG = 60;
  localparam int BASE = 32'h100;          // byte address of the database
  logic clk = 0, rst_n = 0;
  logic bus_req, bus_we, bus_ack, irq;
  logic [7:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic mem_req, mem_gnt, mem_rvalid, gaps;
  logic [31:0] mem_addr;
  logic [4:0] mem_len;
  logic [63:0] mem_rdata;
  logic [31:0] q [SIG_WORDS];
  logic [31:0] db [NSIG][SIG_WORDS];
  int checks = 0, failures = 0;
  longint cyc = 0;

  cbir_coprocessor dut (.*);
  mem_model #(.WORDS(4096), .LAT(6), .LENW(5)) u_mem (
    .clk, .rst_n, .gaps, .req(mem_req), .addr(mem_addr), .len(mem_len), .gnt(mem_gnt),
    .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bus_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); bus_req = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_req = 0; bus_we = 0;
  endtask

  task automatic bus_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); bus_req = 1; bus_we = 0; bus_addr = a;
    @(negedge clk); bus_req = 0; d = bus_rdata;
    if (!bus_ack) begin failures++; $display("FAIL no ack"); end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_search(input int nsig, input bit with_gaps, input int seedmode);
    logic [DIST_W-1:0] d [NSIG];
    int order [NSIG];
    logic [31:0] r;
    longint t0, t1;
    // data: seedmode 1 uses a few values so that distances tie
    for (int w = 0; w < SIG_WORDS; w++) q[w] = seedmode ? 32'($urandom_range(0, 3)) : $urandom;
    for (int s = 0; s < nsig; s++) begin
      d[s] = 0;
      for (int w = 0; w < SIG_WORDS; w++) begin
        logic [63:0] dd;
        db[s][w] = seedmode ? 32'($urandom_range(0, 3)) : $urandom;
        dd = (db[s][w] >= q[w]) ? 64'(db[s][w] - q[w]) : 64'(q[w] - db[s][w]);
        d[s] += DIST_W'(dd * dd);
      end
      for (int b = 0; b < SIG_BEATS; b++)
        u_mem.mem[BASE/8 + s*SIG_BEATS + b] = {db[s][2*b], db[s][2*b+1]};
      order[s] = s;
    end
    // reference: stable sort by distance
    for (int i = 1; i < nsig; i++)
      for (int j = i; j > 0 && d[order[j]] < d[order[j-1]]; j--) begin
        int t; t = order[j]; order[j] = order[j-1]; order[j-1] = t;
      end
    for (int w = 0; w < SIG_WORDS; w++) bus_write(8'h40 + 8'(w), q[w]);
    for (int w = 0; w < SIG_WORDS; w += 7) begin
      bus_read(8'h40 + 8'(w), r); check(r == q[w], "signature read-back");
    end
    bus_write(8'h02, BASE);
    bus_write(8'h03, nsig);
    gaps = with_gaps;
    bus_write(8'h00, 32'h3);          // irq enable + start
    t0 = cyc;
    bus_read(8'h01, r); check(r[0] == 1 && r[1] == 0, "busy after start");
    while (!irq) @(negedge clk);
    t1 = cyc;
    $display("search of %0d signatures took %0d cycles (gaps=%0d)", nsig, t1 - t0, with_gaps);
    if (!with_gaps) check(t1 - t0 <= nsig * SIG_BEATS + 40, "rate: one beat per cycle");
    bus_read(8'h01, r); check(r[1:0] == 2'b10, "done, not busy");
    bus_read(8'h04, r); check(r == nsig, "processed count");
    for (int i = 0; i < TOPK; i++) begin
      logic [31:0] id, d0, d1, d2;
      bus_read(8'h80 + 8'(4*i), id);
      bus_read(8'h81 + 8'(4*i), d0);
      bus_read(8'h82 + 8'(4*i), d1);
      bus_read(8'h83 + 8'(4*i), d2);
      if (i < nsig) begin
        check(d2[31] == 1'b1, "result valid");
        check(id == order[i], $sformatf("result %0d id %0d expected %0d", i, id, order[i]));
        check({d2[5:0], d1, d0} == d[order[i]], $sformatf("result %0d distance", i));
      end else check(d2[31] == 1'b0, "empty result slot");
    end
    bus_write(8'h01, 32'h2);          // clear done
    check(!irq, "irq cleared");
  endtask

  initial begin
    bus_req = 0; bus_we = 0; bus_addr = 0; bus_wdata = 0; gaps = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_search(NSIG, 0, 0);
    run_search(NSIG, 1, 1);
    run_search(9, 0, 0);             // fewer signatures than result slots
    run_search(NSIG, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
