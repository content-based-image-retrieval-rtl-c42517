// tb_plbci: the bus interface on its own. Checks register write/read-back,
// the signature word port, the result window (filled here with known values),
// the DMA bursts (never longer than BURST, contiguous addresses, total length
// 21 beats per signature), that the beat stream equals memory contents in
// order, the one-cycle clear at start, and that done and irq rise only after
// the last distance has been reported.
module tb_plbci;
  import smile_pkg::*;
  localparam int NSIG = 23;
  localparam int BASE = 32'h2000;
  logic clk = 0, rst_n = 0;
  logic bus_req, bus_we, bus_ack, irq;
  logic [7:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic mem_req, mem_gnt, mem_rvalid, gaps;
  logic [31:0] mem_addr;
  logic [4:0] mem_len;
  logic [63:0] mem_rdata;
  logic clear, beat_valid;
  logic [63:0] beat_data;
  logic sig_wr_en;
  logic [5:0] sig_wr_idx, sig_rd_idx;
  logic [31:0] sig_wr_data, sig_rd_data;
  logic dist_valid;
  logic res_valid [TOPK];
  logic [DIST_W-1:0] res_dist [TOPK];
  logic [ID_W-1:0] res_id [TOPK];
  logic [31:0] sigmem [64];
  int checks = 0, failures = 0, nbeats = 0, nclear = 0, ndist = 0;
  logic [31:0] next_addr_exp;

  plbci dut (.*);
  mem_model #(.WORDS(8192), .LAT(4), .LENW(5)) u_mem (
    .clk, .rst_n, .gaps, .req(mem_req), .addr(mem_addr), .len(mem_len), .gnt(mem_gnt),
    .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  // signature register stand-in
  always @(posedge clk) if (sig_wr_en) sigmem[sig_wr_idx] <= sig_wr_data;
  assign sig_rd_data = sigmem[sig_rd_idx];

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
    check(bus_ack, "ack");
  endtask

  // burst and stream monitors; distances reported 3 cycles after each 21st beat
  logic [2:0] dpipe;
  always @(posedge clk) if (!rst_n) dpipe <= '0; else begin
    if (clear) nclear++;
    if (mem_req && mem_gnt) begin
      check(mem_len >= 1 && mem_len <= 16, "burst length");
      check(mem_addr == next_addr_exp, "burst address contiguous");
      next_addr_exp <= mem_addr + 32'(mem_len) * 8;
    end
    dpipe <= {dpipe[1:0], 1'b0};
    if (beat_valid) begin
      check(beat_data == u_mem.mem[BASE/8 + nbeats], $sformatf("beat %0d data", nbeats));
      nbeats <= nbeats + 1;
      if ((nbeats + 1) % SIG_BEATS == 0) dpipe[0] <= 1'b1;
    end
    if (dist_valid) ndist <= ndist + 1;
  end
  assign dist_valid = dpipe[2];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    bus_req = 0; bus_we = 0; bus_addr = 0; bus_wdata = 0; gaps = 1;
    for (int i = 0; i < TOPK; i++) begin
      res_valid[i] = (i % 3 != 2);
      res_dist[i] = {6'(i), 32'(1000 + i), 32'(2000 + i)};
      res_id[i] = ID_W'(i * 77);
    end
    for (int i = 0; i < 8192; i++) u_mem.mem[i] = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;
    bus_write(8'h02, BASE); bus_write(8'h03, NSIG);
    bus_read(8'h02, r); check(r == BASE, "DMA_ADDR read-back");
    bus_read(8'h03, r); check(r == NSIG, "DMA_COUNT read-back");
    bus_write(8'h45, 32'hcafe0005);
    bus_read(8'h45, r); check(r == 32'hcafe0005, "signature word via bus");
    for (int i = 0; i < TOPK; i++) begin
      bus_read(8'h80 + 8'(4*i), r); check(r == 32'(i * 77), "result id");
      bus_read(8'h81 + 8'(4*i), r); check(r == 32'(2000 + i), "result dist lo");
      bus_read(8'h82 + 8'(4*i), r); check(r == 32'(1000 + i), "result dist mid");
      bus_read(8'h83 + 8'(4*i), r); check(r == {res_valid[i], 25'b0, 6'(i)}, "result dist hi/valid");
    end
    next_addr_exp = BASE;
    bus_write(8'h00, 32'h3);
    while (!irq) begin
      @(negedge clk);
      check(ndist < NSIG || (dut.done && irq), "done only after last distance");
    end
    check(ndist == NSIG, "irq after all distances");
    check(nbeats == NSIG * SIG_BEATS, "total beats");
    check(nclear == 1, "one clear pulse");
    check(u_mem.bursts == (NSIG * SIG_BEATS + 15) / 16, "number of bursts");
    bus_read(8'h01, r); check(r[1:0] == 2'b10, "status done");
    bus_write(8'h01, 32'h2);
    bus_read(8'h01, r); check(r[1:0] == 2'b00, "done cleared");
    check(!irq, "irq low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
