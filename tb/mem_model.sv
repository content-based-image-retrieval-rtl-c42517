// mem_model: behavioural model of the node's main memory as seen by the
// coprocessor's DMA port (the real part is a DDR controller and DDR chips).
// Burst requests are granted after a random 0-2 cycle wait, queued, and
// answered in order after LAT cycles, one 64-bit beat per cycle; when GAPS is
// set the data stream has random idle cycles. Contents are written by the
// testbench through the mem array (beat address = byte address / 8).
module mem_model #(
  parameter int WORDS = 4096,
  parameter int LAT   = 6,
  parameter int LENW  = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            gaps,
  input  logic            req,
  input  logic [31:0]     addr,
  input  logic [LENW-1:0] len,
  output logic            gnt,
  output logic            rvalid,
  output logic [63:0]     rdata
);
  logic [63:0] mem [WORDS];
  typedef struct { int a; int n; longint t; } burst_t;
  burst_t q[$];
  longint cyc = 0;
  int wait_cnt = 0;
  int bursts = 0;
  int cur_a = 0, cur_n = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always_comb gnt = req && (wait_cnt == 0);

  always @(posedge clk) begin
    if (!rst_n) begin
      rvalid <= 0; rdata <= 0; wait_cnt <= 0; q.delete(); cur_n <= 0;
    end else begin
      if (req && gnt) begin
        q.push_back('{int'(addr >> 3), int'(len), cyc + longint'(LAT)});
        bursts <= bursts + 1;
        wait_cnt <= $urandom_range(0, 2);
      end else if (wait_cnt > 0) wait_cnt <= wait_cnt - 1;
      rvalid <= 0;
      if (cur_n == 0 && q.size() > 0 && q[0].t <= cyc) begin
        cur_a = q[0].a; cur_n = q[0].n; void'(q.pop_front());
      end
      if (cur_n > 0 && !(gaps && $urandom_range(0, 4) == 0)) begin
        rvalid <= 1;
        rdata  <= mem[cur_a % WORDS];
        cur_a  = cur_a + 1;
        cur_n  = cur_n - 1;
      end
    end
  end
endmodule
