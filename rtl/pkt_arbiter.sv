// pkt_arbiter: packet-level round-robin merge of N packet streams.
//
// Each input offers beats (valid/ready handshake, beat_t with sof/eof). When
// the output is free the arbiter grants the first requesting input at or after
// its round-robin pointer, in the same cycle, and keeps that grant until the
// beat with eof has been accepted, so packets are never interleaved. The
// pointer then moves past the input just served. The SCE uses one per link
// output (its own send FIFO and the three routing buffers competing for the
// link) and one to merge the three receive FIFOs towards the processor. The
// SMILE design only says this data exchange exists; round-robin packet
// arbitration is this design's choice.
//
// Timing: combinational from inputs to output; one beat per cycle.
module pkt_arbiter
  import smile_pkg::*;
#(
  parameter int unsigned N = 4,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid [N],
  input  beat_t  in_beat  [N],
  output logic   in_ready [N],
  output logic   out_valid,
  output beat_t  out_beat,
  input  logic   out_ready
);

  logic          locked;
  logic [IW-1:0] lock_idx, rr_ptr, pick, cur;
  logic          any;

  always_comb begin
    any  = 1'b0;
    pick = rr_ptr;
    for (int k = N - 1; k >= 0; k--) begin
      logic [IW-1:0] idx;
      idx = IW'((32'(rr_ptr) + 32'(k)) % N);
      if (in_valid[idx]) begin
        any  = 1'b1;
        pick = idx;
      end
    end
    cur       = locked ? lock_idx : pick;
    out_valid = locked ? in_valid[lock_idx] : any;
    out_beat  = in_beat[cur];
    for (int i = 0; i < N; i++)
      in_ready[i] = out_ready && out_valid && (cur == IW'(i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked   <= 1'b0;
      lock_idx <= '0;
      rr_ptr   <= '0;
    end else if (out_valid && out_ready) begin
      if (out_beat.eof) begin
        locked <= 1'b0;
        rr_ptr <= (32'(cur) == N - 1) ? '0 : cur + 1'b1;
      end else begin
        locked   <= 1'b1;
        lock_idx <= cur;
      end
    end
  end

  // A new packet starts with a header beat.
  a_sof_first: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && out_ready && !locked) |-> out_beat.sof);

endmodule
