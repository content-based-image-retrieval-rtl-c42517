// link_model: behavioural stand-in for a serial-link core pair (transmitting
// core on one board, cable, receiving core on the other). It passes the packet
// stream through unchanged but is idle on random cycles, so both ends see
// back-pressure. The real cores are vendor IP and are not part of the design.
module link_model
  import smile_pkg::*;
(
  input  logic  clk,
  input  logic  in_valid,
  input  beat_t in_beat,
  output logic  in_ready,
  output logic  out_valid,
  output beat_t out_beat,
  input  logic  out_ready
);
  logic en = 1'b1;
  always @(negedge clk) en <= ($urandom_range(0, 4) != 0);
  assign out_valid = in_valid && en;
  assign out_beat  = in_beat;
  assign in_ready  = out_ready && en;
endmodule
