// signature_reg: the query ("patron") signature register of the CBIR
// coprocessor.
//
// Holds the SIG_WORDS (42) 32-bit words of the signature every database entry
// is compared against. The processor writes and reads it one word at a time
// through the bus interface. The distance unit reads it one DMA beat at a time:
// beat k returns words 2k and 2k+1 together, so two words per cycle can be
// compared. It is built from flip-flops, as the SMILE design calls it a
// register; the words are cleared by reset.
//
// Timing: writes take effect at the next clock edge; both read ports are
// combinational.
module signature_reg
  import smile_pkg::*;
#(
  parameter int unsigned N_WORDS = SIG_WORDS,
  parameter int unsigned W       = WORD_W,
  localparam int unsigned IW     = $clog2(N_WORDS),
  localparam int unsigned BW     = $clog2(N_WORDS / 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor word port
  input  logic          wr_en,
  input  logic [IW-1:0] wr_idx,
  input  logic [W-1:0]  wr_data,
  input  logic [IW-1:0] rd_idx,
  output logic [W-1:0]  rd_data,
  // distance unit beat port: word 2*beat_idx and 2*beat_idx+1
  input  logic [BW-1:0] beat_idx,
  output logic [W-1:0]  beat_word0,
  output logic [W-1:0]  beat_word1
);

  logic [W-1:0] sig [N_WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_WORDS; i++) sig[i] <= '0;
    end else if (wr_en && (32'(wr_idx) < N_WORDS)) begin
      sig[wr_idx] <= wr_data;
    end
  end

  always_comb begin
    rd_data    = (32'(rd_idx) < N_WORDS) ? sig[rd_idx] : '0;
    beat_word0 = '0;
    beat_word1 = '0;
    if (32'(beat_idx) < N_WORDS / 2) begin
      beat_word0 = sig[{beat_idx, 1'b0}];
      beat_word1 = sig[{beat_idx, 1'b1}];
    end
  end

endmodule
