// distance_calc: pipelined distance unit of the CBIR coprocessor.
//
// Database signatures arrive from the DMA input FIFO as 64-bit beats, two
// 32-bit unsigned words per beat, SIG_BEATS (21) beats per signature. For each
// beat the unit subtracts the matching two words of the query signature, squares
// both differences and accumulates them, so after the last beat of a signature
// it emits the squared Euclidean distance together with the signature's
// position in the stream (its image identifier). The square root is left out:
// it does not change the order of the distances, which is all the sorter needs.
//
// Word order in a beat: the word at the lower memory address is in bits
// [63:32] (big-endian processor), i.e. beat k carries word 2k in [63:32] and
// word 2k+1 in [31:0].
//
// Pipeline (one beat per cycle, never stalls):
//   stage 1: differences (33-bit signed), registered
//   stage 2: squares of both differences, summed, registered
//   stage 3: accumulation; on the last beat the result is registered out
// The distance of a signature is valid LATENCY = 3 cycles after its last beat
// was presented with in_valid. clear restarts the beat and identifier counters
// for a new search. Two words per cycle follows the SMILE design; the pipeline
// split and the identifier numbering are this design's choices.
module distance_calc
  import smile_pkg::*;
#(
  parameter int unsigned N_BEATS = SIG_BEATS,
  parameter int unsigned W       = WORD_W,
  parameter int unsigned DW      = DIST_W,
  parameter int unsigned IDW     = ID_W,
  localparam int unsigned BIW    = $clog2(N_BEATS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  // database beat stream
  input  logic            in_valid,
  input  logic [2*W-1:0]  in_beat,
  // query signature read port
  output logic [BIW-1:0]  sig_beat_idx,
  input  logic [W-1:0]    sig_word0,
  input  logic [W-1:0]    sig_word1,
  // one distance per signature
  output logic            out_valid,
  output logic [DW-1:0]   out_dist,
  output logic [IDW-1:0]  out_id
);

  logic [BIW-1:0] beat_cnt;
  logic [IDW-1:0] id_cnt;

  // stage 1 registers
  logic                 s1_valid, s1_first, s1_last;
  logic [IDW-1:0]       s1_id;
  logic signed [W:0]    s1_d0, s1_d1;
  // stage 2 registers
  logic                 s2_valid, s2_first, s2_last;
  logic [IDW-1:0]       s2_id;
  logic [2*W:0]         s2_sum;
  // stage 3 accumulator
  logic [DW-1:0]        acc;

  logic [2*W-1:0]        sq0, sq1;    // squares fit in 2W bits
  logic [DW-1:0]         acc_next;

  assign sig_beat_idx = beat_cnt;

  always_comb begin
    sq0      = (2*W)'(s1_d0 * s1_d0);
    sq1      = (2*W)'(s1_d1 * s1_d1);
    acc_next = (s2_first ? '0 : acc) + DW'(s2_sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat_cnt  <= '0;
      id_cnt    <= '0;
      s1_valid  <= 1'b0;
      s1_first  <= 1'b0;
      s1_last   <= 1'b0;
      s1_id     <= '0;
      s1_d0     <= '0;
      s1_d1     <= '0;
      s2_valid  <= 1'b0;
      s2_first  <= 1'b0;
      s2_last   <= 1'b0;
      s2_id     <= '0;
      s2_sum    <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_dist  <= '0;
      out_id    <= '0;
    end else if (clear) begin
      beat_cnt  <= '0;
      id_cnt    <= '0;
      s1_valid  <= 1'b0;
      s2_valid  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      // stage 1: subtract
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_d0    <= $signed({1'b0, in_beat[2*W-1:W]}) - $signed({1'b0, sig_word0});
        s1_d1    <= $signed({1'b0, in_beat[W-1:0]})  - $signed({1'b0, sig_word1});
        s1_first <= (beat_cnt == '0);
        s1_last  <= (beat_cnt == BIW'(N_BEATS - 1));
        s1_id    <= id_cnt;
        if (beat_cnt == BIW'(N_BEATS - 1)) begin
          beat_cnt <= '0;
          id_cnt   <= id_cnt + 1'b1;
        end else begin
          beat_cnt <= beat_cnt + 1'b1;
        end
      end
      // stage 2: square and add the pair
      s2_valid <= s1_valid;
      if (s1_valid) begin
        s2_sum   <= {1'b0, sq0} + {1'b0, sq1};
        s2_first <= s1_first;
        s2_last  <= s1_last;
        s2_id    <= s1_id;
      end
      // stage 3: accumulate
      out_valid <= s2_valid && s2_last;
      if (s2_valid) begin
        acc <= acc_next;
        if (s2_last) begin
          out_dist <= acc_next;
          out_id   <= s2_id;
        end
      end
    end
  end

endmodule
