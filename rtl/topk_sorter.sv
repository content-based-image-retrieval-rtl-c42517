// topk_sorter: comparison and sorting block of the CBIR coprocessor.
//
// Keeps the K (15) smallest distances seen since the last clear, with their
// image identifiers, in ascending order in slot 0..K-1. Every incoming distance
// is compared with all K slots in parallel; the result is a thermometer code
// (an empty slot counts as larger than anything) whose first set bit is the
// insertion point. Slots from there on shift down by one, the last entry falls
// out, and the new entry is written into the gap. A distance that is not
// smaller than all K kept ones is discarded. Equal distances keep arrival
// order: the new one goes behind the older ones.
//
// Timing: one distance per cycle; the buffer shows the insertion at the next
// clock edge. clear empties the buffer in one cycle. The 15-entry ordered
// buffer follows the SMILE design; the one-cycle parallel insertion is this
// design's choice.
module topk_sorter
  import smile_pkg::*;
#(
  parameter int unsigned K   = TOPK,
  parameter int unsigned DW  = DIST_W,
  parameter int unsigned IDW = ID_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           in_valid,
  input  logic [DW-1:0]  in_dist,
  input  logic [IDW-1:0] in_id,
  output logic           slot_valid [K],
  output logic [DW-1:0]  slot_dist  [K],
  output logic [IDW-1:0] slot_id    [K],
  output logic           inserted      // pulse: last input entered the buffer
);

  logic [K-1:0] better;   // new entry goes at or before slot i
  logic [K-1:0] prev_better;

  always_comb begin
    for (int i = 0; i < K; i++)
      better[i] = !slot_valid[i] || (in_dist < slot_dist[i]);
    prev_better = {better[K-2:0], 1'b0};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) begin
        slot_valid[i] <= 1'b0;
        slot_dist[i]  <= '0;
        slot_id[i]    <= '0;
      end
      inserted <= 1'b0;
    end else if (clear) begin
      for (int i = 0; i < K; i++) slot_valid[i] <= 1'b0;
      inserted <= 1'b0;
    end else begin
      inserted <= in_valid && better[K-1];
      if (in_valid) begin
        for (int i = 0; i < K; i++) begin
          if (better[i]) begin
            if (!prev_better[i]) begin
              slot_valid[i] <= 1'b1;
              slot_dist[i]  <= in_dist;
              slot_id[i]    <= in_id;
            end else if (i > 0) begin
              slot_valid[i] <= slot_valid[i-1];
              slot_dist[i]  <= slot_dist[i-1];
              slot_id[i]    <= slot_id[i-1];
            end
          end
        end
      end
    end
  end

  // The buffer stays sorted.
  for (genvar g = 1; g < K; g++) begin : g_order
    a_sorted: assert property (@(posedge clk) disable iff (!rst_n)
      slot_valid[g] |-> (slot_valid[g-1] && slot_dist[g-1] <= slot_dist[g]));
  end

endmodule
