// scc_line_select: line selection logic of the optimized partition (profitability scoring).
//
// Looks at every way of the set that hit for the requested region and keeps the candidates
// that are worth streaming: every control-invariant confidence counter in use is at least
// conf_thresh (the stream has not crossed the misprediction threshold), the shrinkage is at
// least COMPACT_MIN and the hotness is at least HOT_THRESH. Among them it picks the one with the
// highest profitability score, the sum of the confidence counters of all invariants in use
// plus the shrinkage (lowest way wins a tie). Purely combinational. The rules and the score
// follow the document. The threshold is an input: at the top it comes from scc_thresh_tune,
// which adapts it to the misprediction trend as the document describes.
module scc_line_select
  import scc_pkg::*;
#(
  parameter int unsigned WAYS        = 8,
  parameter int unsigned COMPACT_MIN = 2,
  parameter int unsigned HOT_THRESH  = 2
) (
  input  conf_t              conf_thresh,
  input  logic [WAYS-1:0]    hit,
  input  logic [SLOT_W-1:0]  shrink [WAYS],
  input  logic [2:0]         ndinv  [WAYS],
  input  logic [1:0]         ncinv  [WAYS],
  input  conf_t              conf   [WAYS][NINV],
  input  hot_t               hot    [WAYS],
  output logic [WAYS-1:0]    eligible,
  output logic               sel_valid,
  output logic [$clog2(WAYS)-1:0] sel_way,
  output logic [7:0]         sel_score
);

  logic [7:0] score [WAYS];

  always_comb begin
    for (int unsigned w = 0; w < WAYS; w++) begin
      logic ok;
      ok       = hit[w] && shrink[w] >= SLOT_W'(COMPACT_MIN) && hot[w] >= hot_t'(HOT_THRESH);
      score[w] = 8'(shrink[w]);
      for (int unsigned i = 0; i < MAX_DINV; i++)
        if (3'(i) < ndinv[w]) score[w] = score[w] + 8'(conf[w][i]);
      for (int unsigned i = 0; i < MAX_CINV; i++)
        if (2'(i) < ncinv[w]) begin
          score[w] = score[w] + 8'(conf[w][MAX_DINV+i]);
          if (conf[w][MAX_DINV+i] < conf_thresh) ok = 1'b0;
        end
      eligible[w] = ok;
    end
    sel_valid = 1'b0;
    sel_way   = '0;
    sel_score = '0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (eligible[w] && (!sel_valid || score[w] > sel_score)) begin
        sel_valid = 1'b1;
        sel_way   = $clog2(WAYS)'(w);
        sel_score = score[w];
      end
  end

endmodule
