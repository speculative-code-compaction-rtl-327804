// tb_scc_line_select: self-checking test of the optimized-partition line selection.
// Random hit vectors, shrinkages, invariant counts, confidence and hotness values are applied;
// the confidence threshold is random too (0..15). A reference written in the testbench applies
// the three filters (control confidence >= threshold, shrinkage >= 2, hotness >= 2) and picks the highest score (confidence sum plus shrinkage,
// lowest way on a tie). The selected way, its score and the eligibility vector are compared.
module tb_scc_line_select;
  import scc_pkg::*;
  localparam int WAYS = 8;
  logic [WAYS-1:0] hit, eligible; logic [SLOT_W-1:0] shrink [WAYS]; logic [2:0] ndinv [WAYS];
  logic [1:0] ncinv [WAYS]; conf_t conf [WAYS][NINV]; hot_t hot [WAYS];
  conf_t conf_thresh;
  logic sel_valid; logic [2:0] sel_way; logic [7:0] sel_score;
  int checks = 0, failures = 0, n_sel = 0, n_filtered = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  scc_line_select #(.WAYS(WAYS), .COMPACT_MIN(2), .HOT_THRESH(2)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int it = 0; it < 5000; it++) begin
      int best, bscore;
      logic [WAYS-1:0] el;
      conf_thresh = conf_t'((it % 4 == 0) ? $urandom_range(0, 15) : 4);
      for (int w = 0; w < WAYS; w++) begin
        hit[w] = $urandom_range(0, 1); shrink[w] = SLOT_W'($urandom_range(0, 12));
        ndinv[w] = 3'($urandom_range(0, 4)); ncinv[w] = 2'($urandom_range(0, 2));
        hot[w] = hot_t'($urandom_range(0, 15));
        for (int i = 0; i < NINV; i++) conf[w][i] = conf_t'($urandom_range(0, 15));
      end
      best = -1; bscore = -1;
      for (int w = 0; w < WAYS; w++) begin
        int sc; logic ok;
        ok = hit[w] && shrink[w] >= 2 && hot[w] >= 2;
        sc = shrink[w];
        for (int i = 0; i < ndinv[w]; i++) sc += conf[w][i];
        for (int i = 0; i < ncinv[w]; i++) begin sc += conf[w][4 + i]; if (conf[w][4 + i] < conf_thresh) ok = 0; end
        el[w] = ok;
        if (hit[w] && !ok) n_filtered++;
        if (ok && sc > bscore) begin best = w; bscore = sc; end
      end
      #1;
      checks++; if (eligible != el) failures++;
      checks++; if (sel_valid != (best >= 0)) failures++;
      if (best >= 0) begin
        n_sel++;
        checks++; if (sel_way != 3'(best) || sel_score != 8'(bscore)) begin
          failures++; $display("FAIL way %0d/%0d score %0d/%0d", sel_way, best, sel_score, bscore);
        end
      end
    end
    checks++; if (n_sel == 0 || n_filtered == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
