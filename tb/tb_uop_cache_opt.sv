// tb_uop_cache_opt: self-checking test of the optimized micro-op cache partition.
// Writes several compacted versions of the same region and of other regions into one set and
// checks: every version hits on lookup with its own shrinkage and invariant counts, the
// read-out of a chosen way, confidence counters starting at 8 and saturating at 0 and 15 under
// validation updates, hotness decaying to zero every 3 cycles and rising on lookup hits, and
// replacement of the coldest way when the set is full.
module tb_uop_cache_opt;
  import scc_pkg::*;
  localparam int SETS = 12, WAYS = 8;
  logic clk = 0, rst_n = 0;
  logic w_valid = 0; region_t w_region; logic [SLOT_W-1:0] w_count, w_shrink; logic [2:0] w_ndinv;
  logic [1:0] w_ncinv; upc_t w_dinv_pc [MAX_DINV]; data_t w_dinv_val [MAX_DINV]; upc_t w_next;
  cuop_t w_uops [REGION_UOPS]; logic [3:0] w_set; logic [2:0] w_way;
  logic l_req = 0; region_t l_region; logic [WAYS-1:0] l_hit; logic [SLOT_W-1:0] l_shrink [WAYS];
  logic [2:0] l_ndinv [WAYS]; logic [1:0] l_ncinv [WAYS]; conf_t l_conf [WAYS][NINV];
  hot_t l_hot [WAYS]; logic [3:0] l_set;
  logic [2:0] r_way; logic [SLOT_W-1:0] r_count; logic [2:0] r_ndinv; upc_t r_dinv_pc [MAX_DINV];
  data_t r_dinv_val [MAX_DINV]; upc_t r_next; cuop_t r_uops [REGION_UOPS];
  logic a_req = 0;
  logic upd_valid = 0; logic [3:0] upd_set; logic [2:0] upd_way; logic [2:0] upd_inv; logic upd_correct;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  uop_cache_opt #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  task automatic chk(logic ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  int last_way;
  task automatic write(region_t r, int shrink, int tagv);
    @(negedge clk);
    w_valid = 1; w_region = r; w_count = SLOT_W'(3); w_shrink = SLOT_W'(shrink);
    w_ndinv = 3'd2; w_ncinv = 2'd1; w_next = '{region: r + 1, slot: 0};
    foreach (w_dinv_pc[i]) begin w_dinv_pc[i] = '{region: r, slot: slot_t'(i)}; w_dinv_val[i] = data_t'(tagv + i); end
    foreach (w_uops[i]) begin w_uops[i] = '0; w_uops[i].u.imm = data_t'(tagv * 100 + i); end
    #1 last_way = int'(w_way);
    @(negedge clk); w_valid = 0;
  endtask

  task automatic upd(int way, int inv, logic ok, int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); upd_valid = 1; upd_set = 4'd5; upd_way = 3'(way); upd_inv = 3'(inv); upd_correct = ok;
    end
    @(negedge clk); upd_valid = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int w0, w1;
    repeat (2) @(negedge clk); rst_n = 1;
    write(43'd5, 4, 1); w0 = last_way;
    write(43'd5, 7, 2); w1 = last_way;
    chk(w0 != w1, "two versions in different ways");
    l_region = 43'd5; #1;
    chk(l_set == 5 && l_hit[w0] && l_hit[w1] && $countones(l_hit) == 2, "both versions hit");
    chk(l_shrink[w0] == 4 && l_shrink[w1] == 7 && l_ndinv[w1] == 2 && l_ncinv[w1] == 1, "tag fields");
    chk(l_conf[w0][0] == 8 && l_conf[w1][4] == 8, "confidence starts at 8");
    r_way = 3'(w1); #1;
    chk(r_count == 3 && r_uops[2].u.imm == 202 && r_dinv_val[1] == 3 && r_next.region == 6, "read-out");
    l_region = 43'd17; #1; chk(l_set == 5 && l_hit == '0, "other region misses");
    // confidence
    upd(w1, 4, 1, 3); l_region = 43'd5; #1; chk(l_conf[w1][4] == 11, "conf +3");
    upd(w1, 4, 1, 10); #1; chk(l_conf[w1][4] == 15, "conf saturates high");
    upd(w0, 1, 0, 12); #1; chk(l_conf[w0][1] == 0 && l_conf[w0][0] == 8, "conf saturates low");
    // decay
    repeat (20) @(negedge clk); #1;
    chk(l_hot[w0] == 0 && l_hot[w1] == 0, "hotness decayed");
    @(negedge clk); l_req = 1; repeat (12) @(negedge clk); l_req = 0; #1;
    chk(l_hot[w0] >= 6 && l_hot[w1] >= 6, $sformatf("hotness rises on hits %0d", l_hot[w0]));
    // fill the set; the next write replaces a cold way, not the hot versions of region 5
    for (int k = 0; k < 6; k++) write(region_t'(17 + 12 * k), 3, 10 + k);
    write(region_t'(200 * 12 + 5), 5, 50);
    l_region = 43'd5; #1;
    chk(l_hit[w0] && l_hit[w1], "hot versions kept");
    l_region = region_t'(2405); #1; chk($countones(l_hit) == 1, "new version written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
