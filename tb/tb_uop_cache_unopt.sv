// tb_uop_cache_unopt: self-checking test of the unoptimized micro-op cache partition.
// Checks line fill and read-back through the fetch port and the compaction (slot) port, misses,
// the end-of-region flag, the compaction request raised on the access that makes line 0 reach
// the hotness threshold, hotness decay every 28 cycles, hotness-based replacement that skips
// locked lines, and a fill dropped when every way of the set is locked.
module tb_uop_cache_unopt;
  import scc_pkg::*;
  localparam int SETS = 36, WAYS = 8, THR = 8, DECAY = 28;
  logic clk = 0, rst_n = 0;
  logic fill_valid = 0; region_t fill_region; logic [1:0] fill_line; logic [2:0] fill_nuops;
  uop_t fill_uops [LINE_UOPS];
  logic f_req = 0; region_t f_region; logic [1:0] f_line; logic f_hit, f_last; logic [2:0] f_nuops;
  uop_t f_uops [LINE_UOPS];
  upc_t s_pc; logic s_hit; uop_t s_uop;
  logic lock_set = 0, lock_clr = 0; region_t lock_region;
  logic req_valid, fill_dropped; region_t req_region;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  uop_cache_unopt #(.SETS(SETS), .WAYS(WAYS), .DECAY_PERIOD(DECAY), .HOT_THRESH(THR)) dut (.*);

  task automatic chk(logic ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic data_t tagval(region_t r, int slot);
    return data_t'(r) * 100 + data_t'(slot);
  endfunction

  task automatic fill(region_t r, int ln, int n, logic last);
    @(negedge clk);
    fill_valid = 1; fill_region = r; fill_line = 2'(ln); fill_nuops = 3'(n);
    foreach (fill_uops[i]) begin
      fill_uops[i] = '0; fill_uops[i].op = OP_ADD; fill_uops[i].imm = tagval(r, ln * 6 + i);
      fill_uops[i].eor = last && (i == n - 1);
    end
    @(negedge clk); fill_valid = 0;
  endtask

  // one fetch access; returns whether a request was raised
  task automatic access(region_t r, int ln, output logic rq);
    @(negedge clk);
    f_req = 1; f_region = r; f_line = 2'(ln); #1;
    rq = req_valid;
    @(negedge clk); f_req = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic rq; int nacc;
    repeat (2) @(negedge clk); rst_n = 1;
    // region 5: lines 0 and 1 (line 1 holds 3 micro-ops and ends the region)
    fill(43'd5, 0, 6, 0);
    fill(43'd5, 1, 3, 1);
    f_region = 43'd5; f_line = 2'd1; #1;
    chk(f_hit && f_nuops == 3 && f_last && f_uops[2].imm == tagval(5, 8), "fetch line 1");
    f_line = 2'd0; #1;
    chk(f_hit && !f_last && f_uops[5].imm == tagval(5, 5), "fetch line 0");
    f_line = 2'd2; #1; chk(!f_hit, "fetch miss line 2");
    for (int s = 0; s < 12; s++) begin
      s_pc = '{region: 43'd5, slot: slot_t'(s)}; #1;
      chk(s_hit == (s < 9) && (!s_hit || s_uop.imm == tagval(5, s)), $sformatf("slot %0d", s));
    end
    s_pc = '{region: 43'd41, slot: 0}; #1; chk(!s_hit, "other region same set misses");
    // hotness request on the 8th access
    nacc = 0;
    do begin access(43'd5, 0, rq); nacc++; end while (!rq && nacc < 20);
    chk(nacc == THR, $sformatf("request after %0d accesses", nacc));
    chk(req_region == 43'd5, "request region");
    access(43'd5, 0, rq); chk(!rq, "single request");
    // decay: after 9 * 28 cycles the line is cold again
    repeat (10 * DECAY) @(negedge clk);
    nacc = 0;
    do begin access(43'd5, 0, rq); nacc++; end while (!rq && nacc < 20);
    chk(nacc == THR || nacc == THR + 1, $sformatf("request after decay %0d", nacc)); // one decay may fall inside
    // replacement in set 0: regions 0,36,...,252
    for (int k = 0; k < WAYS; k++) fill(region_t'(36 * k), 0, 6, 1);
    for (int k = 0; k < 3; k++) access(43'd0, 0, rq);       // region 0 warm
    @(negedge clk); lock_set = 1; lock_region = 43'd36; @(negedge clk); lock_set = 0;
    fill(region_t'(36 * 8), 0, 6, 1);                       // victim: region 72 (cold, unlocked)
    s_pc = '{region: 43'd72, slot: 0}; #1; chk(!s_hit, "72 evicted");
    s_pc = '{region: 43'd36, slot: 0}; #1; chk(s_hit, "locked 36 kept");
    s_pc = '{region: 43'd0, slot: 0}; #1; chk(s_hit, "hot 0 kept");
    s_pc = '{region: region_t'(288), slot: 0}; #1; chk(s_hit, "new filled");
    // lock every resident region: next fill is dropped
    for (int k = 0; k < 9; k++) begin
      @(negedge clk); lock_set = 1; lock_region = region_t'(36 * k); @(negedge clk); lock_set = 0;
    end
    @(negedge clk);
    fill_valid = 1; fill_region = region_t'(36 * 20); fill_line = 0; fill_nuops = 1; #1;
    chk(fill_dropped, "fill dropped when all locked");
    @(negedge clk); fill_valid = 0;
    @(negedge clk); lock_clr = 1; @(negedge clk); lock_clr = 0;
    fill(region_t'(36 * 20), 0, 1, 1);
    s_pc = '{region: region_t'(720), slot: 0}; #1; chk(s_hit, "fill after unlock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
