// tb_scc_fetch_fsm: self-checking test of the fetch state machine.
// The testbench models the unoptimized lines, the line selection result, the optimized entry
// and the value predictor. It checks the source chosen for each fetch and the cycle at which
// each group is delivered: unoptimized streaming line by line, optimized streaming six
// micro-ops per cycle after the value-predictor check, fallback to the unoptimized lines when
// a data invariant no longer matches, decode on a miss (also part-way through a region), and
// the recovery rule: after an SCC-related squash of an optimized prediction source the next
// fetch of that region uses the unoptimized partition, while an unrelated squash changes
// nothing.
module tb_scc_fetch_fsm;
  import scc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready; region_t req_region;
  logic l_req; region_t l_region; logic [3:0] l_set = 4'd3; logic sel_valid = 0; logic [2:0] sel_way = 3'd5;
  logic [2:0] r_way; logic [SLOT_W-1:0] r_count; logic [2:0] r_ndinv; upc_t r_dinv_pc [MAX_DINV];
  data_t r_dinv_val [MAX_DINV]; upc_t r_next; cuop_t r_uops [REGION_UOPS];
  logic f_req; region_t f_region; logic [1:0] f_line; logic f_hit, f_last; logic [2:0] f_nuops;
  uop_t f_uops [LINE_UOPS];
  upc_t vpc_pc [MAX_DINV]; logic vpc_conf [MAX_DINV]; data_t vpc_val [MAX_DINV];
  logic dec_req, dec_done = 0; region_t dec_region;
  logic out_valid, out_opt; logic [2:0] out_cnt; cuop_t out_uops [LINE_UOPS]; logic [3:0] out_set;
  logic [2:0] out_way; logic done; upc_t done_next;
  logic sq_valid = 0, sq_from_opt = 0, sq_pred_src = 0, sq_scc_related = 0; region_t sq_region;
  logic ev_opt, ev_unopt, ev_decode, ev_vp_reject, ev_forced;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  scc_fetch_fsm #(.O_SETS(12), .WAYS(8)) dut (.*);

  // unoptimized lines present: {region, line} -> nuops (last line flagged)
  int unsigned ulines [logic [REGION_W+1:0]];
  data_t vp_now = 64'd77;
  always_comb begin
    f_hit = ulines.exists({f_region, f_line});
    f_nuops = f_hit ? 3'(ulines[{f_region, f_line}] % 8) : '0;
    f_last = f_hit && ulines[{f_region, f_line}] >= 8;
    for (int i = 0; i < LINE_UOPS; i++) begin
      f_uops[i] = '0; f_uops[i].imm = data_t'(f_line * 6 + i);
      f_uops[i].eor = f_hit && (ulines[{f_region, f_line}] >= 8) && (3'(i) == f_nuops - 1);
    end
    r_count = 5'd8; r_ndinv = 3'd2; r_next = '{region: 43'd99, slot: 5'd3};
    for (int i = 0; i < MAX_DINV; i++) begin
      r_dinv_pc[i] = '{region: 43'd1, slot: slot_t'(i)}; r_dinv_val[i] = 64'd77;
      vpc_conf[i] = 1'b1; vpc_val[i] = (vpc_pc[i].slot == 1) ? vp_now : 64'd77;
    end
    for (int i = 0; i < REGION_UOPS; i++) begin r_uops[i] = '0; r_uops[i].u.imm = data_t'(500 + i); end
  end

  task automatic chk(logic ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  // issue a fetch; record groups (cycle offset, count, opt) until done
  int g_cyc [8]; int g_cnt [8]; logic g_opt [8]; int ng; int dcyc; upc_t dnext;
  task automatic fetch(region_t r, int dec_latency = 3);
    int c;
    @(negedge clk); req_valid = 1; req_region = r;
    @(negedge clk); req_valid = 0;
    c = 1; ng = 0;
    while (1) begin
      #1;
      if (dec_req) begin repeat (dec_latency) begin @(negedge clk); c++; end dec_done = 1; #1; end
      if (out_valid && out_cnt != 0) begin g_cyc[ng] = c; g_cnt[ng] = out_cnt; g_opt[ng] = out_opt; ng++; end
      if (done) begin dcyc = c; dnext = done_next; @(negedge clk); dec_done = 0; break; end
      @(negedge clk); c++;
      if (c > 50) begin chk(0, "fetch hang"); break; end
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    ulines[{43'd1, 2'd0}] = 6;          // region 1: 6 + 3 micro-ops
    ulines[{43'd1, 2'd1}] = 8 + 3;
    ulines[{43'd2, 2'd0}] = 6;          // region 2: line 1 missing
    // 1: no optimized version -> unoptimized, lines at cycles 2 and 3
    fetch(43'd1);
    chk(ng == 2 && g_cyc[0] == 2 && g_cyc[1] == 3 && g_cnt[0] == 6 && g_cnt[1] == 3 && !g_opt[0],
        $sformatf("unopt stream ng=%0d c0=%0d", ng, g_cyc[0]));
    chk(dnext == '{region: 43'd2, slot: 0}, "unopt next");
    // 2: optimized version, invariants hold -> optimized, 6 + 2 at cycles 3 and 4
    sel_valid = 1;
    fetch(43'd1);
    chk(ng == 2 && g_opt[0] && g_opt[1] && g_cnt[0] == 6 && g_cnt[1] == 2 && g_cyc[0] == 3 &&
        g_cyc[1] == 4, $sformatf("opt stream ng=%0d c0=%0d", ng, g_cyc[0]));
    chk(dnext == '{region: 43'd99, slot: 5'd3} && out_set == 3 && out_way == 5, "opt next / id");
    // 3: a data invariant changed -> unoptimized
    vp_now = 64'd78;
    fetch(43'd1);
    chk(ng == 2 && !g_opt[0] && g_cyc[0] == 3, "vp reject -> unopt");
    vp_now = 64'd77;
    // 4: miss -> decode
    sel_valid = 0;
    fetch(43'd7);
    chk(ng == 0 && dcyc == 2 + 3, $sformatf("decode on miss %0d", dcyc));
    // 5: region 2 line 1 missing -> one line then decode
    fetch(43'd2);
    chk(ng == 1 && g_cnt[0] == 6 && dcyc == 4 + 3, $sformatf("decode part-way %0d", dcyc));
    // 6: recovery
    sel_valid = 1;
    @(negedge clk); sq_valid = 1; sq_region = 43'd1; sq_from_opt = 1; sq_pred_src = 1; sq_scc_related = 0;
    @(negedge clk); sq_valid = 0;
    fetch(43'd1);
    chk(ng == 2 && g_opt[0], "unrelated squash keeps optimized");
    @(negedge clk); sq_valid = 1; sq_scc_related = 1;
    @(negedge clk); sq_valid = 0;
    fetch(43'd1);
    chk(ng == 2 && !g_opt[0] && g_cnt[0] == 6, "forced unoptimized after squash");
    fetch(43'd1);
    chk(ng == 2 && g_opt[0], "optimized again afterwards");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
