// tb_scc_unit_constw: constant-width study for the compaction engine.
// Three compaction units, built with CONST_W = 8, 16 and 64 bits, compact the same region in
// parallel. The testbench plays the unoptimized micro-op cache and the value predictor (no
// branches are used). The region creates constants of 7, 11, 12 and 17 significant bits, so
// each width folds a different part of it:
//   slot 0  r1 <- 100                 fits all widths: folded everywhere
//   slot 1  r2 <- 1000                needs 11 bits: kept at 8, folded at 16 and 64
//   slot 2  r3 <- r1 + r2             8: kept with r1 = 100 propagated; 16/64: folded (1100)
//   slot 3  r4 <- load [r5]  VP 300   8: predicted value too wide, kept as a plain load;
//                                     16/64: data invariant carrying r1, r2, r3 as live-outs
//   slot 4  r6 <- r4 + 1              8: kept; 16/64: folded (301)
//   slot 5  r7 <- 100000              needs 18 bits: kept at 8 and 16, folded at 64
//   slot 6  nop, end of region
// Expected outcome (worked out by hand from the rules above): at 8 bits 6 micro-ops remain
// (shrinkage 1, discarded); at 16 bits 3 remain (load, mov, live-out carrier; committed); at
// 64 bits 2 remain (load, carrier with r6 and r7; committed). Every pass takes 7 + 2 cycles.
// A watchdog ends the run after 2000 cycles.
module tb_scc_unit_constw;
  import scc_pkg::*;
  localparam int NW = 3;
  localparam int WIDTHS [NW] = '{8, 16, 64};

  logic clk = 0, rst_n = 0, start = 0;
  region_t start_region;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  uop_t  umem [upc_t];
  data_t vpv  [upc_t];

  task automatic chk(logic ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic upc_t pc(region_t r, int s);
    return '{region: r, slot: slot_t'(s)};
  endfunction

  function automatic uop_t mk(op_e op, int dst, int s1, int s2, logic i2, data_t imm);
    uop_t x = '0;
    x.op = op; x.dst = reg_t'(dst); x.src1 = reg_t'(s1); x.src2 = reg_t'(s2);
    x.s2_imm = i2; x.imm = imm; x.som = 1'b1;
    return x;
  endfunction

  // one compaction unit per width, each with its own view of the shared micro-op table
  for (genvar g = 0; g < NW; g++) begin : gw
    logic idle, done, lock_set, lock_clr, rd_hit, vp_req, vp_conf, bp_req, bp_conf, bp_taken;
    logic commit;
    region_t lock_region, c_region;
    upc_t rd_pc, vp_pc, bp_pc, c_next;
    uop_t rd_uop;
    data_t vp_val;
    logic [SLOT_W-1:0] c_count, c_shrink;
    logic [2:0] c_ndinv;
    logic [1:0] c_ncinv;
    upc_t c_dinv_pc [MAX_DINV];
    data_t c_dinv_val [MAX_DINV];
    cuop_t c_uops [REGION_UOPS];
    scc_events_t ev;

    always_comb begin
      rd_hit   = umem.exists(rd_pc);
      rd_uop   = rd_hit ? umem[rd_pc] : '0;
      vp_conf  = vpv.exists(vp_pc);
      vp_val   = vp_conf ? vpv[vp_pc] : '0;
      bp_conf  = 1'b0;
      bp_taken = 1'b0;
    end

    scc_unit #(.CONST_W(WIDTHS[g])) dut (
      .clk, .rst_n, .start, .start_region, .idle, .done,
      .lock_set, .lock_clr, .lock_region, .rd_pc, .rd_hit, .rd_uop,
      .vp_req, .vp_pc, .vp_conf, .vp_val, .bp_req, .bp_pc, .bp_conf, .bp_taken,
      .commit, .c_region, .c_count, .c_shrink, .c_ndinv, .c_ncinv, .c_dinv_pc, .c_dinv_val,
      .c_next, .c_uops, .ev
    );

    // snapshot of the result in the cycle `done` is high
    logic s_done, s_commit;
    int   s_cyc, cyc, n_fold, n_prop, n_dinv;
    logic [SLOT_W-1:0] s_count, s_shrink;
    logic [2:0] s_ndinv;
    cuop_t s_uops [REGION_UOPS];

    always @(posedge clk) begin
      if (start) begin
        cyc <= 1; s_done <= 1'b0; n_fold <= 0; n_prop <= 0; n_dinv <= 0;
      end else begin
        cyc <= cyc + 1;
        if (ev.fold) n_fold <= n_fold + 1;
        if (ev.prop) n_prop <= n_prop + 1;
        if (ev.dinv) n_dinv <= n_dinv + 1;
        if (done && !s_done) begin
          s_done <= 1'b1; s_cyc <= cyc; s_commit <= commit;
          s_count <= c_count; s_shrink <= c_shrink; s_ndinv <= c_ndinv; s_uops <= c_uops;
        end
      end
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    region_t R;
    uop_t x;
    R = 43'h2345;
    umem[pc(R, 0)] = mk(OP_MOV, 1, 0, 0, 1, 64'd100);
    umem[pc(R, 1)] = mk(OP_MOV, 2, 0, 0, 1, 64'd1000);
    umem[pc(R, 2)] = mk(OP_ADD, 3, 1, 2, 0, 0);
    umem[pc(R, 3)] = mk(OP_LOAD, 4, 5, 0, 0, 0);
    vpv[pc(R, 3)]  = 64'd300;
    umem[pc(R, 4)] = mk(OP_ADD, 6, 4, 0, 1, 1);
    umem[pc(R, 5)] = mk(OP_MOV, 7, 0, 0, 1, 64'd100000);
    x = mk(OP_NOP, 0, 0, 0, 0, 0); x.eor = 1'b1;
    umem[pc(R, 6)] = x;

    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; start_region = R;
    @(negedge clk);
    start = 0;
    repeat (20) @(negedge clk);

    chk(gw[0].s_done && gw[1].s_done && gw[2].s_done, "all passes finished");
    chk(gw[0].s_cyc == 9 && gw[1].s_cyc == 9 && gw[2].s_cyc == 9, "pass length n+2");

    // 8-bit constants
    chk(!gw[0].s_commit && gw[0].s_count == 6 && gw[0].s_shrink == 1, "w8: discarded, 6 kept");
    chk(gw[0].s_uops[0].u.op == OP_MOV && gw[0].s_uops[0].u.imm == 1000, "w8: wide mov kept");
    chk(gw[0].s_uops[1].u.op == OP_ADD && gw[0].s_uops[1].u.s1_imm &&
        gw[0].s_uops[1].u.imm == 100, "w8: r1 propagated");
    chk(gw[0].s_uops[2].u.op == OP_LOAD && !gw[0].s_uops[2].pred_src, "w8: wide prediction unused");
    chk(gw[0].s_uops[3].u.op == OP_ADD && !gw[0].s_uops[3].u.s1_imm, "w8: dependent add kept");
    chk(gw[0].s_uops[5].u.op == OP_LIVEOUT && gw[0].s_uops[5].lo_cnt == 1 &&
        gw[0].s_uops[5].lo[0].idx == 1 && gw[0].s_uops[5].lo[0].val == 100, "w8: carrier r1");
    chk(gw[0].n_fold == 1 && gw[0].n_prop == 1 && gw[0].n_dinv == 0, "w8: event counts");

    // 16-bit constants
    chk(gw[1].s_commit && gw[1].s_count == 3 && gw[1].s_shrink == 4 && gw[1].s_ndinv == 1,
        "w16: committed, 3 kept");
    chk(gw[1].s_uops[0].u.op == OP_LOAD && gw[1].s_uops[0].pred_src &&
        gw[1].s_uops[0].pv == 300 && gw[1].s_uops[0].lo_cnt == 3 &&
        gw[1].s_uops[0].lo[2].val == 1100, "w16: invariant with live-outs");
    chk(gw[1].s_uops[1].u.op == OP_MOV && gw[1].s_uops[1].u.imm == 100000, "w16: wide mov kept");
    chk(gw[1].s_uops[2].u.op == OP_LIVEOUT && gw[1].s_uops[2].lo_cnt == 1 &&
        gw[1].s_uops[2].lo[0].val == 301, "w16: carrier r6");
    chk(gw[1].n_fold == 4 && gw[1].n_dinv == 1, "w16: event counts");

    // unrestricted (64-bit) constants
    chk(gw[2].s_commit && gw[2].s_count == 2 && gw[2].s_shrink == 5, "w64: committed, 2 kept");
    chk(gw[2].s_uops[1].u.op == OP_LIVEOUT && gw[2].s_uops[1].lo_cnt == 2 &&
        gw[2].s_uops[1].lo[0].val == 301 && gw[2].s_uops[1].lo[1].idx == 7 &&
        gw[2].s_uops[1].lo[1].val == 100000, "w64: carrier r6, r7");
    chk(gw[2].n_fold == 5 && gw[2].n_dinv == 1, "w64: event counts");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
