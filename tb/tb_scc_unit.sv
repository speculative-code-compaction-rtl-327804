// tb_scc_unit: self-checking test of the compaction engine.
// The testbench plays the unoptimized micro-op cache (a table of micro-ops by region/slot),
// the value predictor and the branch predictor. Each scenario writes a small micro-op
// sequence, starts a pass and compares the committed stream, its invariants, shrinkage,
// continuation point and the pass length in cycles (one micro-op per cycle plus two) with
// values worked out by hand:
//   1  load prediction source, constant folding, constant propagation, flag compare and
//      branch folding with a pivot, a second data invariant carrying three live-outs, a
//      control invariant with a pivot, a kept store, end of region, final live-out carrier;
//   2  self-looping branch inside a macro-instruction -> abort;
//   3  store whose known address lies in the region being compacted -> abort;
//   4  nothing removable -> discarded below the compaction threshold;
//   5  stop before a third branch, and a stream stopped by a cache miss;
//   6  more pending live-outs than fit on a prediction source -> abort.
module tb_scc_unit;
  import scc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  region_t start_region;
  logic idle, done, lock_set, lock_clr, rd_hit, vp_req, vp_conf, bp_req, bp_conf, bp_taken, commit;
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
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  uop_t  umem [upc_t];
  data_t vpv  [upc_t];
  logic  bpt  [upc_t];

  always_comb begin
    rd_hit  = umem.exists(rd_pc);
    rd_uop  = rd_hit ? umem[rd_pc] : '0;
    vp_conf = vpv.exists(vp_pc);
    vp_val  = vp_conf ? vpv[vp_pc] : '0;
    bp_conf = bpt.exists(bp_pc);
    bp_taken = bp_conf ? bpt[bp_pc] : 1'b0;
  end

  scc_unit dut (.*);

  task automatic chk(logic ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic upc_t pc(region_t r, int s);
    return '{region: r, slot: slot_t'(s)};
  endfunction

  function automatic uop_t mk(op_e op, int dst, int s1, int s2, logic i2, data_t imm, logic som = 1);
    uop_t x = '0;
    x.op = op; x.dst = reg_t'(dst); x.src1 = reg_t'(s1); x.src2 = reg_t'(s2);
    x.s2_imm = i2; x.imm = imm; x.som = som;
    return x;
  endfunction

  function automatic uop_t br(op_e op, cond_e c, int s1, int s2, upc_t t);
    uop_t x = mk(op, 0, s1, s2, 0, 0);
    x.cond = c; x.tgt = t;
    return x;
  endfunction

  logic [SLOT_W-1:0] s_count, s_shrink;
  logic [2:0] s_ndinv;
  logic [1:0] s_ncinv;
  upc_t s_dinv_pc [MAX_DINV];
  data_t s_dinv_val [MAX_DINV];
  upc_t s_next;
  cuop_t s_uops [REGION_UOPS];

  // run one pass; returns cycles from start to done, and whether it committed
  int cyc; logic committed; int n_abort, n_commit, n_discard, n_fold, n_prop, n_dinv, n_cinv, n_brfold, n_lo;
  task automatic run(region_t r);
    @(negedge clk);
    start = 1; start_region = r;
    @(negedge clk); start = 0;
    cyc = 1; committed = 0;
    while (!done) begin
      @(negedge clk); cyc++;
      if (cyc > 100) break;
    end
    committed = commit;
    s_count = c_count; s_shrink = c_shrink; s_ndinv = c_ndinv; s_ncinv = c_ncinv;
    s_dinv_pc = c_dinv_pc; s_dinv_val = c_dinv_val; s_next = c_next; s_uops = c_uops;
    @(negedge clk);
  endtask

  always @(posedge clk) begin
    if (ev.aborted) n_abort++;
    if (ev.commit) n_commit++;
    if (ev.discard) n_discard++;
    if (ev.fold) n_fold++;
    if (ev.prop) n_prop++;
    if (ev.dinv) n_dinv++;
    if (ev.cinv) n_cinv++;
    if (ev.brfold) n_brfold++;
    if (ev.liveout) n_lo++;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    region_t R;
    uop_t x;
    n_abort = 0; n_commit = 0; n_discard = 0; n_fold = 0; n_prop = 0; n_dinv = 0; n_cinv = 0;
    n_brfold = 0; n_lo = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---------------- scenario 1 ----------------
    R = 43'h1000;
    umem[pc(R, 0)]  = mk(OP_LOAD, 1, 2, 0, 0, 0);          // t1 <- [r2]      VP: 10
    vpv[pc(R, 0)]   = 64'd10;
    umem[pc(R, 1)]  = mk(OP_ADD, 3, 1, 0, 1, 2);           // t2(r3) <- t1 + 2   fold = 12
    umem[pc(R, 2)]  = mk(OP_ADD, 4, 3, 5, 0, 0);           // r4 <- r3 + r5      prop r3=12
    umem[pc(R, 3)]  = mk(OP_MOV, 6, 0, 0, 1, 7);           // r6 <- 7            fold
    umem[pc(R, 4)]  = mk(OP_CMP, 0, 6, 0, 1, 7);           // flags <- r6 ? 7    fold
    umem[pc(R, 5)]  = br(OP_JCC, CC_EQ, 0, 0, pc(R, 8));   // taken -> slot 8    fold
    umem[pc(R, 6)]  = mk(OP_ADD, 6, 6, 0, 1, 1);           // skipped
    umem[pc(R, 7)]  = mk(OP_ADD, 6, 6, 0, 1, 1);           // skipped
    umem[pc(R, 8)]  = mk(OP_LOAD, 7, 2, 0, 0, 8);          // r7 <- [r2+8]  VP: 5, live-outs r3,r6,flags
    vpv[pc(R, 8)]   = 64'd5;
    umem[pc(R, 9)]  = br(OP_BR, CC_NE, 7, 9, pc(R, 11));   // r9 unknown, BP: taken
    bpt[pc(R, 9)]   = 1'b1;
    umem[pc(R, 10)] = mk(OP_ADD, 8, 8, 0, 1, 100);         // skipped
    umem[pc(R, 11)] = mk(OP_ADD, 8, 7, 0, 1, 1);           // r8 <- r7 + 1 = 6   fold
    umem[pc(R, 12)] = mk(OP_STORE, 0, 1, 8, 0, 0);         // [r1] <- r8, r1 unknown: kept
    x = mk(OP_NOP, 0, 0, 0, 0, 0); x.eor = 1;
    umem[pc(R, 13)] = x;                                    // end of region
    run(R);
    chk(committed, "s1 commit");
    chk(cyc == 11 + 2, $sformatf("s1 cycles %0d", cyc));
    chk(s_count == 6, $sformatf("s1 count %0d", s_count));
    chk(s_shrink == 5, $sformatf("s1 shrink %0d", s_shrink));
    chk(s_ndinv == 2 && s_ncinv == 1, "s1 invariants");
    chk(s_dinv_pc[0] == pc(R, 0) && s_dinv_val[0] == 10, "s1 dinv0");
    chk(s_dinv_pc[1] == pc(R, 8) && s_dinv_val[1] == 5, "s1 dinv1");
    chk(s_next == pc(R + 1, 0), "s1 next");
    chk(s_uops[0].u.op == OP_LOAD && s_uops[0].pred_src && s_uops[0].inv_idx == 0 &&
        s_uops[0].lo_cnt == 0 && s_uops[0].pv == 10, "s1 u0");
    chk(s_uops[1].u.op == OP_ADD && s_uops[1].u.s1_imm && s_uops[1].u.imm == 12 &&
        !s_uops[1].u.s2_imm && s_uops[1].u.src2 == 5 && !s_uops[1].pred_src, "s1 u1 prop");
    chk(s_uops[2].u.op == OP_LOAD && s_uops[2].pred_src && s_uops[2].inv_idx == 1 &&
        s_uops[2].lo_cnt == 3, "s1 u2");
    chk(s_uops[2].lo[0].idx == 3 && s_uops[2].lo[0].val == 12 &&
        s_uops[2].lo[1].idx == 6 && s_uops[2].lo[1].val == 7 &&
        s_uops[2].lo[2].idx == ctx_t'(FLAGS_IDX) && s_uops[2].lo[2].val == 64'b0100, "s1 u2 liveouts");
    chk(s_uops[3].u.op == OP_BR && s_uops[3].pred_src && s_uops[3].inv_idx == 4 &&
        s_uops[3].pred_taken && s_uops[3].lo_cnt == 0, "s1 u3");
    chk(s_uops[4].u.op == OP_STORE && !s_uops[4].pred_src, "s1 u4");
    chk(s_uops[5].u.op == OP_LIVEOUT && s_uops[5].lo_cnt == 1 && s_uops[5].lo[0].idx == 8 &&
        s_uops[5].lo[0].val == 6, "s1 carrier");

    // ---------------- scenario 2: self-looping macro-instruction ----------------
    R = 43'h2000;
    umem[pc(R, 0)] = mk(OP_MOV, 1, 0, 0, 1, 3);
    umem[pc(R, 1)] = mk(OP_SUB, 1, 1, 0, 1, 1);                       // som
    x = br(OP_BR, CC_NE, 1, 0, pc(R, 1)); x.som = 0;                    // back to slot 1
    umem[pc(R, 2)] = x;
    x = mk(OP_NOP, 0, 0, 0, 0, 0); x.eor = 1; umem[pc(R, 3)] = x;
    run(R);
    chk(!committed && n_abort == 1, "s2 abort");

    // ---------------- scenario 3: self-modifying store ----------------
    R = 43'h3000;
    umem[pc(R, 0)] = mk(OP_MOV, 1, 0, 0, 1, data_t'({R, 5'd4}));     // address inside R
    umem[pc(R, 1)] = mk(OP_MOV, 2, 0, 0, 1, 9);
    umem[pc(R, 2)] = mk(OP_STORE, 0, 1, 2, 0, 0);
    x = mk(OP_NOP, 0, 0, 0, 0, 0); x.eor = 1; umem[pc(R, 3)] = x;
    run(R);
    chk(!committed && n_abort == 2, "s3 abort");
    // same store to another region is kept and the pass commits
    umem[pc(R, 0)] = mk(OP_MOV, 1, 0, 0, 1, data_t'({R + 1, 5'd4}));
    run(R);
    chk(committed && n_abort == 2 && s_count == 2, $sformatf("s3b commit count=%0d", s_count));

    // ---------------- scenario 4: nothing to remove ----------------
    R = 43'h4000;
    umem[pc(R, 0)] = mk(OP_LOAD, 1, 2, 0, 0, 0);
    x = mk(OP_MUL, 3, 1, 4, 0, 0); x.eor = 1; umem[pc(R, 1)] = x;
    run(R);
    chk(!committed && n_discard == 1, "s4 discard");
    chk(cyc == 2 + 2, $sformatf("s4 cycles %0d", cyc));

    // ---------------- scenario 5: third branch, and miss ----------------
    R = 43'h5000;
    umem[pc(R, 0)] = mk(OP_MOV, 1, 0, 0, 1, 1);
    umem[pc(R, 1)] = br(OP_BR, CC_EQ, 1, 0, pc(R, 5));     // r0 unknown; BP not taken
    bpt[pc(R, 1)]  = 1'b0;
    umem[pc(R, 2)] = br(OP_JMP, CC_EQ, 0, 0, pc(R, 4));    // folded
    umem[pc(R, 4)] = mk(OP_MOV, 2, 0, 0, 1, 2);
    umem[pc(R, 5)] = br(OP_JMP, CC_EQ, 0, 0, pc(R, 0));    // third branch: stop before it
    run(R);
    chk(committed && s_next == pc(R, 5), "s5 stop at third branch");
    chk(s_ncinv == 1 && s_count == 2 && s_uops[0].u.op == OP_BR && !s_uops[0].pred_taken &&
        s_uops[0].lo_cnt == 1, "s5 stream");
    chk(cyc == 5 + 2, $sformatf("s5 cycles %0d", cyc));
    R = 43'h5100;
    umem[pc(R, 0)] = mk(OP_MOV, 1, 0, 0, 1, 1);
    umem[pc(R, 1)] = mk(OP_MOV, 2, 0, 0, 1, 1);
    umem[pc(R, 2)] = mk(OP_MOV, 3, 0, 0, 1, 1);
    run(R);                                                // slot 3 missing
    chk(committed && s_next == pc(R, 3) && s_count == 1 && s_uops[0].lo_cnt == 3, "s5 miss");

    // ---------------- scenario 6: live-out overflow ----------------
    R = 43'h6000;
    for (int i = 0; i < 5; i++) umem[pc(R, i)] = mk(OP_MOV, 10 + i, 0, 0, 1, data_t'(i));
    umem[pc(R, 5)] = mk(OP_LOAD, 20, 2, 0, 0, 0);
    vpv[pc(R, 5)] = 64'd1;
    x = mk(OP_NOP, 0, 0, 0, 0, 0); x.eor = 1; umem[pc(R, 6)] = x;
    run(R);
    chk(!committed && n_abort == 3, "s6 abort");

    chk(n_fold > 0 && n_prop > 0 && n_dinv > 0 && n_cinv > 0 && n_brfold > 0 && n_lo > 0,
        "all mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
