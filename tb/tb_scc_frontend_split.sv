// tb_scc_frontend_split: the end-to-end scenario of tb_scc_frontend run with the micro-op
// cache split the other way round: 12 unoptimized and 36 optimized sets of 8 ways (the main
// configuration is 36 unoptimized / 12 optimized; the 24/24 split lies between the two and is
// obtained by changing US/OS below). Only the partition sizes differ; the program, the
// predictors, the back-end model, the expected optimized stream and the mechanism counts are
// the same as in the default-size test. The scenario, as there:
// The testbench plays the rest of the processor: a fetch driver that walks a small program of
// three 32-byte regions, the legacy decoder (fills a region's lines on a miss), a value
// predictor and a branch predictor (tables), and a back end that validates every prediction
// source delivered from the optimized partition against the true values, sends confidence
// updates and squashes a mispredicted optimized stream.
//   region A: hot kernel with a predictable load, foldable arithmetic, a foldable compare and
//             branch, a second predictable load and a predictable branch (14 micro-ops that
//             compact to 6);
//   region B: a store into its own code region (compaction aborted);
//   region C: nothing removable (compaction discarded).
// Phase 1: A becomes hot, is compacted and streamed from the optimized partition.
// Phase 2: the loaded value changes: the optimized stream mispredicts, is squashed and the
// region is refetched from the unoptimized partition; once the value predictor has learned the
// new value the stale version fails the fetch-time check, A is compacted again and the new
// version, co-hosted with the old one, is streamed.
// Phase 3: idle cycles until the misprediction threshold has risen after the epoch with the
// misprediction and fallen after a quiet one.
// Each mechanism is counted and must occur; the delivered optimized stream and its length are
// checked, and the number of micro-ops delivered for A must shrink.
module tb_scc_frontend_split;
  import scc_pkg::*;
  localparam int unsigned US = 12, OS = 36;   // unoptimized / optimized sets
  localparam region_t RA = 43'h100, RB = 43'h101, RC = 43'h102;

  logic clk = 0, rst_n = 0;
  logic fetch_valid = 0, fetch_ready; region_t fetch_region;
  logic out_valid, out_opt; logic [2:0] out_cnt; cuop_t out_uops [LINE_UOPS];
  logic [$clog2(OS)-1:0] out_set; logic [2:0] out_way; logic fetch_done; upc_t fetch_next;
  logic dec_req, dec_done = 0; region_t dec_region;
  logic fill_valid = 0; region_t fill_region; logic [1:0] fill_line; logic [2:0] fill_nuops;
  uop_t fill_uops [LINE_UOPS];
  logic vp_req; upc_t vp_pc; logic vp_conf; data_t vp_val;
  upc_t vpc_pc [MAX_DINV]; logic vpc_conf [MAX_DINV]; data_t vpc_val [MAX_DINV];
  logic bp_req; upc_t bp_pc; logic bp_conf, bp_taken;
  logic upd_valid = 0; logic [$clog2(OS)-1:0] upd_set; logic [2:0] upd_way; logic [2:0] upd_inv; logic upd_correct;
  logic sq_valid = 0; region_t sq_region; logic sq_from_opt, sq_pred_src, sq_scc_related;
  scc_events_t scc_ev; logic scc_busy, rq_dropped, ev_opt, ev_unopt, ev_decode, ev_vp_reject, ev_forced;
  conf_t conf_thresh; logic ev_thr_up, ev_thr_down;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  scc_frontend #(.U_SETS(US), .O_SETS(OS)) dut (.*);

  // ---------------- program, predictors, truth ----------------
  uop_t  prog [upc_t];
  data_t vpt  [upc_t];          // value predictor: confident predictions
  logic  bpt  [upc_t];          // branch predictor: confident predictions
  data_t truth_val [upc_t];     // actual values of predicted micro-ops
  logic  truth_dir [upc_t];

  function automatic upc_t pc(region_t r, int s);
    return '{region: r, slot: slot_t'(s)};
  endfunction
  function automatic uop_t mk(op_e op, int dst, int s1, int s2, logic i2, data_t imm);
    uop_t x = '0;
    x.op = op; x.dst = reg_t'(dst); x.src1 = reg_t'(s1); x.src2 = reg_t'(s2);
    x.s2_imm = i2; x.imm = imm; x.som = 1;
    return x;
  endfunction
  function automatic uop_t br(op_e op, cond_e c, int s1, int s2, upc_t t);
    uop_t x = mk(op, 0, s1, s2, 0, 0);
    x.cond = c; x.tgt = t;
    return x;
  endfunction

  int nslots [region_t];
  task automatic build_program();
    uop_t x;
    prog[pc(RA, 0)]  = mk(OP_LOAD, 1, 2, 0, 0, 0);
    prog[pc(RA, 1)]  = mk(OP_ADD, 3, 1, 0, 1, 2);
    prog[pc(RA, 2)]  = mk(OP_ADD, 4, 3, 5, 0, 0);
    prog[pc(RA, 3)]  = mk(OP_MOV, 6, 0, 0, 1, 7);
    prog[pc(RA, 4)]  = mk(OP_CMP, 0, 6, 0, 1, 7);
    prog[pc(RA, 5)]  = br(OP_JCC, CC_EQ, 0, 0, pc(RA, 8));
    prog[pc(RA, 6)]  = mk(OP_ADD, 6, 6, 0, 1, 1);
    prog[pc(RA, 7)]  = mk(OP_ADD, 6, 6, 0, 1, 1);
    prog[pc(RA, 8)]  = mk(OP_LOAD, 7, 2, 0, 0, 8);
    prog[pc(RA, 9)]  = br(OP_BR, CC_NE, 7, 9, pc(RA, 11));
    prog[pc(RA, 10)] = mk(OP_ADD, 8, 8, 0, 1, 100);
    prog[pc(RA, 11)] = mk(OP_ADD, 8, 7, 0, 1, 1);
    prog[pc(RA, 12)] = mk(OP_STORE, 0, 1, 8, 0, 0);
    x = mk(OP_NOP, 0, 0, 0, 0, 0); x.eor = 1;
    prog[pc(RA, 13)] = x;
    nslots[RA] = 14;
    vpt[pc(RA, 0)] = 10; truth_val[pc(RA, 0)] = 10;
    vpt[pc(RA, 8)] = 5;  truth_val[pc(RA, 8)] = 5;
    bpt[pc(RA, 9)] = 1;  truth_dir[pc(RA, 9)] = 1;
    prog[pc(RB, 0)] = mk(OP_MOV, 1, 0, 0, 1, data_t'({RB, 5'd8}));
    prog[pc(RB, 1)] = mk(OP_MOV, 2, 0, 0, 1, 3);
    prog[pc(RB, 2)] = mk(OP_STORE, 0, 1, 2, 0, 0);
    x = mk(OP_NOP, 0, 0, 0, 0, 0); x.eor = 1;
    prog[pc(RB, 3)] = x;
    nslots[RB] = 4;
    prog[pc(RC, 0)] = mk(OP_LOAD, 1, 2, 0, 0, 0);
    prog[pc(RC, 1)] = mk(OP_MUL, 3, 1, 4, 0, 0);
    x = mk(OP_FP, 0, 0, 0, 0, 0); x.eor = 1;
    prog[pc(RC, 2)] = x;
    nslots[RC] = 3;
  endtask

  always_comb begin
    vp_conf  = vpt.exists(vp_pc);
    vp_val   = vp_conf ? vpt[vp_pc] : '0;
    bp_conf  = bpt.exists(bp_pc);
    bp_taken = bp_conf ? bpt[bp_pc] : 1'b0;
    for (int i = 0; i < MAX_DINV; i++) begin
      vpc_conf[i] = vpt.exists(vpc_pc[i]);
      vpc_val[i]  = vpc_conf[i] ? vpt[vpc_pc[i]] : '0;
    end
  end

  // ---------------- legacy decoder ----------------
  initial begin
    forever begin
      @(negedge clk);
      if (dec_req) begin
        region_t r; int n;
        r = dec_region; n = nslots.exists(r) ? nslots[r] : 0;
        for (int ln = 0; ln * LINE_UOPS < n; ln++) begin
          fill_valid = 1; fill_region = r; fill_line = 2'(ln);
          fill_nuops = 3'((n - ln * LINE_UOPS) > LINE_UOPS ? LINE_UOPS : n - ln * LINE_UOPS);
          for (int i = 0; i < LINE_UOPS; i++)
            fill_uops[i] = prog.exists(pc(r, ln * LINE_UOPS + i)) ? prog[pc(r, ln * LINE_UOPS + i)] : '0;
          @(negedge clk);
        end
        fill_valid = 0;
        dec_done = 1; @(negedge clk); dec_done = 0;
      end
    end
  end

  // ---------------- statistics ----------------
  int n_fold, n_prop, n_dinv, n_cinv, n_brfold, n_pivot, n_lo, n_abort, n_commit, n_discard;
  int n_opt, n_unopt, n_decode, n_vprej, n_forced, n_lock, n_cohost, n_upd_ok, n_upd_bad, n_squash;
  int n_thr_up, n_thr_down;
  initial begin
    n_fold = 0; n_prop = 0; n_dinv = 0; n_cinv = 0; n_brfold = 0; n_pivot = 0; n_lo = 0;
    n_abort = 0; n_commit = 0; n_discard = 0; n_opt = 0; n_unopt = 0; n_decode = 0; n_vprej = 0;
    n_forced = 0; n_lock = 0; n_cohost = 0; n_upd_ok = 0; n_upd_bad = 0; n_squash = 0;
    n_thr_up = 0; n_thr_down = 0;
  end
  always @(posedge clk) if (rst_n) begin
    n_fold += int'(scc_ev.fold); n_prop += int'(scc_ev.prop); n_dinv += int'(scc_ev.dinv);
    n_cinv += int'(scc_ev.cinv); n_brfold += int'(scc_ev.brfold); n_pivot += int'(scc_ev.pivot);
    n_lo += int'(scc_ev.liveout); n_abort += int'(scc_ev.aborted); n_commit += int'(scc_ev.commit);
    n_discard += int'(scc_ev.discard);
    n_opt += int'(ev_opt); n_unopt += int'(ev_unopt); n_decode += int'(ev_decode);
    n_vprej += int'(ev_vp_reject); n_forced += int'(ev_forced);
    n_lock += int'(dut.lock_set);
    if (dut.l_req && $countones(dut.l_hit) >= 2) n_cohost++;
    n_upd_ok += int'(upd_valid && upd_correct); n_upd_bad += int'(upd_valid && !upd_correct);
    n_squash += int'(sq_valid);
    n_thr_up += int'(ev_thr_up); n_thr_down += int'(ev_thr_down);
  end

  task automatic chk(logic ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  // ---------------- fetch driver and back end ----------------
  typedef struct { logic [$clog2(OS)-1:0] set; logic [2:0] way; logic [2:0] inv; logic ok; } upd_t;
  upd_t updq [$];
  always @(negedge clk) begin
    if (updq.size() > 0) begin
      upd_t e;
      e = updq.pop_front();
      upd_valid = 1; upd_set = e.set; upd_way = e.way; upd_inv = e.inv; upd_correct = e.ok;
    end else upd_valid = 0;
  end

  int delivered;   // micro-ops delivered by the last fetch
  logic last_opt, mispredicted;
  cuop_t opt_stream [$];
  int cyc_fetch;
  logic dbg = 0;

  task automatic fetch(region_t r);
    int c;
    @(negedge clk); fetch_valid = 1; fetch_region = r;
    @(negedge clk); fetch_valid = 0;
    delivered = 0; last_opt = 0; mispredicted = 0; opt_stream.delete(); c = 1;
    while (1) begin
      #1;
      if (out_valid) begin
        for (int i = 0; i < int'(out_cnt); i++) begin
          cuop_t u;
          u = out_uops[i];
          delivered++;
          if (out_opt) begin
            last_opt = 1;
            opt_stream.push_back(u);
            if (u.pred_src && !mispredicted) begin
              logic ok;
              if (u.inv_idx < 3'(MAX_DINV)) ok = truth_val.exists(u.pc) && truth_val[u.pc] == u.pv;
              else ok = truth_dir.exists(u.pc) && truth_dir[u.pc] == u.pred_taken;
              updq.push_back('{set: out_set, way: out_way, inv: u.inv_idx, ok: ok});
              if (!ok) mispredicted = 1;
            end
          end
        end
      end
      if (fetch_done) begin
        cyc_fetch = c;
        @(negedge clk);
        break;
      end
      @(negedge clk); c++;
      if (c > 200) begin chk(0, "fetch hang"); break; end
    end
    if (mispredicted) begin
      sq_valid = 1; sq_region = r; sq_from_opt = 1; sq_pred_src = 1; sq_scc_related = 1;
      @(negedge clk); sq_valid = 0;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int first_opt_iter, a_unopt_len, a_opt_len;
    logic stream_ok;
    build_program();
    repeat (3) @(negedge clk); rst_n = 1;
    first_opt_iter = -1; a_unopt_len = 0; a_opt_len = 0;

    // ---------------- phase 0: B and C become hot ----------------
    for (int it = 0; it < 20; it++) begin
      fetch(RB);
      fetch(RC);
    end
    chk(n_abort > 0 && n_discard > 0, "B aborted and C discarded");

    // ---------------- phase 1: hot loop over A ----------------
    for (int it = 0; it < 60; it++) begin
      fetch(RA);
      if (!last_opt && delivered > 0) a_unopt_len = delivered;
      if (dbg) $display("it %0d A opt=%0d n=%0d", it, last_opt, delivered);
      if (last_opt) begin
        a_opt_len = delivered;
        if (first_opt_iter < 0) begin
          first_opt_iter = it;
          stream_ok = opt_stream.size() == 6 &&
            opt_stream[0].u.op == OP_LOAD && opt_stream[0].pred_src && opt_stream[0].pv == 10 &&
            opt_stream[1].u.op == OP_ADD && opt_stream[1].u.s1_imm && opt_stream[1].u.imm == 12 &&
            opt_stream[2].u.op == OP_LOAD && opt_stream[2].lo_cnt == 3 &&
            opt_stream[3].u.op == OP_BR && opt_stream[3].pred_taken &&
            opt_stream[4].u.op == OP_STORE &&
            opt_stream[5].u.op == OP_LIVEOUT && opt_stream[5].lo[0].val == 6;
          chk(stream_ok, "first optimized stream of A");
          chk(cyc_fetch == 3, $sformatf("optimized fetch of A takes 3 cycles, got %0d", cyc_fetch));
        end
      end
      if (it % 10 == 9) begin
        fetch(RB);
        fetch(RC);
      end
    end
    chk(first_opt_iter > 0, "A streamed from the optimized partition");
    chk(a_unopt_len == 14 && a_opt_len == 6, $sformatf("A shrinks 14 -> 6 (%0d -> %0d)", a_unopt_len, a_opt_len));

    // ---------------- phase 2: the loaded value changes ----------------
    truth_val[pc(RA, 0)] = 20;
    fetch(RA);
    chk(last_opt && mispredicted, "stale optimized stream mispredicts");
    fetch(RA);
    chk(!last_opt && delivered == 14, "refetch from the unoptimized partition after the squash");
    vpt[pc(RA, 0)] = 20;                 // the value predictor has learned the new value
    for (int it = 0; it < 80; it++) begin
      fetch(RA);
      if (dbg) $display("p2 it %0d A opt=%0d n=%0d mis=%0d", it, last_opt, delivered, mispredicted);
      if (last_opt) chk(opt_stream[0].pv == 20 && !mispredicted, "new version streamed");
    end
    chk(last_opt && opt_stream[0].pv == 20, "A optimized again with the new invariant");

    // ---------------- phase 3: misprediction trend ----------------
    // the epoch holding the misprediction raises the threshold above its initial 4; a later
    // epoch without mispredictions lowers it again
    for (int i = 0; i < 4 * 1024 && n_thr_down == 0; i++) @(negedge clk);
    chk(n_thr_up == 1 && n_thr_down == 1 && conf_thresh == 4, "threshold raised, then lowered");

    $display("fold=%0d prop=%0d dinv=%0d cinv=%0d brfold=%0d pivot=%0d liveout=%0d abort=%0d commit=%0d discard=%0d",
             n_fold, n_prop, n_dinv, n_cinv, n_brfold, n_pivot, n_lo, n_abort, n_commit, n_discard);
    $display("opt=%0d unopt=%0d decode=%0d vp_reject=%0d forced=%0d lock=%0d cohost=%0d upd+=%0d upd-=%0d squash=%0d",
             n_opt, n_unopt, n_decode, n_vprej, n_forced, n_lock, n_cohost, n_upd_ok, n_upd_bad, n_squash);
    $display("thr_up=%0d thr_down=%0d", n_thr_up, n_thr_down);
    chk(n_fold > 0, "constant folding");     chk(n_prop > 0, "constant propagation");
    chk(n_dinv > 0, "data invariant");       chk(n_cinv > 0, "control invariant");
    chk(n_brfold > 0, "branch folding");     chk(n_pivot > 0, "pivot");
    chk(n_lo > 0, "live-out inlining");      chk(n_abort > 0, "abort");
    chk(n_commit >= 2, "two commits");       chk(n_discard > 0, "discard");
    chk(n_opt > 0, "optimized source");      chk(n_unopt > 0, "unoptimized source");
    chk(n_decode >= 3, "decode on miss");    chk(n_vprej > 0, "value-predictor check rejects");
    chk(n_forced > 0, "recovery forces unoptimized"); chk(n_lock > 0, "lines locked");
    chk(n_cohost > 0, "versions co-hosted"); chk(n_upd_ok > 0 && n_upd_bad > 0, "confidence updates");
    chk(n_squash > 0, "squash");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
