// scc_unit: the speculative code compaction engine.
//
// A pass starts on `start` with a 32-byte region address taken from the request queue. The
// unit locks the region's lines in the unoptimized partition, clears its register context
// table and then processes one micro-op per cycle, in program order, read from the
// unoptimized partition through rd_pc/rd_hit/rd_uop. For each micro-op:
//   * all source values known in the context table -> evaluated by the ALU and eliminated
//     (constant folding); the result becomes a pending live value;
//   * no source value known -> the value predictor is probed; a confident prediction makes the
//     micro-op a prediction source: it is kept, and its result is recorded as a data invariant
//     (at most MAX_DINV per pass);
//   * some source values known -> the known value is moved into the immediate field
//     (constant propagation) and the micro-op is kept;
//   * branches with known operands are folded and processing pivots to the outcome; otherwise a
//     confident branch prediction makes the branch a prediction source (control invariant,
//     at most MAX_CINV) and processing follows the predicted path; an unpredictable branch ends
//     the pass after it.
// Every prediction source carries, as inlined live-outs, the pending values of the context
// table other than its own result; the pass ends with a carrier micro-op for the remaining
// pending values. The pass stops at the end of a region, on a micro-op cache miss, before a
// third branch or when the write buffer is full. It is aborted (and discarded) on a branch
// whose target lies inside its own macro-instruction (self-looping), on a store whose known
// address falls inside the region being compacted, or when more than LO_SLOTS live-outs would
// be needed. If the shrinkage (micro-ops read minus micro-ops kept) reaches COMPACT_MIN the
// write buffer is offered to the optimized partition with `commit` for one cycle, otherwise
// it is discarded; `done` pulses in that cycle and the region lock is released.
// CONST_W restricts the constants the unit may create to CONST_W-bit signed values (the
// document's constant-width study; the default, 64, is the unrestricted configuration): a
// wider fold result keeps its micro-op, a wider known operand is not propagated and a wider
// predicted value is not used as an invariant.
// Predictor probes are combinational within the cycle. The transformations, the limits of 4
// data and 2 control invariants, the stopping and abort rules follow the document; the
// micro-op encoding, the live-out carrier, the COMPACT_MIN value and the live-out overflow
// abort are this design's choices.
// The write buffer's full/overflow flags and the table's valid vector are not used: the pass
// stops one entry before full, and the table is read through its ports. Only the region bits
// of a store address are compared for self-modifying code.
module scc_unit
  import scc_pkg::*;
#(
  parameter int unsigned WB_DEPTH    = REGION_UOPS,
  parameter int unsigned COMPACT_MIN = 2,
  parameter int unsigned CONST_W     = DATA_W   // widest constant folded, propagated or inlined
) (
  input  logic        clk,
  input  logic        rst_n,
  // request
  input  logic        start,
  input  region_t     start_region,
  output logic        idle,
  output logic        done,
  // lock of the region's lines in the unoptimized partition
  output logic        lock_set,
  output logic        lock_clr,
  output region_t     lock_region,
  // micro-op read from the unoptimized partition
  output upc_t        rd_pc,
  input  logic        rd_hit,
  input  uop_t        rd_uop,
  // value predictor probe
  output logic        vp_req,
  output upc_t        vp_pc,
  input  logic        vp_conf,
  input  data_t       vp_val,
  // branch predictor probe
  output logic        bp_req,
  output upc_t        bp_pc,
  input  logic        bp_conf,
  input  logic        bp_taken,
  // result
  output logic        commit,
  output region_t     c_region,
  output logic [SLOT_W-1:0] c_count,
  output logic [SLOT_W-1:0] c_shrink,
  output logic [2:0]  c_ndinv,
  output logic [1:0]  c_ncinv,
  output upc_t        c_dinv_pc  [MAX_DINV],
  output data_t       c_dinv_val [MAX_DINV],
  output upc_t        c_next,
  output cuop_t       c_uops [WB_DEPTH],
  output scc_events_t ev
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FINISH, S_DECIDE} state_e;
  localparam int unsigned WCW = $clog2(WB_DEPTH+1);

  state_e        state_q;
  upc_t          pc_q, next_q;
  region_t       region_q;
  slot_t         mop_start_q;
  logic [1:0]    brcnt_q;
  logic [2:0]    ndinv_q;
  logic [1:0]    ncinv_q;
  logic [5:0]    nproc_q;
  logic          abort_q;
  upc_t          dinv_pc_q  [MAX_DINV];
  data_t         dinv_val_q [MAX_DINV];

  // context table and ALU
  ctx_t              ra, rb, wa;
  logic              ra_valid, rb_valid, ctx_we, w_valid, w_pending, ctx_clear;
  data_t             ra_val, rb_val, w_val;
  logic [CTX_N-1:0]  ctx_valid, ctx_pend, clr_pend;
  data_t             ctx_val [CTX_N];

  scc_regctx u_ctx (
    .clk, .rst_n, .clear(ctx_clear),
    .ra, .ra_valid, .ra_val, .rb, .rb_valid, .rb_val,
    .we(ctx_we), .wa, .w_valid, .w_pending, .w_val,
    .clr_pending(clr_pend), .valid_o(ctx_valid), .pending_o(ctx_pend), .val_o(ctx_val)
  );

  uop_t       u;
  data_t      a_val, b_val, alu_res;
  logic [3:0] alu_flags;
  logic       alu_taken, alu_foldable;

  scc_alu u_alu (
    .op(u.op), .cond(u.cond), .a(a_val), .b(b_val), .flags_in(a_val[3:0]),
    .result(alu_res), .flags_out(alu_flags), .taken(alu_taken), .foldable(alu_foldable)
  );

  // write buffer
  logic             wb_clear, wb_push, wb_full, wb_ovf;
  cuop_t            wb_din;
  logic [WCW-1:0]   wb_count;

  scc_write_buffer #(.DEPTH(WB_DEPTH)) u_wb (
    .clk, .rst_n, .clear(wb_clear), .push(wb_push), .din(wb_din),
    .count(wb_count), .full(wb_full), .overflow(wb_ovf), .entries(c_uops)
  );

  // live-out selection: pending values other than `excl`, first LO_SLOTS of them
  logic [CTX_N-1:0] lo_mask;
  logic [5:0]       lo_total;
  liveout_t [LO_SLOTS-1:0] lo_list;
  ctx_t             lo_excl;
  logic             lo_excl_en;

  always_comb begin
    lo_total = '0;
    lo_mask  = '0;
    lo_list  = '0;
    for (int unsigned i = 0; i < CTX_N; i++) begin
      if (ctx_pend[i] && !(lo_excl_en && lo_excl == CTX_W'(i))) begin
        if (lo_total < 6'(LO_SLOTS)) begin
          lo_list[lo_total[1:0]].idx = CTX_W'(i);
          lo_list[lo_total[1:0]].val = ctx_val[i];
          lo_mask[i]                 = 1'b1;
        end
        lo_total = lo_total + 1'b1;
      end
    end
  end

  logic [5:0] shrink;
  logic       finish_abort;

  // constant-width restriction: a value is usable as a constant if it is the sign extension
  // of its low CONST_W bits
  function automatic logic fits(data_t v);
    data_t ext;
    ext = data_t'($signed(v << (DATA_W - CONST_W)) >>> (DATA_W - CONST_W));
    return ext == v;
  endfunction

  data_t fold_val;
  assign fold_val = (u.op == OP_CMP) ? data_t'(alu_flags) : alu_res;

  // per-micro-op decision
  logic   need_a, need_b, a_known, b_known, a_live, b_live, all_known, any_live;
  logic   is_alu, is_vpred_op, is_br;
  ctx_t   wdst;
  logic   stop, stop_abort, do_push, pred_src, pivot;
  upc_t   nxt_pc, seq_pc, stop_next;
  cuop_t  cu;
  logic   self_loop, smc, consumed;
  data_t  st_addr;
  slot_t  mop_start;

  always_comb begin
    u        = rd_uop;
    rd_pc    = pc_q;
    vp_pc    = pc_q;
    bp_pc    = pc_q;
    seq_pc   = '{region: pc_q.region, slot: pc_q.slot + 1'b1};

    is_alu      = is_simple_alu(u.op);
    is_br       = is_branch(u.op);
    is_vpred_op = u.op inside {OP_LOAD, OP_MUL, OP_DIV};
    need_a      = u.op inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR, OP_SAR,
                               OP_CMP, OP_BR, OP_JCC};
    need_b      = u.op inside {OP_MOV, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR,
                               OP_SAR, OP_CMP, OP_BR};
    ra          = (u.op == OP_JCC) ? CTX_W'(FLAGS_IDX) : CTX_W'(u.src1);
    rb          = CTX_W'(u.src2);
    a_live      = ra_valid && !u.s1_imm;
    b_live      = rb_valid && !u.s2_imm;
    a_known     = u.s1_imm || ra_valid;
    b_known     = u.s2_imm || rb_valid;
    a_val       = u.s1_imm ? u.imm : ra_val;
    b_val       = u.s2_imm ? u.imm : rb_val;
    all_known   = (!need_a || a_known) && (!need_b || b_known) && alu_foldable;
    any_live    = (need_a && a_live) || (need_b && b_live);
    wdst        = (u.op == OP_CMP) ? CTX_W'(FLAGS_IDX) : CTX_W'(u.dst);
    mop_start   = u.som ? pc_q.slot : mop_start_q;
    self_loop   = is_br && (u.tgt.region == pc_q.region) && (u.tgt.slot >= mop_start) &&
                  (u.tgt.slot <= pc_q.slot);
    st_addr     = ra_val + u.imm;
    smc         = (u.op == OP_STORE) && ra_valid && !u.s1_imm &&
                  (st_addr[VADDR_W-1:5] == pc_q.region);

    vp_req     = 1'b0;
    bp_req     = 1'b0;
    ctx_we     = 1'b0;
    wa         = wdst;
    w_valid    = 1'b0;
    w_pending  = 1'b0;
    w_val      = '0;
    clr_pend   = '0;
    lo_excl    = wdst;
    lo_excl_en = 1'b0;
    do_push    = 1'b0;
    pred_src   = 1'b0;
    pivot      = 1'b0;
    nxt_pc     = seq_pc;
    stop       = 1'b0;
    stop_abort = 1'b0;
    stop_next  = pc_q;
    cu         = '0;
    cu.u       = u;
    cu.pc      = pc_q;
    ev         = '0;

    consumed   = 1'b0;

    if (state_q == S_RUN) begin
      if (!rd_hit || (is_br && brcnt_q == 2'd2) || wb_count >= WCW'(WB_DEPTH - 1)) begin
        stop      = 1'b1;                         // miss, third branch, buffer full
        stop_next = pc_q;
      end else if (self_loop || smc) begin
        stop       = 1'b1;
        stop_abort = 1'b1;
      end else begin
        consumed = 1'b1;
        if (is_alu && all_known && fits(fold_val)) begin
          // constant folding
          ctx_we    = 1'b1;
          w_valid   = 1'b1;
          w_pending = 1'b1;
          w_val     = fold_val;
          ev.fold   = 1'b1;
        end else if (is_br && all_known) begin
          // branch folding
          ev.brfold = 1'b1;
          pivot     = alu_taken;
        end else if (((is_alu && !any_live) || is_vpred_op) && ndinv_q < 3'(MAX_DINV) && vp_conf &&
                     fits(vp_val)) begin
          // data invariant from the value predictor: prediction source
          vp_req      = 1'b1;
          pred_src    = 1'b1;
          do_push     = 1'b1;
          ctx_we      = 1'b1;
          w_valid     = 1'b1;
          w_val       = vp_val;
          lo_excl_en  = 1'b1;
          cu.inv_idx  = ndinv_q;
          cu.pv       = vp_val;
          ev.dinv     = 1'b1;
        end else if (is_br && ncinv_q < 2'(MAX_CINV) && bp_conf) begin
          // control invariant from the branch predictor: prediction source
          bp_req        = 1'b1;
          pred_src      = 1'b1;
          do_push       = 1'b1;
          pivot         = bp_taken;
          cu.pred_taken = bp_taken;
          cu.inv_idx    = 3'(MAX_DINV) + 3'(ncinv_q);
          ev.cinv       = 1'b1;
        end else begin
          // kept, possibly with a known operand propagated into the immediate
          do_push = !(u.op inside {OP_NOP, OP_LIVEOUT});
          if (is_alu) begin
            ctx_we  = 1'b1;
            w_valid = 1'b0;
            if (need_a && a_live && fits(ra_val)) begin
              cu.u.s1_imm = 1'b1;
              cu.u.imm    = ra_val;
              ev.prop     = 1'b1;
            end else if (need_b && b_live && fits(rb_val)) begin
              cu.u.s2_imm = 1'b1;
              cu.u.imm    = rb_val;
              ev.prop     = 1'b1;
            end
          end else if (is_vpred_op || u.op == OP_FP) begin
            ctx_we  = (u.op != OP_FP);
            w_valid = 1'b0;
          end
          if (is_br) begin
            stop      = 1'b1;                     // unpredictable branch ends the pass
            stop_next = seq_pc;
          end
        end

        if (is_br && !stop && pivot) nxt_pc = u.tgt;
        if (!stop && !pivot && u.eor) begin
          stop      = 1'b1;                       // end of the 32-byte region
          stop_next = '{region: pc_q.region + 1'b1, slot: '0};
        end
        ev.pivot = pivot;

        if (pred_src) begin
          cu.pred_src = 1'b1;
          cu.lo_cnt   = 3'(lo_total > 6'(LO_SLOTS) ? LO_SLOTS : lo_total);
          cu.lo       = lo_list;
          clr_pend    = lo_mask;
          ev.liveout  = (lo_total != '0);
          if (lo_total > 6'(LO_SLOTS)) begin
            stop       = 1'b1;
            stop_abort = 1'b1;
            do_push    = 1'b0;
          end
        end
      end
    end else if (state_q == S_FINISH && !abort_q && lo_total != '0) begin
      // carrier micro-op for the live-outs still pending at the end of the stream
      cu.u.op    = OP_LIVEOUT;
      cu.pc      = next_q;
      cu.lo_cnt  = 3'(lo_total > 6'(LO_SLOTS) ? LO_SLOTS : lo_total);
      cu.lo      = lo_list;
      do_push    = (lo_total <= 6'(LO_SLOTS));
      ev.liveout = do_push;
    end

    wb_push    = do_push;
    wb_din     = cu;
    ev.aborted   = (state_q == S_DECIDE) && abort_q;
    ev.commit  = commit;
    ev.discard = (state_q == S_DECIDE) && !abort_q && !commit;
  end

  assign finish_abort = abort_q || (state_q == S_FINISH && lo_total > 6'(LO_SLOTS));
  assign shrink       = (nproc_q > 6'(wb_count)) ? nproc_q - 6'(wb_count) : '0;

  assign idle        = (state_q == S_IDLE);
  assign lock_region = (state_q == S_IDLE) ? start_region : region_q;
  assign lock_set    = (state_q == S_IDLE) && start;
  assign ctx_clear   = (state_q == S_IDLE) && start;
  assign wb_clear    = ((state_q == S_IDLE) && start) || (state_q == S_DECIDE);
  assign done        = (state_q == S_DECIDE);
  assign lock_clr    = (state_q == S_DECIDE);
  assign commit      = (state_q == S_DECIDE) && !abort_q && shrink >= 6'(COMPACT_MIN);
  assign c_region    = region_q;
  assign c_count     = SLOT_W'(wb_count);
  assign c_shrink    = SLOT_W'(shrink);
  assign c_ndinv     = ndinv_q;
  assign c_ncinv     = ncinv_q;
  assign c_dinv_pc   = dinv_pc_q;
  assign c_dinv_val  = dinv_val_q;
  assign c_next      = next_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      pc_q        <= '0;
      next_q      <= '0;
      region_q    <= '0;
      mop_start_q <= '0;
      brcnt_q     <= '0;
      ndinv_q     <= '0;
      ncinv_q     <= '0;
      nproc_q     <= '0;
      abort_q     <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q     <= S_RUN;
          region_q    <= start_region;
          pc_q        <= '{region: start_region, slot: '0};
          next_q      <= '{region: start_region, slot: '0};
          mop_start_q <= '0;
          brcnt_q     <= '0;
          ndinv_q     <= '0;
          ncinv_q     <= '0;
          nproc_q     <= '0;
          abort_q     <= 1'b0;
        end
        S_RUN: begin
          mop_start_q <= mop_start;
          if (consumed)          nproc_q <= nproc_q + 1'b1;
          if (consumed && is_br) brcnt_q <= brcnt_q + 1'b1;
          if (ev.dinv) ndinv_q <= ndinv_q + 1'b1;
          if (ev.cinv) ncinv_q <= ncinv_q + 1'b1;
          if (stop) begin
            state_q <= S_FINISH;
            next_q  <= stop_next;
            abort_q <= stop_abort;
          end else begin
            pc_q <= nxt_pc;
          end
        end
        S_FINISH: begin
          state_q <= S_DECIDE;
          abort_q <= finish_abort;
        end
        default: state_q <= S_IDLE;   // S_DECIDE
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state_q == S_RUN && ev.dinv && !stop_abort) begin
      dinv_pc_q[ndinv_q[1:0]]  <= pc_q;
      dinv_val_q[ndinv_q[1:0]] <= vp_val;
    end
  end

endmodule
