// scc_fetch_fsm: fetch state machine extended for speculative code compaction.
//
// For each fetch request (one 32-byte region) the machine chooses the micro-op source:
//   LOOKUP  both partitions are looked up with the region address; the line selection logic
//           offers the best profitable optimized version (sel_valid/sel_way).
//   VPCHECK the data invariants of that version are compared with the value predictor's
//           current predictions (up to MAX_DINV probes in one cycle); only if every one is
//           confidently predicted with the same value is the optimized version streamed,
//           otherwise the unoptimized lines are used, or the decoder on a miss.
//   OPT     streams the compacted micro-ops, FETCH_W per cycle.
//   UNOPT   streams the region's lines from the unoptimized partition, one line per cycle;
//           a missing line hands the region to the decoder.
//   DECODE  asks the legacy decode pipeline for the region and waits for dec_done.
// Misspeculation recovery: a squash caused by a prediction source that was streamed from the
// optimized partition, for an SCC-related reason, marks the region so that its next fetch
// uses the unoptimized partition whatever the profitability analysis says. Each delivered
// group carries its source and, for optimized streams, the set/way of the entry so that
// validations can update its confidence counters. `done` pulses with the last group and gives
// the continuation point (the stream's own for optimized streams, the next region otherwise).
// The sources, transitions and recovery rule follow the document; the state encoding, the
// one-cycle lookup and check steps and the one-shot recovery mark are this design's choices.
module scc_fetch_fsm
  import scc_pkg::*;
#(
  parameter int unsigned FETCH_W = LINE_UOPS,
  parameter int unsigned O_SETS  = 12,
  parameter int unsigned WAYS    = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // fetch request
  input  logic        req_valid,
  input  region_t     req_region,
  output logic        req_ready,
  // optimized partition lookup, selection and read-out
  output logic        l_req,
  output region_t     l_region,
  input  logic [$clog2(O_SETS)-1:0] l_set,
  input  logic        sel_valid,
  input  logic [$clog2(WAYS)-1:0] sel_way,
  output logic [$clog2(WAYS)-1:0] r_way,
  input  logic [SLOT_W-1:0] r_count,
  input  logic [2:0]  r_ndinv,
  input  upc_t        r_dinv_pc  [MAX_DINV],
  input  data_t       r_dinv_val [MAX_DINV],
  input  upc_t        r_next,
  input  cuop_t       r_uops [REGION_UOPS],
  // unoptimized partition line read
  output logic        f_req,
  output region_t     f_region,
  output logic [1:0]  f_line,
  input  logic        f_hit,
  input  logic [2:0]  f_nuops,
  input  logic        f_last,
  input  uop_t        f_uops [LINE_UOPS],
  // value predictor check
  output upc_t        vpc_pc   [MAX_DINV],
  input  logic        vpc_conf [MAX_DINV],
  input  data_t       vpc_val  [MAX_DINV],
  // legacy decode
  output logic        dec_req,
  output region_t     dec_region,
  input  logic        dec_done,
  // delivered micro-ops
  output logic        out_valid,
  output logic        out_opt,
  output logic [2:0]  out_cnt,
  output cuop_t       out_uops [FETCH_W],
  output logic [$clog2(O_SETS)-1:0] out_set,
  output logic [$clog2(WAYS)-1:0]   out_way,
  output logic        done,
  output upc_t        done_next,
  // misspeculation
  input  logic        sq_valid,
  input  region_t     sq_region,
  input  logic        sq_from_opt,
  input  logic        sq_pred_src,
  input  logic        sq_scc_related,
  // statistics pulses
  output logic        ev_opt,
  output logic        ev_unopt,
  output logic        ev_decode,
  output logic        ev_vp_reject,
  output logic        ev_forced
);

  typedef enum logic [2:0] {F_IDLE, F_LOOKUP, F_VPCHECK, F_OPT, F_UNOPT, F_DECODE} fstate_e;

  fstate_e              st_q;
  region_t              reg_q;
  logic [$clog2(WAYS)-1:0]   way_q;
  logic [$clog2(O_SETS)-1:0] set_q;
  logic [SLOT_W-1:0]    idx_q;
  logic [1:0]           line_q;
  logic                 force_v_q;
  region_t              force_r_q;
  logic                 forced, vp_ok, u0_hit;

  assign req_ready  = (st_q == F_IDLE);
  assign l_region   = reg_q;
  assign l_req      = (st_q == F_LOOKUP);
  assign r_way      = way_q;
  assign f_region   = reg_q;
  assign f_line     = (st_q == F_UNOPT) ? line_q : 2'd0;
  assign f_req      = (st_q == F_UNOPT);
  assign u0_hit     = f_hit;                       // line 0 probe while in LOOKUP/VPCHECK
  assign dec_req    = (st_q == F_DECODE);
  assign dec_region = reg_q;
  assign forced     = force_v_q && force_r_q == reg_q;
  assign out_set    = set_q;
  assign out_way    = way_q;

  always_comb begin
    vp_ok = 1'b1;
    for (int unsigned i = 0; i < MAX_DINV; i++) begin
      vpc_pc[i] = r_dinv_pc[i];
      if (3'(i) < r_ndinv && !(vpc_conf[i] && vpc_val[i] == r_dinv_val[i])) vp_ok = 1'b0;
    end
  end

  // delivered group
  always_comb begin
    out_valid = 1'b0;
    out_opt   = 1'b0;
    out_cnt   = '0;
    done      = 1'b0;
    done_next = '{region: reg_q + 1'b1, slot: '0};
    for (int unsigned i = 0; i < FETCH_W; i++) out_uops[i] = '0;
    unique case (st_q)
      F_OPT: begin
        out_valid = 1'b1;
        out_opt   = 1'b1;
        for (int unsigned i = 0; i < FETCH_W; i++)
          if (int'(idx_q) + int'(i) < int'(r_count)) begin
            out_uops[i] = r_uops[int'(idx_q) + int'(i)];
            out_cnt     = out_cnt + 1'b1;
          end
        done      = int'(idx_q) + int'(FETCH_W) >= int'(r_count);
        done_next = r_next;
      end
      F_UNOPT: if (f_hit) begin
        out_valid = 1'b1;
        out_cnt   = f_nuops;
        for (int unsigned i = 0; i < FETCH_W && i < LINE_UOPS; i++)
          if (3'(i) < f_nuops) begin
            out_uops[i].u         = f_uops[i];
            out_uops[i].pc.region = reg_q;
            out_uops[i].pc.slot   = SLOT_W'(int'(line_q) * LINE_UOPS + int'(i));
          end
        done = f_last || line_q == 2'(REGION_LINES - 1);
      end
      F_DECODE: done = dec_done;
      default: ;
    endcase
  end

  assign ev_opt       = (st_q == F_VPCHECK) && vp_ok;
  assign ev_vp_reject = (st_q == F_VPCHECK) && !vp_ok;
  assign ev_unopt     = (st_q == F_UNOPT) && line_q == 2'd0 && f_hit;
  assign ev_decode    = (st_q == F_DECODE) && dec_done;
  assign ev_forced    = (st_q == F_LOOKUP) && forced;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= F_IDLE;
      reg_q     <= '0;
      way_q     <= '0;
      set_q     <= '0;
      idx_q     <= '0;
      line_q    <= '0;
      force_v_q <= 1'b0;
      force_r_q <= '0;
    end else begin
      if (sq_valid && sq_from_opt && sq_pred_src && sq_scc_related) begin
        force_v_q <= 1'b1;
        force_r_q <= sq_region;
      end else if (st_q == F_LOOKUP && forced) begin
        force_v_q <= 1'b0;
      end
      unique case (st_q)
        F_IDLE: if (req_valid) begin
          st_q  <= F_LOOKUP;
          reg_q <= req_region;
        end
        F_LOOKUP: begin
          idx_q  <= '0;
          line_q <= '0;
          if (sel_valid && !forced) begin
            st_q  <= F_VPCHECK;
            way_q <= sel_way;
            set_q <= l_set;
          end else begin
            st_q <= u0_hit ? F_UNOPT : F_DECODE;
          end
        end
        F_VPCHECK: st_q <= vp_ok ? F_OPT : (u0_hit ? F_UNOPT : F_DECODE);
        F_OPT: begin
          idx_q <= idx_q + SLOT_W'(FETCH_W);
          if (done) st_q <= F_IDLE;
        end
        F_UNOPT: begin
          line_q <= line_q + 1'b1;
          if (!f_hit)    st_q <= F_DECODE;
          else if (done) st_q <= F_IDLE;
        end
        F_DECODE: if (dec_done) st_q <= F_IDLE;
        default: st_q <= F_IDLE;
      endcase
    end
  end

endmodule
