// scc_frontend: processor front end with speculative code compaction (SCC).
//
// Idea: hot micro-op sequences in the micro-op cache are rewritten, in the background, into
// shorter sequences that assume dynamically predicted values and branch outcomes hold
// (constant folding, constant propagation, branch folding); the rewritten versions live next
// to the original ones and the fetch logic streams whichever is profitable.
// Structure:
//   uop_cache_unopt  unoptimized partition (U_SETS x WAYS lines), filled by the decoder; its
//                    hotness counters raise compaction requests.
//   scc_req_queue    RQ_DEPTH pending requests; the head starts the compaction unit when idle.
//   scc_unit         compaction engine (register context table, ALU, write buffer); reads the
//                    unoptimized partition, probes the predictors, commits compacted streams.
//   uop_cache_opt    optimized partition (O_SETS x WAYS compacted streams) with confidence and
//                    hotness counters.
//   scc_line_select  profitability scoring over the optimized hits of a region.
//   scc_thresh_tune  adapts the control-confidence threshold of the scoring to the trend of
//                    mispredictions reported on upd_*.
//   scc_fetch_fsm    chooses the source per region and streams micro-ops; recovery rule.
// The value predictor, branch predictor, legacy decoder and back end are outside: their
// signals are ports. Predictor probes are answered in the same cycle. Validation feedback
// (upd_*) updates the confidence counter of the invariant a prediction source checked;
// squash information (sq_*) drives the recovery rule. Sizes follow the document's main
// configuration: 48 sets of 8 ways split 36/12, 6 micro-ops per line, a 6-entry request queue,
// an 18-entry write buffer, 4-bit confidence counters, hotness decay every 28 and 3 cycles.
// Some block outputs are left unconnected here: the fill-drop and queue-full flags, the unit's
// done pulse, the eligibility vector and score of the line selection and the set/way chosen
// for a commit. They serve the blocks' own tests and statistics. The reset warning lint reports
// here comes from the request queue's assertion.
module scc_frontend
  import scc_pkg::*;
#(
  parameter int unsigned U_SETS   = 36,
  parameter int unsigned O_SETS   = 12,
  parameter int unsigned WAYS     = 8,
  parameter int unsigned RQ_DEPTH = 6,
  parameter int unsigned CONST_W  = DATA_W
) (
  input  logic        clk,
  input  logic        rst_n,
  // fetch requests
  input  logic        fetch_valid,
  input  region_t     fetch_region,
  output logic        fetch_ready,
  // delivered micro-ops
  output logic        out_valid,
  output logic        out_opt,
  output logic [2:0]  out_cnt,
  output cuop_t       out_uops [LINE_UOPS],
  output logic [$clog2(O_SETS)-1:0] out_set,
  output logic [$clog2(WAYS)-1:0]   out_way,
  output logic        fetch_done,
  output upc_t        fetch_next,
  // legacy decoder
  output logic        dec_req,
  output region_t     dec_region,
  input  logic        dec_done,
  input  logic        fill_valid,
  input  region_t     fill_region,
  input  logic [1:0]  fill_line,
  input  logic [2:0]  fill_nuops,
  input  uop_t        fill_uops [LINE_UOPS],
  // value predictor: compaction probe and fetch-time check
  output logic        vp_req,
  output upc_t        vp_pc,
  input  logic        vp_conf,
  input  data_t       vp_val,
  output upc_t        vpc_pc   [MAX_DINV],
  input  logic        vpc_conf [MAX_DINV],
  input  data_t       vpc_val  [MAX_DINV],
  // branch predictor probe
  output logic        bp_req,
  output upc_t        bp_pc,
  input  logic        bp_conf,
  input  logic        bp_taken,
  // back end: validation of prediction sources and squashes
  input  logic        upd_valid,
  input  logic [$clog2(O_SETS)-1:0] upd_set,
  input  logic [$clog2(WAYS)-1:0]   upd_way,
  input  logic [2:0]  upd_inv,
  input  logic        upd_correct,
  input  logic        sq_valid,
  input  region_t     sq_region,
  input  logic        sq_from_opt,
  input  logic        sq_pred_src,
  input  logic        sq_scc_related,
  // statistics
  output scc_events_t scc_ev,
  output logic        scc_busy,
  output logic        rq_dropped,
  output logic        ev_opt,
  output logic        ev_unopt,
  output logic        ev_decode,
  output logic        ev_vp_reject,
  output logic        ev_forced,
  output conf_t       conf_thresh,
  output logic        ev_thr_up,
  output logic        ev_thr_down
);

  // unoptimized partition
  logic       uf_req, uf_hit, uf_last, us_hit, lock_set, lock_clr, hot_req;
  region_t    uf_region, lock_region, hot_region;
  logic [1:0] uf_line;
  logic [2:0] uf_nuops;
  uop_t       uf_uops [LINE_UOPS];
  upc_t       us_pc;
  uop_t       us_uop;
  logic       fill_dropped;

  uop_cache_unopt #(.SETS(U_SETS), .WAYS(WAYS)) u_unopt (
    .clk, .rst_n,
    .fill_valid, .fill_region, .fill_line, .fill_nuops, .fill_uops,
    .f_req(uf_req), .f_region(uf_region), .f_line(uf_line), .f_hit(uf_hit),
    .f_nuops(uf_nuops), .f_last(uf_last), .f_uops(uf_uops),
    .s_pc(us_pc), .s_hit(us_hit), .s_uop(us_uop),
    .lock_set, .lock_clr, .lock_region,
    .req_valid(hot_req), .req_region(hot_region), .fill_dropped
  );

  // request queue and compaction unit
  logic    rq_ne, rq_full, scc_idle, scc_start, scc_done, c_commit;
  region_t rq_head, c_region;
  logic [SLOT_W-1:0] c_count, c_shrink;
  logic [2:0] c_ndinv;
  logic [1:0] c_ncinv;
  upc_t    c_dinv_pc [MAX_DINV];
  data_t   c_dinv_val [MAX_DINV];
  upc_t    c_next;
  cuop_t   c_uops [REGION_UOPS];

  assign scc_start = scc_idle && rq_ne;

  scc_req_queue #(.DEPTH(RQ_DEPTH)) u_rq (
    .clk, .rst_n, .push(hot_req), .push_region(hot_region), .pop(scc_start),
    .not_empty(rq_ne), .head(rq_head), .full(rq_full), .dropped(rq_dropped)
  );

  scc_unit #(.CONST_W(CONST_W)) u_scc (
    .clk, .rst_n, .start(scc_start), .start_region(rq_head), .idle(scc_idle), .done(scc_done),
    .lock_set, .lock_clr, .lock_region,
    .rd_pc(us_pc), .rd_hit(us_hit), .rd_uop(us_uop),
    .vp_req, .vp_pc, .vp_conf, .vp_val,
    .bp_req, .bp_pc, .bp_conf, .bp_taken,
    .commit(c_commit), .c_region, .c_count, .c_shrink, .c_ndinv, .c_ncinv,
    .c_dinv_pc, .c_dinv_val, .c_next, .c_uops, .ev(scc_ev)
  );

  assign scc_busy = !scc_idle;

  // optimized partition and line selection
  logic                       l_req;
  region_t                    l_region;
  logic [WAYS-1:0]            l_hit, eligible;
  logic [SLOT_W-1:0]          l_shrink [WAYS];
  logic [2:0]                 l_ndinv [WAYS];
  logic [1:0]                 l_ncinv [WAYS];
  conf_t                      l_conf [WAYS][NINV];
  hot_t                       l_hot [WAYS];
  logic [$clog2(O_SETS)-1:0]  l_set, w_set;
  logic [$clog2(WAYS)-1:0]    r_way, sel_way, w_way;
  logic [SLOT_W-1:0]          r_count;
  logic [2:0]                 r_ndinv;
  upc_t                       r_dinv_pc [MAX_DINV];
  data_t                      r_dinv_val [MAX_DINV];
  upc_t                       r_next;
  cuop_t                      r_uops [REGION_UOPS];
  logic                       sel_valid;
  logic [7:0]                 sel_score;

  uop_cache_opt #(.SETS(O_SETS), .WAYS(WAYS)) u_opt (
    .clk, .rst_n,
    .w_valid(c_commit), .w_region(c_region), .w_count(c_count), .w_shrink(c_shrink),
    .w_ndinv(c_ndinv), .w_ncinv(c_ncinv), .w_dinv_pc(c_dinv_pc), .w_dinv_val(c_dinv_val),
    .w_next(c_next), .w_uops(c_uops), .w_set, .w_way,
    .l_req, .l_region, .l_hit, .l_shrink, .l_ndinv, .l_ncinv, .l_conf, .l_hot, .l_set,
    .r_way, .a_req(out_valid && out_opt), .r_count, .r_ndinv, .r_dinv_pc, .r_dinv_val, .r_next,
    .r_uops, .upd_valid, .upd_set, .upd_way, .upd_inv, .upd_correct
  );

  scc_thresh_tune u_tune (
    .clk, .rst_n, .mispredict(upd_valid && !upd_correct),
    .thresh(conf_thresh), .up(ev_thr_up), .down(ev_thr_down)
  );

  scc_line_select #(.WAYS(WAYS)) u_sel (
    .conf_thresh, .hit(l_hit), .shrink(l_shrink), .ndinv(l_ndinv), .ncinv(l_ncinv), .conf(l_conf),
    .hot(l_hot), .eligible, .sel_valid, .sel_way, .sel_score
  );

  scc_fetch_fsm #(.O_SETS(O_SETS), .WAYS(WAYS)) u_fetch (
    .clk, .rst_n,
    .req_valid(fetch_valid), .req_region(fetch_region), .req_ready(fetch_ready),
    .l_req, .l_region, .l_set, .sel_valid, .sel_way,
    .r_way, .r_count, .r_ndinv, .r_dinv_pc, .r_dinv_val, .r_next, .r_uops,
    .f_req(uf_req), .f_region(uf_region), .f_line(uf_line), .f_hit(uf_hit),
    .f_nuops(uf_nuops), .f_last(uf_last), .f_uops(uf_uops),
    .vpc_pc, .vpc_conf, .vpc_val,
    .dec_req, .dec_region, .dec_done,
    .out_valid, .out_opt, .out_cnt, .out_uops, .out_set, .out_way,
    .done(fetch_done), .done_next(fetch_next),
    .sq_valid, .sq_region, .sq_from_opt, .sq_pred_src, .sq_scc_related,
    .ev_opt, .ev_unopt, .ev_decode, .ev_vp_reject, .ev_forced
  );

endmodule
