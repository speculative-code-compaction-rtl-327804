// uop_cache_opt: the optimized partition of the micro-op cache.
//
// SETS x WAYS entries, each holding one compacted stream produced by the compaction unit for a
// 32-byte region (up to REGION_UOPS compacted micro-ops), so several optimized versions of one
// region can be resident in the same set. The set is the region address modulo SETS and the
// region address is the tag, as in the unoptimized partition, so one region address indexes
// both partitions. Each entry's tag is extended with
//   * one CONF_W-bit (4-bit) saturating confidence counter per predicted invariant: counters
//     0..3 for data invariants, 4..5 for control invariants, set to CONF_INIT on allocation,
//     incremented when a prediction source of the stream commits and decremented when it is
//     squashed (upd_* port);
//   * the compaction potential (shrinkage in micro-ops) and the number of invariants;
//   * the position and predicted value of each data invariant, for the check against the
//     value predictor at fetch time;
//   * a hotness counter, set to HOT_INIT on allocation, incremented by every lookup hit and by
//     every cycle in which the entry streams micro-ops (a_req/a_way), and decremented every
//     DECAY_PERIOD cycles (3 in the document).
// Writes (w_valid) replace an invalid way, else the way with the lowest hotness. Lookup
// (l_req) presents every way of the set combinationally to the line selection logic; r_way
// reads out the chosen entry of the same set. Updates take effect on the next clock edge.
// Storing a whole compacted stream in one entry (rather than in chained 6-micro-op ways),
// CONF_INIT and HOT_INIT are this design's choices.
module uop_cache_opt
  import scc_pkg::*;
#(
  parameter int unsigned SETS         = 12,
  parameter int unsigned WAYS         = 8,
  parameter int unsigned DECAY_PERIOD = 3,
  parameter int unsigned CONF_INIT    = 8,
  parameter int unsigned HOT_INIT     = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // write of a compacted stream
  input  logic        w_valid,
  input  region_t     w_region,
  input  logic [SLOT_W-1:0] w_count,
  input  logic [SLOT_W-1:0] w_shrink,
  input  logic [2:0]  w_ndinv,
  input  logic [1:0]  w_ncinv,
  input  upc_t        w_dinv_pc  [MAX_DINV],
  input  data_t       w_dinv_val [MAX_DINV],
  input  upc_t        w_next,
  input  cuop_t       w_uops [REGION_UOPS],
  output logic [$clog2(SETS)-1:0]  w_set,
  output logic [$clog2(WAYS)-1:0]  w_way,
  // lookup of all ways of a set
  input  logic        l_req,
  input  region_t     l_region,
  output logic [WAYS-1:0] l_hit,
  output logic [SLOT_W-1:0] l_shrink [WAYS],
  output logic [2:0]  l_ndinv [WAYS],
  output logic [1:0]  l_ncinv [WAYS],
  output conf_t       l_conf  [WAYS][NINV],
  output hot_t        l_hot   [WAYS],
  output logic [$clog2(SETS)-1:0]  l_set,
  // read-out of the selected way of the looked-up set; a_req counts a streaming access to it
  input  logic [$clog2(WAYS)-1:0]  r_way,
  input  logic        a_req,
  output logic [SLOT_W-1:0] r_count,
  output logic [2:0]  r_ndinv,
  output upc_t        r_dinv_pc  [MAX_DINV],
  output data_t       r_dinv_val [MAX_DINV],
  output upc_t        r_next,
  output cuop_t       r_uops [REGION_UOPS],
  // confidence update from prediction validation
  input  logic        upd_valid,
  input  logic [$clog2(SETS)-1:0]  upd_set,
  input  logic [$clog2(WAYS)-1:0]  upd_way,
  input  logic [2:0]  upd_inv,
  input  logic        upd_correct
);

  localparam int unsigned SW = $clog2(SETS);
  localparam int unsigned WW = $clog2(WAYS);
  localparam int unsigned DW = $clog2(DECAY_PERIOD + 1);

  logic              v_q     [SETS][WAYS];
  region_t           tag_q   [SETS][WAYS];
  logic [SLOT_W-1:0] cnt_q   [SETS][WAYS];
  logic [SLOT_W-1:0] shr_q   [SETS][WAYS];
  logic [2:0]        ndi_q   [SETS][WAYS];
  logic [1:0]        nci_q   [SETS][WAYS];
  conf_t             conf_q  [SETS][WAYS][NINV];
  hot_t              hot_q   [SETS][WAYS];
  upc_t              dpc_q   [SETS][WAYS][MAX_DINV];
  data_t             dval_q  [SETS][WAYS][MAX_DINV];
  upc_t              next_q  [SETS][WAYS];
  cuop_t             mem_q   [SETS][WAYS][REGION_UOPS];
  logic [DW-1:0]     decay_q;
  logic              decay, w_found;

  function automatic logic [SW-1:0] set_of(region_t r);
    return SW'(r % REGION_W'(SETS));
  endfunction

  always_comb begin
    l_set = set_of(l_region);
    for (int unsigned w = 0; w < WAYS; w++) begin
      l_hit[w]    = v_q[l_set][w] && tag_q[l_set][w] == l_region;
      l_shrink[w] = shr_q[l_set][w];
      l_ndinv[w]  = ndi_q[l_set][w];
      l_ncinv[w]  = nci_q[l_set][w];
      l_conf[w]   = conf_q[l_set][w];
      l_hot[w]    = hot_q[l_set][w];
    end
    r_count    = cnt_q[l_set][r_way];
    r_ndinv    = ndi_q[l_set][r_way];
    r_dinv_pc  = dpc_q[l_set][r_way];
    r_dinv_val = dval_q[l_set][r_way];
    r_next     = next_q[l_set][r_way];
    r_uops     = mem_q[l_set][r_way];
  end

  always_comb begin
    hot_t best;
    w_set   = set_of(w_region);
    w_way   = '0;
    w_found = 1'b0;
    best    = '1;
    for (int unsigned w = 0; w < WAYS; w++)
      if (!v_q[w_set][w] && !w_found) begin
        w_found = 1'b1;
        w_way   = WW'(w);
      end
    if (!w_found)
      for (int unsigned w = 0; w < WAYS; w++)
        if (!w_found || hot_q[w_set][w] < best) begin
          w_found = 1'b1;
          w_way   = WW'(w);
          best    = hot_q[w_set][w];
        end
  end

  assign decay = (decay_q == DW'(DECAY_PERIOD - 1));

  // ways of the looked-up set accessed this cycle
  logic [WAYS-1:0] acc;
  always_comb
    for (int unsigned w = 0; w < WAYS; w++)
      acc[w] = (l_req && l_hit[w]) || (a_req && r_way == WW'(w));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      decay_q <= '0;
      for (int unsigned s = 0; s < SETS; s++)
        for (int unsigned w = 0; w < WAYS; w++) begin
          v_q[s][w]   <= 1'b0;
          tag_q[s][w] <= '0;
          cnt_q[s][w] <= '0;
          shr_q[s][w] <= '0;
          ndi_q[s][w] <= '0;
          nci_q[s][w] <= '0;
          hot_q[s][w] <= '0;
          for (int unsigned i = 0; i < NINV; i++) conf_q[s][w][i] <= '0;
        end
    end else begin
      decay_q <= decay ? '0 : decay_q + 1'b1;
      for (int unsigned s = 0; s < SETS; s++)
        for (int unsigned w = 0; w < WAYS; w++)
          if (acc[w] && SW'(s) == l_set) begin
            if (!decay && hot_q[s][w] != '1) hot_q[s][w] <= hot_q[s][w] + 1'b1;
          end else if (decay && hot_q[s][w] != '0) begin
            hot_q[s][w] <= hot_q[s][w] - 1'b1;
          end
      if (upd_valid && upd_inv < 3'(NINV)) begin
        if (upd_correct && conf_q[upd_set][upd_way][upd_inv] != '1)
          conf_q[upd_set][upd_way][upd_inv] <= conf_q[upd_set][upd_way][upd_inv] + 1'b1;
        else if (!upd_correct && conf_q[upd_set][upd_way][upd_inv] != '0)
          conf_q[upd_set][upd_way][upd_inv] <= conf_q[upd_set][upd_way][upd_inv] - 1'b1;
      end
      if (w_valid) begin
        v_q[w_set][w_way]   <= 1'b1;
        tag_q[w_set][w_way] <= w_region;
        cnt_q[w_set][w_way] <= w_count;
        shr_q[w_set][w_way] <= w_shrink;
        ndi_q[w_set][w_way] <= w_ndinv;
        nci_q[w_set][w_way] <= w_ncinv;
        hot_q[w_set][w_way] <= hot_t'(HOT_INIT);
        for (int unsigned i = 0; i < NINV; i++)
          conf_q[w_set][w_way][i] <= conf_t'(CONF_INIT);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (w_valid) begin
      dpc_q[w_set][w_way]  <= w_dinv_pc;
      dval_q[w_set][w_way] <= w_dinv_val;
      next_q[w_set][w_way] <= w_next;
      mem_q[w_set][w_way]  <= w_uops;
    end
  end

endmodule
