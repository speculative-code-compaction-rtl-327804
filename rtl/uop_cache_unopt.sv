// uop_cache_unopt: the unoptimized partition of the micro-op cache.
//
// SETS x WAYS lines of LINE_UOPS decoded micro-ops; a 32-byte code region occupies up to three
// lines (ways) of one set, numbered 0..2. The set is the region address modulo SETS and the
// whole region address is kept as the tag. Each line's tag entry is extended with a lock bit
// and a hotness counter.
//   * Fill (from the legacy decoder): writes one line. A line with the same region and number
//     is overwritten; otherwise an invalid way, else the unlocked way with the lowest hotness
//     is replaced. A fill finding every way locked is dropped.
//   * Fetch read (f_req): returns the line f_line of region f_region combinationally and counts
//     an access: the line's hotness is incremented. When the hotness of line 0 of a region
//     reaches HOT_THRESH a compaction request for that region is raised (req_valid, one cycle).
//   * Compaction read: returns the micro-op in slot s_pc.slot of region s_pc.region
//     (line slot/6, position slot%6) combinationally; no hotness change.
//   * lock_set locks every resident line of lock_region, lock_clr unlocks all lines; locked
//     lines are not replaced.
//   * All hotness counters are decremented every DECAY_PERIOD cycles (28 in the document).
// The partition, the lock bit, the hotness counters and their decay period follow the
// document; the modulo set index, the full-region tag, HOT_THRESH and the counter width are
// this design's choices.
module uop_cache_unopt
  import scc_pkg::*;
#(
  parameter int unsigned SETS         = 36,
  parameter int unsigned WAYS         = 8,
  parameter int unsigned DECAY_PERIOD = 28,
  parameter int unsigned HOT_THRESH   = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  // fill
  input  logic     fill_valid,
  input  region_t  fill_region,
  input  logic [1:0] fill_line,
  input  logic [2:0] fill_nuops,
  input  uop_t     fill_uops [LINE_UOPS],
  // fetch read
  input  logic     f_req,
  input  region_t  f_region,
  input  logic [1:0] f_line,
  output logic     f_hit,
  output logic [2:0] f_nuops,
  output logic     f_last,
  output uop_t     f_uops [LINE_UOPS],
  // compaction read
  input  upc_t     s_pc,
  output logic     s_hit,
  output uop_t     s_uop,
  // locking
  input  logic     lock_set,
  input  logic     lock_clr,
  input  region_t  lock_region,
  // compaction request
  output logic     req_valid,
  output region_t  req_region,
  output logic     fill_dropped
);

  localparam int unsigned SW = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WW = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned DW = $clog2(DECAY_PERIOD + 1);

  logic       v_q    [SETS][WAYS];
  region_t    tag_q  [SETS][WAYS];
  logic [1:0] ln_q   [SETS][WAYS];
  logic [2:0] n_q    [SETS][WAYS];
  logic       lock_q [SETS][WAYS];
  hot_t       hot_q  [SETS][WAYS];
  uop_t       mem_q  [SETS][WAYS][LINE_UOPS];
  logic [DW-1:0] decay_q;

  function automatic logic [SW-1:0] set_of(region_t r);
    return SW'(r % REGION_W'(SETS));
  endfunction

  // ---------------- lookups ----------------
  logic [SW-1:0] f_set, s_set, fl_set, lk_set;
  logic [WW-1:0] f_way, s_way, fl_way;
  logic          fl_found, fl_hit;
  logic [1:0]    s_line;
  logic [2:0]    s_pos;
  logic          decay;

  always_comb begin
    f_set = set_of(f_region);
    f_hit = 1'b0;
    f_way = '0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (v_q[f_set][w] && tag_q[f_set][w] == f_region && ln_q[f_set][w] == f_line) begin
        f_hit = 1'b1;
        f_way = WW'(w);
      end
    f_nuops = n_q[f_set][f_way];
    f_uops  = mem_q[f_set][f_way];
    f_last  = 1'b0;
    for (int unsigned i = 0; i < LINE_UOPS; i++)
      if (3'(i) < f_nuops && mem_q[f_set][f_way][i].eor) f_last = 1'b1;
  end

  always_comb begin
    s_set  = set_of(s_pc.region);
    s_line = 2'(s_pc.slot / SLOT_W'(LINE_UOPS));
    s_pos  = 3'(s_pc.slot % SLOT_W'(LINE_UOPS));
    s_hit  = 1'b0;
    s_way  = '0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (v_q[s_set][w] && tag_q[s_set][w] == s_pc.region && ln_q[s_set][w] == s_line &&
          s_pos < n_q[s_set][w]) begin
        s_hit = 1'b1;
        s_way = WW'(w);
      end
    s_uop = mem_q[s_set][s_way][s_pos];
  end

  // fill victim
  always_comb begin
    hot_t best;
    fl_set   = set_of(fill_region);
    fl_found = 1'b0;
    fl_hit   = 1'b0;
    fl_way   = '0;
    best     = '1;
    for (int unsigned w = 0; w < WAYS; w++)
      if (v_q[fl_set][w] && tag_q[fl_set][w] == fill_region && ln_q[fl_set][w] == fill_line) begin
        fl_hit = 1'b1;
        fl_way = WW'(w);
      end
    if (fl_hit) begin
      fl_found = 1'b1;
    end else begin
      for (int unsigned w = 0; w < WAYS; w++)
        if (!v_q[fl_set][w] && !fl_found) begin
          fl_found = 1'b1;
          fl_way   = WW'(w);
        end
      if (!fl_found)
        for (int unsigned w = 0; w < WAYS; w++)
          if (!lock_q[fl_set][w] && (!fl_found || hot_q[fl_set][w] < best)) begin
            fl_found = 1'b1;
            fl_way   = WW'(w);
            best     = hot_q[fl_set][w];
          end
    end
  end

  assign lk_set       = set_of(lock_region);
  assign decay        = (decay_q == DW'(DECAY_PERIOD - 1));
  assign fill_dropped = fill_valid && !fl_found;
  assign req_valid    = f_req && f_hit && f_line == 2'd0 && hot_q[f_set][f_way] == hot_t'(HOT_THRESH - 1);
  assign req_region   = f_region;

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      decay_q <= '0;
      for (int unsigned s = 0; s < SETS; s++)
        for (int unsigned w = 0; w < WAYS; w++) begin
          v_q[s][w]    <= 1'b0;
          lock_q[s][w] <= 1'b0;
          hot_q[s][w]  <= '0;
          tag_q[s][w]  <= '0;
          ln_q[s][w]   <= '0;
          n_q[s][w]    <= '0;
        end
    end else begin
      decay_q <= decay ? '0 : decay_q + 1'b1;
      if (decay)
        for (int unsigned s = 0; s < SETS; s++)
          for (int unsigned w = 0; w < WAYS; w++)
            if (hot_q[s][w] != '0) hot_q[s][w] <= hot_q[s][w] - 1'b1;
      if (f_req && f_hit && hot_q[f_set][f_way] != '1)
        hot_q[f_set][f_way] <= decay && hot_q[f_set][f_way] != '0 ? hot_q[f_set][f_way]
                                                                  : hot_q[f_set][f_way] + 1'b1;
      if (lock_clr)
        for (int unsigned s = 0; s < SETS; s++)
          for (int unsigned w = 0; w < WAYS; w++) lock_q[s][w] <= 1'b0;
      if (lock_set)
        for (int unsigned w = 0; w < WAYS; w++)
          if (v_q[lk_set][w] && tag_q[lk_set][w] == lock_region) lock_q[lk_set][w] <= 1'b1;
      if (fill_valid && fl_found) begin
        v_q[fl_set][fl_way]   <= 1'b1;
        tag_q[fl_set][fl_way] <= fill_region;
        ln_q[fl_set][fl_way]  <= fill_line;
        n_q[fl_set][fl_way]   <= fill_nuops;
        if (!fl_hit) hot_q[fl_set][fl_way] <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fill_valid && fl_found) mem_q[fl_set][fl_way] <= fill_uops;
  end

endmodule
