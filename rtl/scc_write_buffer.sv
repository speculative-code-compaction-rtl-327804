// scc_write_buffer: holds the compacted micro-ops of one compaction pass.
//
// The compaction unit appends one transformed micro-op per cycle (push). When the pass ends the
// whole buffer is either copied into the optimized micro-op cache partition or thrown away;
// both are done by the owner reading entries/count and then pulsing clear. DEPTH is 18, one
// 32-byte region's worth of fused micro-ops. A push when full is ignored and flagged. clear has
// priority over push.
module scc_write_buffer
  import scc_pkg::*;
#(
  parameter int unsigned DEPTH = REGION_UOPS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  input  logic                        push,
  input  cuop_t                       din,
  output logic [$clog2(DEPTH+1)-1:0]  count,
  output logic                        full,
  output logic                        overflow,
  output cuop_t                       entries [DEPTH]
);

  localparam int unsigned CW = $clog2(DEPTH+1);
  logic [CW-1:0] cnt_q;
  cuop_t         buf_q [DEPTH];

  assign count    = cnt_q;
  assign full     = (cnt_q == CW'(DEPTH));
  assign overflow = push && full && !clear;
  assign entries  = buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                cnt_q <= '0;
    else if (clear)            cnt_q <= '0;
    else if (push && !full)    cnt_q <= cnt_q + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!clear && push && !full) buf_q[cnt_q] <= din;
  end

endmodule
