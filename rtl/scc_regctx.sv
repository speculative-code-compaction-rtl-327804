// scc_regctx: register context table of the compaction unit.
//
// One entry per integer register plus one for the condition codes (index FLAGS_IDX). Each entry
// holds a valid bit (a speculatively known live value exists), the value, and a pending bit
// that marks a value produced by a micro-op that was folded away and so not yet visible to the
// rest of the pipeline; pending values are the ones that must be inlined as live-outs.
// Two combinational read ports (sources) and one write port; a write sets or clears valid and
// pending. `clear` empties the table at the start of each compaction pass; `clr_pending`
// clears the pending bits of the given mask (values handed to rename as live-outs), applied
// before the write port in the same cycle. All updates take effect on the next clock edge.
// The table itself follows the document; the pending bit is this design's way of choosing which
// live values to inline.
module scc_regctx
  import scc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  ctx_t              ra,
  output logic              ra_valid,
  output data_t             ra_val,
  input  ctx_t              rb,
  output logic              rb_valid,
  output data_t             rb_val,
  input  logic              we,
  input  ctx_t              wa,
  input  logic              w_valid,
  input  logic              w_pending,
  input  data_t             w_val,
  input  logic [CTX_N-1:0]  clr_pending,
  output logic [CTX_N-1:0]  valid_o,
  output logic [CTX_N-1:0]  pending_o,
  output data_t             val_o [CTX_N]
);

  logic [CTX_N-1:0] valid_q, pend_q;
  data_t            val_q [CTX_N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      pend_q  <= '0;
    end else if (clear) begin
      valid_q <= '0;
      pend_q  <= '0;
    end else begin
      pend_q <= pend_q & ~clr_pending;
      if (we) begin
        valid_q[wa] <= w_valid;
        pend_q[wa]  <= w_valid & w_pending;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (we && !clear) val_q[wa] <= w_val;
  end

  always_comb begin
    ra_valid = (ra < CTX_W'(CTX_N)) ? valid_q[ra] : 1'b0;
    ra_val   = (ra < CTX_W'(CTX_N)) ? val_q[ra]   : '0;
    rb_valid = (rb < CTX_W'(CTX_N)) ? valid_q[rb] : 1'b0;
    rb_val   = (rb < CTX_W'(CTX_N)) ? val_q[rb]   : '0;
  end

  assign valid_o   = valid_q;
  assign pending_o = pend_q;
  assign val_o     = val_q;

endmodule
