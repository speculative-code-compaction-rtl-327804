// scc_thresh_tune: dynamic misprediction threshold for the profitability analysis.
//
// An optimized stream is streamed only while the confidence counters of its control
// invariants stay at or above a threshold. This block adapts that threshold to the trend of
// mispredictions. It counts the mispredicted prediction sources reported by the back end
// (`mispredict`, one pulse per wrong invariant) over a fixed epoch of EPOCH cycles, and at the
// end of every epoch compares the count with that of the previous epoch:
//   more mispredictions than before  -> threshold + 1 (stricter, saturating at THR_MAX);
//   fewer mispredictions than before -> threshold - 1 (more permissive, down to THR_MIN);
//   equal                            -> unchanged.
// Interface: `mispredict` is sampled every cycle; `thresh` is a registered output that
// changes only in the cycle after an epoch ends; `up`/`down` pulse in that cycle for
// statistics. The epoch counter and the event counters are cleared by reset.
// The document states only that the threshold "is tuned on the basis of the rate at which
// mispredictions increase or decrease"; the epoch length, the step of one, the limits and the
// initial value are this design's choices. The misprediction count saturates at its width.
module scc_thresh_tune
  import scc_pkg::*;
#(
  parameter int unsigned EPOCH    = 1024,   // cycles per observation window
  parameter int unsigned THR_INIT = 4,
  parameter int unsigned THR_MIN  = 1,
  parameter int unsigned THR_MAX  = (1 << CONF_W) - 1,
  parameter int unsigned CNT_W    = 12      // misprediction counter width
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  mispredict,
  output conf_t thresh,
  output logic  up,
  output logic  down
);

  localparam int unsigned EW = $clog2(EPOCH);

  logic [EW-1:0]    ecnt_q;
  logic [CNT_W-1:0] cur_q, prev_q, cur_n;
  logic             epoch_end;

  assign epoch_end = (ecnt_q == EW'(EPOCH - 1));
  // saturating count including this cycle's event
  assign cur_n     = (mispredict && cur_q != '1) ? cur_q + 1'b1 : cur_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ecnt_q <= '0;
      cur_q  <= '0;
      prev_q <= '0;
      thresh <= conf_t'(THR_INIT);
      up     <= 1'b0;
      down   <= 1'b0;
    end else begin
      up   <= 1'b0;
      down <= 1'b0;
      if (epoch_end) begin
        ecnt_q <= '0;
        cur_q  <= '0;
        prev_q <= cur_n;
        if (cur_n > prev_q && thresh < conf_t'(THR_MAX)) begin
          thresh <= thresh + 1'b1;
          up     <= 1'b1;
        end else if (cur_n < prev_q && thresh > conf_t'(THR_MIN)) begin
          thresh <= thresh - 1'b1;
          down   <= 1'b1;
        end
      end else begin
        ecnt_q <= ecnt_q + 1'b1;
        cur_q  <= cur_n;
      end
    end
  end

endmodule
