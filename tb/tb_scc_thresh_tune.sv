// tb_scc_thresh_tune: self-checking test of the dynamic misprediction threshold.
// The tuner is built with a 16-cycle epoch and limits 2..6 (initial 4). Each epoch the test
// draws a misprediction rate, sometimes repeating the previous one exactly so that the
// "unchanged" case occurs, and raises `mispredict` on that many random cycles of the epoch.
// A reference model written in the testbench counts the events per epoch and applies the
// rule: more than the previous epoch -> +1, fewer -> -1, equal -> unchanged, clamped to the
// limits. `thresh`, `up` and `down` are compared every cycle. The test also counts that the
// threshold rose, fell, stayed, and hit both limits. A watchdog ends the run after 20000 cycles.
module tb_scc_thresh_tune;
  import scc_pkg::*;
  localparam int EPOCH = 16, TMIN = 2, TMAX = 6, TINIT = 4;

  logic clk = 0, rst_n = 0, mispredict = 0;
  conf_t thresh;
  logic up, down;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_same = 0, n_min = 0, n_max = 0;
  always #5 clk = ~clk;

  scc_thresh_tune #(.EPOCH(EPOCH), .THR_INIT(TINIT), .THR_MIN(TMIN), .THR_MAX(TMAX)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference model, updated at every rising edge
  int m_thr = TINIT, m_cnt = 0, m_prev = 0, m_ecnt = 0;
  logic m_up = 0, m_down = 0;
  always @(posedge clk) if (rst_n) begin
    int c;
    c = m_cnt + int'(mispredict);
    m_up = 0; m_down = 0;
    if (m_ecnt == EPOCH - 1) begin
      if (c > m_prev && m_thr < TMAX) begin m_thr++; m_up = 1; end
      else if (c < m_prev && m_thr > TMIN) begin m_thr--; m_down = 1; end
      else n_same++;
      if (m_thr == TMIN) n_min++;
      if (m_thr == TMAX) n_max++;
      m_prev = c; m_cnt = 0; m_ecnt = 0;
    end else begin
      m_cnt = c; m_ecnt++;
    end
  end

  // compare after the edge has settled
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (int'(thresh) != m_thr || up != m_up || down != m_down) begin
      failures++;
      $display("FAIL t=%0t thresh %0d/%0d up %0d/%0d down %0d/%0d", $time, thresh, m_thr, up, m_up,
               down, m_down);
    end
    n_up += int'(up); n_down += int'(down);
  end

  initial begin
    int rate, last_rate;
    repeat (2) @(negedge clk);
    checks++; if (thresh != conf_t'(TINIT)) failures++;
    rst_n = 1;
    last_rate = 0;
    for (int e = 0; e < 300; e++) begin
      // rising streaks, falling streaks and repeats
      case ($urandom_range(0, 3))
        0: rate = last_rate;
        1: rate = (last_rate < EPOCH) ? last_rate + 1 : EPOCH;
        2: rate = (last_rate > 0) ? last_rate - 1 : 0;
        default: rate = $urandom_range(0, EPOCH);
      endcase
      last_rate = rate;
      for (int c = 0; c < EPOCH; c++) begin
        // exactly `rate` events among the EPOCH cycles
        mispredict = ($urandom_range(0, EPOCH - c - 1) < rate);
        if (mispredict) rate--;
        @(negedge clk);
      end
    end
    mispredict = 0;
    @(negedge clk);
    checks++; if (n_up == 0 || n_down == 0 || n_same == 0 || n_min == 0 || n_max == 0) begin
      failures++; $display("FAIL coverage up=%0d down=%0d same=%0d min=%0d max=%0d",
                           n_up, n_down, n_same, n_min, n_max);
    end
    $display("up=%0d down=%0d same=%0d at_min=%0d at_max=%0d", n_up, n_down, n_same, n_min, n_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
