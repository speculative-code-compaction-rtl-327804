// tb_scc_req_queue: self-checking test of the compaction request queue.
// Pushes random region addresses with random pops against a queue model in the testbench,
// checking order, the 6-entry capacity (drop when full), duplicate suppression and that a
// pushed request is at the head one cycle after it was pushed into an empty queue.
module tb_scc_req_queue;
  import scc_pkg::*;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, not_empty, full, dropped;
  region_t push_region, head;
  int checks = 0, failures = 0, drops = 0;
  region_t model[$];
  always #5 clk = ~clk;

  scc_req_queue #(.DEPTH(6)) dut (.clk, .rst_n, .push, .push_region, .pop, .not_empty, .head,
                                  .full, .dropped);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    push = 1; push_region = 43'h55; @(negedge clk); push = 0;
    checks++; if (!(not_empty && head == 43'h55)) failures++;    // 1-cycle latency
    pop = 1; @(negedge clk); pop = 0;
    for (int it = 0; it < 2000; it++) begin
      logic dup, exp_drop, do_pop;
      push = ($urandom_range(0, 2) != 0);
      push_region = region_t'($urandom_range(0, 9));
      pop  = (it > 200) && ($urandom_range(0, 2) == 0);
      do_pop = pop && model.size() > 0;
      dup = 0;
      foreach (model[i]) if (model[i] == push_region) dup = 1;
      exp_drop = push && !dup && model.size() == 6 && !do_pop;
      #1;
      checks++; if (not_empty != (model.size() > 0)) failures++;
      checks++; if (full != (model.size() == 6)) failures++;
      if (model.size() > 0) begin checks++; if (head != model[0]) failures++; end
      checks++; if (dropped != exp_drop) failures++;
      if (dropped) drops++;
      @(posedge clk);
      if (do_pop) void'(model.pop_front());
      if (push && !dup && !exp_drop) model.push_back(push_region);
      @(negedge clk);
    end
    checks++; if (drops == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
