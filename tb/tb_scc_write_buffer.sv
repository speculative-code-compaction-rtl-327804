// tb_scc_write_buffer: self-checking test of the 18-entry compaction write buffer.
// Fills it with numbered micro-ops, checks count, contents, the full flag, overflow on the
// 19th push, and that clear empties it.
module tb_scc_write_buffer;
  import scc_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, full, overflow;
  cuop_t din;
  logic [4:0] count;
  cuop_t entries [18];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  scc_write_buffer #(.DEPTH(18)) dut (.clk, .rst_n, .clear, .push, .din, .count, .full,
                                      .overflow, .entries);

  task automatic chk(logic ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      int n;
      n = (r == 0) ? 19 : $urandom_range(1, 17);
      for (int i = 0; i < n; i++) begin
        din = '0; din.u.imm = data_t'(1000 * r + i); din.pc.slot = slot_t'(i);
        push = 1; #1;
        chk(overflow == (i >= 18), "overflow");
        @(negedge clk);
      end
      push = 0; #1;
      chk(count == 5'(n > 18 ? 18 : n), "count");
      chk(full == (n >= 18), "full");
      for (int i = 0; i < 18 && i < n; i++) chk(entries[i].u.imm == data_t'(1000 * r + i), "data");
      clear = 1; @(negedge clk); clear = 0; #1;
      chk(count == 0, "clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
