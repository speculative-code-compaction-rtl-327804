// tb_scc_alu: self-checking test of the compaction unit's ALU.
// Drives random operands through every foldable operation and through the branch conditions,
// compares with a reference model written in the testbench, and checks that loads, stores,
// multiply, divide and floating point are reported as not foldable.
module tb_scc_alu;
  import scc_pkg::*;
  op_e op; cond_e cond; data_t a, b, result; logic [3:0] fin, fout; logic taken, foldable;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #1 clk = ~clk;

  scc_alu dut (.op, .cond, .a, .b, .flags_in(fin), .result, .flags_out(fout), .taken, .foldable);

  function automatic logic ref_cond(cond_e c, data_t x, data_t y);
    case (c)
      CC_EQ:  return x == y;
      CC_NE:  return x != y;
      CC_LT:  return $signed(x) < $signed(y);
      CC_GE:  return $signed(x) >= $signed(y);
      CC_LTU: return x < y;
      CC_GEU: return x >= y;
      default: return 0;
    endcase
  endfunction

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s op=%s a=%h b=%h", what, op.name(), a, b); end
  endtask

  initial begin
    #20000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    data_t exp;
    logic [3:0] flg;
    for (int it = 0; it < 300; it++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      if (it % 3 == 0) b = a;                       // exercise equality
      if (it % 5 == 0) b = data_t'($urandom_range(0, 70));
      fin = '0;
      for (int k = 0; k < 10; k++) begin
        op = op_e'(k); cond = CC_EQ; #1;
        case (op)
          OP_MOV: exp = b;  OP_ADD: exp = a + b;  OP_SUB: exp = a - b;
          OP_AND: exp = a & b;  OP_OR: exp = a | b;  OP_XOR: exp = a ^ b;
          OP_SHL: exp = a << b[5:0];  OP_SHR: exp = a >> b[5:0];
          OP_SAR: exp = $signed(a) >>> b[5:0];
          default: exp = '0;
        endcase
        if (op != OP_NOP) chk("result", result == exp && foldable);
      end
      // compare then branch on flags must agree with a direct reg-reg branch
      for (int c = 0; c < 6; c++) begin
        cond = cond_e'(c);
        op = OP_CMP; #1; flg = fout;
        op = OP_BR;  #1; chk("br", taken == ref_cond(cond, a, b));
        op = OP_JCC; fin = flg; #1; chk("jcc", taken == ref_cond(cond, a, b));
        fin = '0;
      end
      op = OP_JMP; #1; chk("jmp", taken);
      op = OP_LOAD; #1; chk("load nf", !foldable);
      op = OP_MUL;  #1; chk("mul nf", !foldable);
      op = OP_FP;   #1; chk("fp nf", !foldable);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
