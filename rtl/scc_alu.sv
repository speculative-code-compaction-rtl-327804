// scc_alu: the small integer ALU of the compaction unit.
//
// Evaluates a micro-op whose operands are all speculatively known so that it can be folded
// away: moves, add/sub, and/or/xor and shifts (shift count = low 6 bits of b), a compare that
// produces the condition codes {N,Z,C,V}, and the taken/not-taken outcome of a branch, either
// from two register values (OP_BR) or from the condition codes (OP_JCC). Loads, stores,
// multiply, divide and floating point are not evaluated (foldable = 0), as the unit is
// restricted to simple operations. Purely combinational. The operation set follows the
// document; the flag layout and the shift-count rule are this design's choices.
module scc_alu
  import scc_pkg::*;
(
  input  op_e         op,
  input  cond_e       cond,
  input  data_t       a,          // src1 value
  input  data_t       b,          // src2 or immediate value
  input  logic [3:0]  flags_in,   // {N,Z,C,V}
  output data_t       result,
  output logic [3:0]  flags_out,
  output logic        taken,
  output logic        foldable
);

  logic [DATA_W:0] diff;
  logic            n, z, c, v;

  always_comb begin
    diff = {1'b0, a} - {1'b0, b};
    n    = diff[DATA_W-1];
    z    = (diff[DATA_W-1:0] == '0);
    c    = diff[DATA_W];                                   // borrow: a <u b
    v    = (a[DATA_W-1] != b[DATA_W-1]) && (diff[DATA_W-1] != a[DATA_W-1]);
  end

  function automatic logic eval_cond(cond_e cc, logic fn, logic fz, logic fc, logic fv);
    unique case (cc)
      CC_EQ:   return fz;
      CC_NE:   return !fz;
      CC_LT:   return fn != fv;
      CC_GE:   return fn == fv;
      CC_LTU:  return fc;
      CC_GEU:  return !fc;
      default: return 1'b0;
    endcase
  endfunction

  always_comb begin
    result    = '0;
    flags_out = flags_in;
    taken     = 1'b0;
    foldable  = 1'b1;
    unique case (op)
      OP_MOV:  result = b;
      OP_ADD:  result = a + b;
      OP_SUB:  result = diff[DATA_W-1:0];
      OP_AND:  result = a & b;
      OP_OR:   result = a | b;
      OP_XOR:  result = a ^ b;
      OP_SHL:  result = a << b[5:0];
      OP_SHR:  result = a >> b[5:0];
      OP_SAR:  result = data_t'($signed(a) >>> b[5:0]);
      OP_CMP:  flags_out = {n, z, c, v};
      OP_BR:   taken = eval_cond(cond, n, z, c, v);
      OP_JCC:  taken = eval_cond(cond, flags_in[3], flags_in[2], flags_in[1], flags_in[0]);
      OP_JMP:  taken = 1'b1;
      OP_NOP:  ;
      default: foldable = 1'b0;
    endcase
  end

endmodule
