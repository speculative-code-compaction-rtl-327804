// tb_scc_regctx: self-checking test of the register context table.
// Random writes, pending-clears and clears are applied to the table and to a model in the
// testbench; both read ports, the valid/pending vectors and the values are compared each cycle.
module tb_scc_regctx;
  import scc_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, we = 0, w_valid, w_pending, ra_valid, rb_valid;
  ctx_t ra, rb, wa;
  data_t ra_val, rb_val, w_val;
  logic [CTX_N-1:0] clr_pending, valid_o, pending_o;
  data_t val_o [CTX_N];
  logic [CTX_N-1:0] mv, mp;
  data_t mval [CTX_N];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  scc_regctx dut (.clk, .rst_n, .clear, .ra, .ra_valid, .ra_val, .rb, .rb_valid, .rb_val, .we,
                  .wa, .w_valid, .w_pending, .w_val, .clr_pending, .valid_o, .pending_o, .val_o);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    mv = '0; mp = '0; clr_pending = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      clear = ($urandom_range(0, 200) == 0);
      we = $urandom_range(0, 1);
      wa = ctx_t'($urandom_range(0, CTX_N - 1));
      w_valid = $urandom_range(0, 3) != 0;
      w_pending = $urandom_range(0, 1);
      w_val = {$urandom, $urandom};
      clr_pending = ($urandom_range(0, 3) == 0) ? {$urandom, $urandom} : '0;
      ra = ctx_t'($urandom_range(0, CTX_N - 1));
      rb = ctx_t'($urandom_range(0, CTX_N - 1));
      #1;
      checks++; if (ra_valid != mv[ra] || (mv[ra] && ra_val != mval[ra])) failures++;
      checks++; if (rb_valid != mv[rb] || (mv[rb] && rb_val != mval[rb])) failures++;
      checks++; if (valid_o != mv || pending_o != mp) failures++;
      @(posedge clk);
      if (clear) begin mv = '0; mp = '0; end
      else begin
        mp = mp & ~clr_pending;
        if (we) begin mv[wa] = w_valid; mp[wa] = w_valid & w_pending; mval[wa] = w_val; end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
