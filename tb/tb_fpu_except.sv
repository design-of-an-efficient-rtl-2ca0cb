// tb_fpu_except: self-checking test of the exceptions unit. For operand
// pairs drawn from zeros, infinities, quiet and signalling NaNs, subnormals
// and normal numbers, in all four operations, it checks whether the unit
// claims a special case, and if so the special result, against the
// fp32_ref_pkg reference; and it checks the snan and div_by_zero flags, the
// qnan/inf flags derived from a result, and that the rounding flags pass
// through.
module tb_fpu_except;
  import fpu_pkg::*;
  import fp32_ref_pkg::*;
  fp32_t   opa, opb;
  fpu_op_e fpu_op;
  logic special, pn_inexact, pn_overflow, pn_underflow;
  logic [31:0] special_result, result;
  logic snan, qnan, inf, ine, overflow, underflow, div_by_zero;
  int checks = 0, failures = 0;

  fpu_except dut (.*);

  initial begin
    #(64'd1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pick();
    logic [31:0] x;
    x = $urandom;
    case ($urandom % 6)
      0: x = {x[31], 31'd0};
      1: x = {x[31], 8'hFF, 23'd0};
      2: x = {x[31], 8'hFF, 1'b1, x[21:0]};
      3: x = {x[31], 8'hFF, 1'b0, x[21:1], 1'b1};
      4: x[30:23] = 8'd0;
      default: if (x[30:23] == 8'hFF) x[30:23] = 8'h80;
    endcase
    return x;
  endfunction

  task automatic apply(logic [31:0] a, logic [31:0] b, logic [1:0] op);
    ref_t r;
    logic want_special;
    logic [2:0] fl;
    opa = a; opb = b; fpu_op = fpu_op_e'(op);
    result = pick();
    fl = 3'($urandom);
    {pn_inexact, pn_overflow, pn_underflow} = fl;
    #1;
    r = fp_ref(a, b, op, 2'd0);
    want_special = is_nan(a) || is_nan(b) || is_inf(a) || is_inf(b) ||
                   (op >= 2 && (is_zero(a) || is_zero(b)));
    checks++;
    if (special !== want_special || (want_special && special_result !== r.res) ||
        snan !== r.snan || div_by_zero !== r.dbz || qnan !== is_nan(result) ||
        inf !== is_inf(result) || {ine, overflow, underflow} !== fl) begin
      failures++;
      if (failures <= 10) $display("FAIL a=%h b=%h op=%0d: sp=%b %h snan%b dbz%b want sp=%b %h %b %b",
                                   a, b, op, special, special_result, snan, div_by_zero,
                                   want_special, r.res, r.snan, r.dbz);
    end
  endtask

  initial begin
    for (int op = 0; op < 4; op++) begin
      apply(32'h7F800000, 32'hFF800000, 2'(op));
      apply(32'h00000000, 32'h7F800000, 2'(op));
      apply(32'h00000000, 32'h80000000, 2'(op));
      apply(32'h3F800000, 32'h00000000, 2'(op));
      apply(32'h7FA00000, 32'h3F800000, 2'(op));
    end
    for (int k = 0; k < 50000; k++) apply(pick(), pick(), 2'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
