// fpu_top: single precision (IEEE 754 binary32) floating point unit.
//
// Computes opa + opb, opa - opb, opa * opb or opa / opb, selected by fpu_op
// (0, 1, 2, 3), rounded in the mode given by mode (0 nearest-even, 1 toward
// zero, 2 toward +inf, 3 toward -inf). Subnormal operands and results are
// supported. Structure:
//   opa, opb -> fpu_prenorm_addsub -> fpu_addsub (48-bit Brent-Kung adder)
//            -> fpu_prenorm_muldiv -> booth_mul (radix-4 Booth, 25x25 bits)
//                                  -> fpu_div (restoring divider)
//   the selected raw result      -> fpu_postnorm (normalise, round, pack)
//   operand classes, final result -> fpu_except (special cases and flags)
// Outputs: result, zero, and the flags snan, qnan, inf, ine, overflow,
// underflow, div_by_zero.
//
// Timing: the whole unit is one combinational path from operands to result;
// there is no clock and the result is valid one propagation delay after the
// inputs change. The block structure, the Brent-Kung adder and the radix-4
// Booth multiplier follow the published FPU; the operation and rounding
// encodings, the divider, the subnormal support and the overflow and
// underflow outputs are this design's choices.
module fpu_top
  import fpu_pkg::*;
(
  input  logic [31:0] opa,
  input  logic [31:0] opb,
  input  logic [1:0]  fpu_op,
  input  logic [1:0]  mode,
  output logic [31:0] result,
  output logic        zero,
  output logic        snan,
  output logic        qnan,
  output logic        inf,
  output logic        ine,
  output logic        overflow,
  output logic        underflow,
  output logic        div_by_zero
);

  fp32_t   a, b;
  fpu_op_e op;
  rmode_e  rm;
  assign a  = fp32_t'(opa);
  assign b  = fp32_t'(opb);
  assign op = fpu_op_e'(fpu_op);
  assign rm = rmode_e'(mode);

  // ---- add / subtract path
  logic                    as_eff_sub, as_sign_x, as_sign;
  logic signed [EXP_W-1:0] as_exp_x, as_exp;
  logic [RAW_W-1:0]        as_man_x, as_man_y, as_man;

  fpu_prenorm_addsub u_pre_as (
    .opa(a), .opb(b), .sub(op == FPU_SUB),
    .eff_sub(as_eff_sub), .sign_x(as_sign_x), .exp_x(as_exp_x),
    .man_x(as_man_x), .man_y(as_man_y)
  );

  fpu_addsub u_addsub (
    .eff_sub(as_eff_sub), .sign_x(as_sign_x), .exp_x(as_exp_x),
    .man_x(as_man_x), .man_y(as_man_y), .rmode(rm),
    .sign(as_sign), .exp(as_exp), .man(as_man)
  );

  // ---- multiply / divide path
  logic                    md_sign;
  logic [MAN_W-1:0]        md_man_a, md_man_b;
  logic signed [EXP_W-1:0] md_exp_mul, md_exp_div;
  logic signed [2*MAN_W+1:0] mul_p;
  logic [RAW_W-1:0]        div_man;
  logic                    div_sticky;

  fpu_prenorm_muldiv u_pre_md (
    .opa(a), .opb(b),
    .sign(md_sign), .man_a(md_man_a), .man_b(md_man_b),
    .exp_mul(md_exp_mul), .exp_div(md_exp_div)
  );

  // unsigned 24-bit significands enter the signed multiplier with a 0 sign bit
  booth_mul #(.WIDTH(MAN_W + 1)) u_mul (
    .a({1'b0, md_man_a}),
    .b({1'b0, md_man_b}),
    .p(mul_p)
  );

  fpu_div u_div (
    .man_a(md_man_a), .man_b(md_man_b),
    .man(div_man), .sticky(div_sticky)
  );

  // ---- select the raw result for post-normalisation
  logic                    pn_sign, pn_sticky;
  logic signed [EXP_W-1:0] pn_exp;
  logic [RAW_W-1:0]        pn_man;

  always_comb begin
    unique case (op)
      FPU_MUL: begin
        pn_sign = md_sign;  pn_exp = md_exp_mul;
        pn_man  = RAW_W'(mul_p);  pn_sticky = 1'b0;
      end
      FPU_DIV: begin
        pn_sign = md_sign;  pn_exp = md_exp_div;
        pn_man  = div_man;  pn_sticky = div_sticky;
      end
      default: begin
        pn_sign = as_sign;  pn_exp = as_exp;
        pn_man  = as_man;   pn_sticky = 1'b0;
      end
    endcase
  end

  logic        special, pn_inexact, pn_overflow, pn_underflow;
  logic [31:0] special_result;

  fpu_postnorm u_post (
    .sign(pn_sign), .exp(pn_exp), .man(pn_man), .sticky(pn_sticky),
    .rmode(rm), .special, .special_result,
    .result, .zero,
    .inexact(pn_inexact), .overflow(pn_overflow), .underflow(pn_underflow)
  );

  fpu_except u_exc (
    .opa(a), .opb(b), .fpu_op(op),
    .special, .special_result,
    .result, .pn_inexact, .pn_overflow, .pn_underflow,
    .snan, .qnan, .inf, .ine, .overflow, .underflow, .div_by_zero
  );

endmodule
