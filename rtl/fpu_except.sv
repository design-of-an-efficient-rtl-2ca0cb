// fpu_except: exceptions unit of the FPU.
//
// Classifies both operands (zero, subnormal, infinity, quiet/signalling NaN)
// and decides, for the selected operation, whether the result is a special
// case that bypasses the arithmetic path:
//   - any NaN operand, or an invalid operation (inf - inf as a true
//     subtraction, 0 * inf, 0 / 0, inf / inf), gives the quiet NaN 7FC00000;
//   - an infinite operand, or finite nonzero / 0, gives a signed infinity;
//   - 0 * x, 0 / x and x / inf give a signed zero.
// special / special_result go to the post-normalise unit, which selects them.
// The flags are then formed from the final result and the rounding flags:
// snan (a signalling NaN operand), qnan (result is NaN), inf (result is
// infinite), ine (inexact), overflow, underflow and div_by_zero.
//
// The flag names follow the published block diagram; which cases raise
// them, the canonical NaN and the overflow/underflow outputs are this
// design's choices, made to follow IEEE 754. Purely combinational.
module fpu_except
  import fpu_pkg::*;
(
  input  fp32_t       opa,
  input  fp32_t       opb,
  input  fpu_op_e     fpu_op,
  output logic        special,
  output logic [31:0] special_result,
  // rounding flags and final result from the post-normalise unit
  input  logic [31:0] result,
  input  logic        pn_inexact,
  input  logic        pn_overflow,
  input  logic        pn_underflow,
  output logic        snan,
  output logic        qnan,
  output logic        inf,
  output logic        ine,
  output logic        overflow,
  output logic        underflow,
  output logic        div_by_zero
);

  fp_class_t ca, cb;
  logic      sb, sx, dbz;

  assign ca = classify(opa);
  assign cb = classify(opb);

  always_comb begin
    special        = 1'b0;
    special_result = QNAN;
    dbz            = 1'b0;
    sb             = opb.sign ^ (fpu_op == FPU_SUB);
    sx             = opa.sign ^ opb.sign;
    if (ca.is_nan || cb.is_nan) begin
      special = 1'b1;
    end else begin
      unique case (fpu_op)
        FPU_ADD, FPU_SUB: begin
          if (ca.is_inf && cb.is_inf) begin
            special = 1'b1;
            special_result = (opa.sign == sb) ? {opa.sign, 8'hFF, 23'd0} : QNAN;
          end else if (ca.is_inf) begin
            special = 1'b1;
            special_result = {opa.sign, 8'hFF, 23'd0};
          end else if (cb.is_inf) begin
            special = 1'b1;
            special_result = {sb, 8'hFF, 23'd0};
          end
        end
        FPU_MUL: begin
          if ((ca.is_inf && cb.is_zero) || (ca.is_zero && cb.is_inf)) begin
            special = 1'b1;
          end else if (ca.is_inf || cb.is_inf) begin
            special = 1'b1;
            special_result = {sx, 8'hFF, 23'd0};
          end else if (ca.is_zero || cb.is_zero) begin
            special = 1'b1;
            special_result = {sx, 31'd0};
          end
        end
        FPU_DIV: begin
          if ((ca.is_zero && cb.is_zero) || (ca.is_inf && cb.is_inf)) begin
            special = 1'b1;
          end else if (ca.is_inf) begin
            special = 1'b1;
            special_result = {sx, 8'hFF, 23'd0};
          end else if (cb.is_zero) begin
            special = 1'b1;
            dbz     = 1'b1;
            special_result = {sx, 8'hFF, 23'd0};
          end else if (ca.is_zero || cb.is_inf) begin
            special = 1'b1;
            special_result = {sx, 31'd0};
          end
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    snan        = ca.is_snan || cb.is_snan;
    qnan        = (result[30:23] == 8'hFF) && (result[22:0] != 23'd0);
    inf         = (result[30:23] == 8'hFF) && (result[22:0] == 23'd0);
    ine         = pn_inexact;
    overflow    = pn_overflow;
    underflow   = pn_underflow;
    div_by_zero = dbz;
  end

endmodule
