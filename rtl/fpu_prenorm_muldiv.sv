// fpu_prenorm_muldiv: pre-normalisation for multiplication and division.
//
// Splits both operands into sign, unbiased exponent and 24-bit significand.
// A subnormal significand is shifted left until its leading one reaches bit
// 23, and its exponent is lowered by the same count, so the multiplier and
// divider always see significands in [1, 2). The result sign is the XOR of
// the operand signs. The exponents are added (multiplication) and
// subtracted (division) here; both are unbiased and 12 bits wide, enough
// for the extreme products and quotients of subnormals. Zero, infinity and
// NaN operands give meaningless values here and are overridden by the
// exceptions unit.
//
// Adding the exponents before multiplying the fractions follows the
// published multiplication flow; normalising subnormal inputs and keeping the
// exponent unbiased are this design's choices. Purely combinational.
module fpu_prenorm_muldiv
  import fpu_pkg::*;
(
  input  fp32_t                   opa,
  input  fp32_t                   opb,
  output logic                    sign,
  output logic [MAN_W-1:0]        man_a,    // normalised, bit 23 set unless zero
  output logic [MAN_W-1:0]        man_b,
  output logic signed [EXP_W-1:0] exp_mul,  // exp(a) + exp(b)
  output logic signed [EXP_W-1:0] exp_div   // exp(a) - exp(b)
);

  // leading zeros of a 24-bit significand
  function automatic logic [4:0] lzc24(logic [MAN_W-1:0] m);
    logic [4:0] n;
    n = 5'd24;
    for (int i = 0; i < MAN_W; i++)
      if (m[i]) n = 5'(MAN_W - 1 - i);
    return n;
  endfunction

  logic [4:0] lza, lzb;
  logic signed [EXP_W-1:0] ea, eb;

  always_comb begin
    sign    = opa.sign ^ opb.sign;
    lza     = lzc24(significand(opa));
    lzb     = lzc24(significand(opb));
    man_a   = significand(opa) << lza;
    man_b   = significand(opb) << lzb;
    ea      = unbiased_exp(opa) - EXP_W'(lza);
    eb      = unbiased_exp(opb) - EXP_W'(lzb);
    exp_mul = ea + eb;
    exp_div = ea - eb;
  end

endmodule
