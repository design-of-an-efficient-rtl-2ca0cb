// fpu_addsub: significand adder/subtractor of the FPU.
//
// Takes the aligned significands from fpu_prenorm_addsub (X is the larger
// magnitude, so X - Y never goes negative) and forms X + Y or X - Y on a
// 48-bit Brent-Kung adder: subtraction adds the one's complement of Y with a
// carry-in of 1. The result sign is X's sign, except that an exact zero
// from a true subtraction is +0, or -0 when rounding toward -infinity, as
// IEEE 754 requires. The raw sum goes on to post-normalisation with X's
// exponent; its value is man/2^46 * 2^exp.
//
// Using the Brent-Kung adder for the significand follows the published
// design; the 48-bit width and the zero-sign rule are this design's choices.
// Purely combinational. An assertion checks the X >= Y precondition.
module fpu_addsub
  import fpu_pkg::*;
(
  input  logic                    eff_sub,
  input  logic                    sign_x,
  input  logic signed [EXP_W-1:0] exp_x,
  input  logic [RAW_W-1:0]        man_x,
  input  logic [RAW_W-1:0]        man_y,
  input  rmode_e                  rmode,
  output logic                    sign,
  output logic signed [EXP_W-1:0] exp,
  output logic [RAW_W-1:0]        man
);

  logic [RAW_W-1:0] y_in, s;
  logic             co;

  assign y_in = eff_sub ? ~man_y : man_y;

  bk_adder #(.WIDTH(RAW_W)) u_bk (
    .a   (man_x),
    .b   (y_in),
    .cin (eff_sub),
    .sum (s),
    .cout(co)
  );

  always_comb begin
    man = s;
    exp = exp_x;
    if (s == '0 && eff_sub) sign = (rmode == RND_DOWN);
    else                    sign = sign_x;
  end

  // The pre-normalisation orders the operands by magnitude; a negative
  // difference would mean it did not.
  always_comb
    if (eff_sub) assert (man_x >= man_y) else $error("fpu_addsub: X smaller than Y");

endmodule
