// fpu_prenorm_addsub: pre-normalisation for addition and subtraction.
//
// Splits both binary32 operands into sign, exponent and significand (the
// implicit bit made explicit; a subnormal or zero uses exponent 1 with a 0
// implicit bit). The subtract operation flips B's sign. The signs are
// compared to decide between a true addition and a true subtraction
// (eff_sub). The exponents are compared, and on equal exponents the
// significands, so that the larger magnitude becomes operand X and the
// smaller operand Y. A subtractor forms the exponent difference, and Y's
// significand is shifted right by it. Both significands sit in a 48-bit
// field at bits 46..23 (bit 47 is head room for a carry, bits 22..0 are guard
// bits); bits shifted out below bit 0 are ORed into bit 0 ("sticky jam"),
// which keeps rounding exact.
//
// The comparison/subtraction/shift structure follows the published
// preprocessing diagram; the field layout, the sticky jam and the choice to
// order operands by magnitude are this design's. Purely combinational.
module fpu_prenorm_addsub
  import fpu_pkg::*;
(
  input  fp32_t                   opa,
  input  fp32_t                   opb,
  input  logic                    sub,        // 1: A - B
  output logic                    eff_sub,    // signs differ after applying sub
  output logic                    sign_x,     // sign of the larger magnitude
  output logic signed [EXP_W-1:0] exp_x,      // unbiased exponent of X
  output logic [RAW_W-1:0]        man_x,      // X significand, bits 46..23
  output logic [RAW_W-1:0]        man_y       // Y significand, aligned to X
);

  logic        sb;
  logic [7:0]  ea, eb, ex, ey, ediff;
  logic [MAN_W-1:0] ma, mb, mx, my;
  logic        a_ge_b;
  logic [RAW_W-1:0] y_full, y_shift, y_lost_mask;

  always_comb begin
    sb      = opb.sign ^ sub;
    eff_sub = opa.sign ^ sb;                        // signs comparison
    ea = (opa.exp == 8'd0) ? 8'd1 : opa.exp;
    eb = (opb.exp == 8'd0) ? 8'd1 : opb.exp;
    ma = significand(opa);
    mb = significand(opb);
    // exponents comparison, significands break a tie
    a_ge_b = (ea > eb) || ((ea == eb) && (ma >= mb));
    sign_x = a_ge_b ? opa.sign : sb;
    ex     = a_ge_b ? ea : eb;
    ey     = a_ge_b ? eb : ea;
    mx     = a_ge_b ? ma : mb;
    my     = a_ge_b ? mb : ma;
    ediff  = ex - ey;                               // exponent subtractor
    exp_x  = EXP_W'(signed'({4'b0, ex})) - EXP_W'(EXP_BIAS);

    // right shifter for the smaller operand, with sticky jam
    man_x   = {1'b0, mx, 23'd0};
    y_full  = {1'b0, my, 23'd0};
    if (ediff >= 8'(RAW_W)) begin
      y_shift     = '0;
      y_lost_mask = '1;
    end else begin
      y_shift     = y_full >> ediff;
      y_lost_mask = ~({RAW_W{1'b1}} << ediff);
    end
    man_y    = y_shift;
    man_y[0] = y_shift[0] | (|(y_full & y_lost_mask));
  end

endmodule
