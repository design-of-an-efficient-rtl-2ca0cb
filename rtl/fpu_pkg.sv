// fpu_pkg: types and constants shared by the single precision FPU.
//
// binary32 layout (IEEE 754): 1 sign bit, 8-bit biased exponent (bias 127),
// 23 stored fraction bits plus an implicit leading bit. The operation code
// and the rounding-mode encodings are this design's own choice; the operation
// order add, subtract, multiply, divide matches the 2-bit operation code seen
// in the FPU's simulation.
//
// Internally an operand's value is carried as a significand and a signed,
// unbiased exponent wide enough for products and quotients of subnormals.
package fpu_pkg;

  localparam int EXP_BIAS = 127;
  localparam int EXP_W    = 12;   // signed internal exponent width
  localparam int MAN_W    = 24;   // significand incl. hidden bit
  localparam int RAW_W    = 48;   // raw result width seen by post-normalisation

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] frac;
  } fp32_t;

  typedef enum logic [1:0] {
    FPU_ADD = 2'd0,
    FPU_SUB = 2'd1,
    FPU_MUL = 2'd2,
    FPU_DIV = 2'd3
  } fpu_op_e;

  typedef enum logic [1:0] {
    RND_NEAREST_EVEN = 2'd0,
    RND_TO_ZERO      = 2'd1,
    RND_UP           = 2'd2,   // toward +infinity
    RND_DOWN         = 2'd3    // toward -infinity
  } rmode_e;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;  // canonical quiet NaN

  // Operand class, decoded from the exponent and fraction fields.
  typedef struct packed {
    logic is_zero;
    logic is_sub;    // subnormal
    logic is_inf;
    logic is_nan;
    logic is_snan;
  } fp_class_t;

  function automatic fp_class_t classify(fp32_t x);
    fp_class_t c;
    c.is_zero = (x.exp == 8'd0)   && (x.frac == 23'd0);
    c.is_sub  = (x.exp == 8'd0)   && (x.frac != 23'd0);
    c.is_inf  = (x.exp == 8'hFF)  && (x.frac == 23'd0);
    c.is_nan  = (x.exp == 8'hFF)  && (x.frac != 23'd0);
    c.is_snan = c.is_nan && !x.frac[22];
    return c;
  endfunction

  // Significand with the implicit bit made explicit (0 for zero/subnormal).
  function automatic logic [MAN_W-1:0] significand(fp32_t x);
    return {(x.exp != 8'd0), x.frac};
  endfunction

  // Unbiased exponent; subnormals and zero use the minimum normal exponent.
  function automatic logic signed [EXP_W-1:0] unbiased_exp(fp32_t x);
    logic [7:0] e;
    e = (x.exp == 8'd0) ? 8'd1 : x.exp;
    return EXP_W'(signed'({4'b0, e})) - EXP_W'(EXP_BIAS);
  endfunction

endpackage
