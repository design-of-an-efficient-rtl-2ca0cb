// fpu_div: significand divider of the FPU.
//
// Divides two normalised 24-bit significands (both in [1, 2)) by restoring
// long division. The dividend is taken as a * 2^25, so the 26-bit quotient
// q = floor(a * 2^25 / b) lies in (2^24, 2^26) and always holds the 24
// result bits plus at least one guard bit; the sticky bit reports a nonzero
// remainder. Each of the 26 steps shifts the partial remainder left by one,
// brings in the next dividend bit, subtracts the divisor when it fits and
// records the quotient bit. The output is placed in the 48-bit raw format of
// post-normalisation (value man/2^46, with man = q << 21).
//
// The published design names a divide unit but does not describe its
// insides; a single-cycle restoring array is the simplest divider and is
// this design's choice. Purely combinational; b must not be zero (division
// by zero is resolved by the exceptions unit).
module fpu_div
  import fpu_pkg::*;
(
  input  logic [MAN_W-1:0] man_a,
  input  logic [MAN_W-1:0] man_b,
  output logic [RAW_W-1:0] man,
  output logic             sticky
);

  localparam int QW = MAN_W + 2;   // 26 quotient bits

  logic [QW-1:0]  q;
  logic [MAN_W:0] rem;             // partial remainder, 25 bits

  always_comb begin
    // integer quotient bit: the dividend's upper bits are a itself (a < 2b)
    rem = {1'b0, man_a};
    q   = '0;
    for (int i = QW - 1; i >= 0; i--) begin
      if (i < QW - 1) rem = {rem[MAN_W-1:0], 1'b0};   // next dividend bit is 0
      if (rem >= {1'b0, man_b}) begin
        q[i] = 1'b1;
        rem  = rem - {1'b0, man_b};
      end
    end
    sticky = (rem != '0);
    man    = RAW_W'(q) << 21;
  end

endmodule
