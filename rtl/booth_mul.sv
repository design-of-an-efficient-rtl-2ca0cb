// booth_mul: radix-4 (modified) Booth multiplier, two's complement operands.
//
// The multiplier b is scanned in overlapping 3-bit groups (b[2j+1], b[2j],
// b[2j-1]) with b[-1] = 0. Each group is recoded into one digit of
// {-2, -1, 0, +1, +2}, so only ceil(WIDTH/2) partial products are formed
// instead of WIDTH. A digit selects 0, a or 2a (a shift), and a negative
// digit inverts that multiple and adds one at its least significant position.
// The partial products, each sign-extended and shifted by 2j, are summed into
// the 2*WIDTH-bit product. Signed and unsigned operands are both handled: an
// unsigned n-bit operand is passed as n+1 bits with a zero sign bit.
//
// The recoding follows the radix-4 Booth algorithm the FPU is built on; the
// operand width default (the 24-bit binary32 significand) and the plain sum
// of the partial products are this design's choices. Purely combinational.
module booth_mul #(
  parameter int WIDTH = 24
) (
  input  logic signed [WIDTH-1:0]   a,
  input  logic signed [WIDTH-1:0]   b,
  output logic signed [2*WIDTH-1:0] p
);

  localparam int NG = (WIDTH + 1) / 2;      // number of Booth digits
  localparam int PW = 2 * WIDTH;

  // b with b[-1] = 0 appended and sign-extended to 2*NG+1 bits
  logic [2*NG:0] bx;
  assign bx = {{(2*NG-WIDTH){b[WIDTH-1]}}, b, 1'b0};

  logic [NG-1:0] neg, one, two;
  logic signed [PW-1:0] pp [NG];

  always_comb begin
    for (int j = 0; j < NG; j++) begin
      logic [2:0] grp;
      logic signed [PW-1:0] mult;
      grp    = bx[2*j +: 3];
      // Booth recoding: digit = -2*grp[2] + grp[1] + grp[0]
      neg[j] = grp[2] && !(grp[1] && grp[0]);
      one[j] = grp[1] ^ grp[0];
      two[j] = (grp == 3'b011) || (grp == 3'b100);
      mult   = one[j] ? PW'(a) : (two[j] ? (PW'(a) <<< 1) : '0);
      // negative digit: one's complement here, the +1 enters with the shift
      pp[j]  = ((neg[j] ? ~mult : mult) <<< (2*j)) + (PW'(neg[j]) <<< (2*j));
    end
  end

  always_comb begin
    p = '0;
    for (int j = 0; j < NG; j++) p = p + pp[j];
  end

endmodule
