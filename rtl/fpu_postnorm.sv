// fpu_postnorm: post-normalise and round unit of the FPU.
//
// Input is a raw result from the add/sub, multiply or divide path: a sign,
// an unbiased exponent and a 48-bit significand whose value is
// man/2^46 * 2^exp (so it may be anywhere in [0, 4)), plus a sticky bit for
// nonzero bits already dropped. The unit
//   1. returns a signed zero when the significand is zero;
//   2. normalises: a leading-zero count shifts the significand left until
//      bit 47 is set and adjusts the exponent (a carry into bit 47 is the
//      "fraction overflow" case: exponent + 1);
//   3. denormalises: if the exponent is below -126 the significand is shifted
//      right into the subnormal range, the lost bits going into sticky;
//   4. rounds the top 24 bits with guard bit and sticky in one of the four
//      IEEE 754 modes; a carry out of rounding renormalises;
//   5. detects exponent overflow and returns infinity or the largest finite
//      number as the mode requires, raising the overflow indicator;
//   6. packs the binary32 word, or passes the exceptions unit's special
//      result (NaN, infinity, exact zero) when that unit flags one.
// Tininess is detected before rounding; underflow = tiny and inexact.
//
// The normalise-left / fraction-overflow / exponent-overflow flow follows the
// published multiplication flowchart; the raw format, the subnormal handling
// and the four rounding modes are this design's choices. Purely
// combinational.
module fpu_postnorm
  import fpu_pkg::*;
(
  input  logic                    sign,
  input  logic signed [EXP_W-1:0] exp,
  input  logic [RAW_W-1:0]        man,
  input  logic                    sticky,
  input  rmode_e                  rmode,
  input  logic                    special,         // take special_result
  input  logic [31:0]             special_result,
  output logic [31:0]             result,
  output logic                    zero,
  output logic                    inexact,
  output logic                    overflow,
  output logic                    underflow
);

  function automatic logic [5:0] lzc48(logic [RAW_W-1:0] m);
    logic [5:0] n;
    n = 6'(RAW_W);
    for (int i = 0; i < RAW_W; i++)
      if (m[i]) n = 6'(RAW_W - 1 - i);
    return n;
  endfunction

  logic [5:0]              lz;
  logic [RAW_W-1:0]        mn, lost_mask;
  logic signed [EXP_W-1:0] en, sh, be;
  logic                    st, tiny, g, rs, inc, lsb;
  logic [MAN_W:0]          mr;          // rounded significand, 25 bits
  logic [31:0]             packed_res;
  logic                    ovf;

  always_comb begin
    // 2. normalise so that bit 47 is the leading one
    lz = lzc48(man);
    mn = man << lz;
    en = exp + EXP_W'(1) - EXP_W'(lz);       // exponent of bit 47
    st = sticky;
    tiny = (man != '0) && (en < -EXP_W'(126));

    // 3. denormalise below the smallest normal exponent
    sh = tiny ? (-EXP_W'(126) - en) : '0;
    lost_mask = '0;
    if (sh >= EXP_W'(RAW_W)) begin
      st = st | (mn != '0);
      mn = '0;
    end else begin
      lost_mask = ~({RAW_W{1'b1}} << sh);
      st = st | ((mn & lost_mask) != '0);
      mn = mn >> sh;
    end
    if (tiny) en = -EXP_W'(126);

    // 4. round: keep bits 47..24, guard bit 23, sticky below
    g   = mn[23];
    rs  = st | (mn[22:0] != '0);
    lsb = mn[24];
    unique case (rmode)
      RND_NEAREST_EVEN: inc = g & (rs | lsb);
      RND_TO_ZERO:      inc = 1'b0;
      RND_UP:           inc = ~sign & (g | rs);
      RND_DOWN:         inc =  sign & (g | rs);
      default:          inc = 1'b0;
    endcase
    mr = {1'b0, mn[47:24]} + (MAN_W+1)'(inc);
    if (mr[MAN_W]) begin                     // rounding carried out: 1.000.. * 2
      mr = mr >> 1;
      en = en + EXP_W'(1);
    end
    // a subnormal that rounded up to 2^-126 becomes normal through mr[23]
    be = mr[MAN_W-1] ? (en + EXP_W'(EXP_BIAS)) : '0;

    // 5. exponent overflow
    ovf = (man != '0) && (be >= EXP_W'(255));
    if (ovf) begin
      if ((rmode == RND_TO_ZERO) || (rmode == RND_UP && sign) || (rmode == RND_DOWN && !sign))
        packed_res = {sign, 8'hFE, 23'h7F_FFFF};
      else
        packed_res = {sign, 8'hFF, 23'd0};
    end else if (man == '0) begin
      packed_res = {sign, 31'd0};            // 1. zero: exponent field 0
    end else begin
      packed_res = {sign, be[7:0], mr[22:0]};
    end

    // 6. special results from the exceptions unit
    result    = special ? special_result : packed_res;
    inexact   = !special && (man != '0) && (g | rs | ovf);
    overflow  = !special && ovf;
    underflow = !special && tiny && (g | rs);
    zero      = (result[30:0] == 31'd0);
  end

endmodule
