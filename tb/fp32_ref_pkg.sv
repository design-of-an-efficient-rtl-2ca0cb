// fp32_ref_pkg: reference model of IEEE 754 binary32 add, subtract,
// multiply and divide for the FPU testbenches.
//
// It works independently of the RTL's fixed-width datapath: every finite
// operand is an integer significand M times 2^E (E = biased exponent - 150,
// subnormals using biased exponent 1). Sums and products are formed exactly
// in a 400-bit integer; a quotient is formed with 80 extra bits and a
// remainder flag. The exact value N * 2^scale is then rounded once: the
// result's unit in the last place is 2^q with q = max(msb + scale - 23, -149),
// the bits below it give the guard and sticky bits, and the mode decides the
// increment. Special operands follow IEEE 754 with the quiet NaN 7FC00000.
package fp32_ref_pkg;

  localparam int BW = 400;

  typedef struct {
    logic [31:0] res;
    bit ine, ovf, unf, dbz, snan;
    bit inc;        // rounding incremented the significand
  } ref_t;

  function automatic int msb_of(logic [BW-1:0] n);
    int p;
    p = -1;
    for (int i = 0; i < BW; i++) if (n[i]) p = i;
    return p;
  endfunction

  function automatic ref_t round_exact(bit s, logic [BW-1:0] n, int scale, bit st_in,
                                       logic [1:0] rm);
    ref_t r;
    int p, q, sh;
    logic [BW-1:0] kept, low;
    bit g, st, inc;
    r = '{default: 0};
    p  = msb_of(n);
    q  = p + scale - 23;
    if (q < -149) q = -149;
    sh = q - scale;
    if (sh > 0) begin
      kept = n >> sh;
      g    = n[sh-1];
      low  = n & ((BW'(1) << (sh - 1)) - BW'(1));
      st   = (low != '0) || st_in;
    end else begin
      kept = n << (-sh);
      g    = 0;
      st   = st_in;
    end
    case (rm)
      2'd0: inc = g && (st || kept[0]);
      2'd1: inc = 0;
      2'd2: inc = !s && (g || st);
      default: inc = s && (g || st);
    endcase
    kept = kept + BW'(inc);
    if (kept == (BW'(1) << 24)) begin
      kept = BW'(1) << 23;
      q++;
    end
    r.inc = inc;
    r.ine = g || st;
    r.unf = (p + scale < -126) && (g || st);
    if (kept >= (BW'(1) << 23)) begin
      if (q + 150 >= 255) begin
        r.ovf = 1;
        r.ine = 1;
        if (rm == 2'd1 || (rm == 2'd2 && s) || (rm == 2'd3 && !s))
          r.res = {s, 8'hFE, 23'h7FFFFF};
        else
          r.res = {s, 8'hFF, 23'd0};
      end else begin
        r.res = {s, 8'(q + 150), kept[22:0]};
      end
    end else begin
      r.res = {s, 8'd0, kept[22:0]};
    end
    return r;
  endfunction

  function automatic bit is_nan(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] != 0;
  endfunction
  function automatic bit is_inf(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] == 0;
  endfunction
  function automatic bit is_zero(logic [31:0] x);
    return x[30:0] == 0;
  endfunction

  // op: 0 add, 1 sub, 2 mul, 3 div; rm: 0 RNE, 1 RTZ, 2 RUP, 3 RDN
  function automatic ref_t fp_ref(logic [31:0] a, logic [31:0] b, logic [1:0] op,
                                  logic [1:0] rm);
    ref_t r;
    bit sa, sb, sx;
    int ea, eb, base;
    logic [BW-1:0] ma, mb, na, nb, n, rem;
    r = '{default: 0};
    r.snan = (is_nan(a) && !a[22]) || (is_nan(b) && !b[22]);
    sa = a[31];
    sb = b[31] ^ (op == 2'd1);
    sx = a[31] ^ b[31];
    if (is_nan(a) || is_nan(b)) begin
      r.res = 32'h7FC00000;
      return r;
    end
    ma = BW'({a[30:23] != 0, a[22:0]});
    mb = BW'({b[30:23] != 0, b[22:0]});
    ea = ((a[30:23] == 0) ? 1 : int'(a[30:23])) - 150;
    eb = ((b[30:23] == 0) ? 1 : int'(b[30:23])) - 150;
    if (op <= 2'd1) begin
      if (is_inf(a) && is_inf(b)) r.res = (sa == sb) ? {sa, 8'hFF, 23'd0} : 32'h7FC00000;
      else if (is_inf(a))         r.res = {sa, 8'hFF, 23'd0};
      else if (is_inf(b))         r.res = {sb, 8'hFF, 23'd0};
      else begin
        base = (ea < eb) ? ea : eb;
        na = ma << (ea - base);
        nb = mb << (eb - base);
        if (sa == sb) begin
          n = na + nb;
          if (n == 0) r.res = {sa, 31'd0};
          else        r = round_exact(sa, n, base, 0, rm);
        end else if (na == nb) begin
          r.res = {(rm == 2'd3), 31'd0};
        end else if (na > nb) r = round_exact(sa, na - nb, base, 0, rm);
        else                  r = round_exact(sb, nb - na, base, 0, rm);
      end
    end else if (op == 2'd2) begin
      if ((is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b))) r.res = 32'h7FC00000;
      else if (is_inf(a) || is_inf(b))  r.res = {sx, 8'hFF, 23'd0};
      else if (is_zero(a) || is_zero(b)) r.res = {sx, 31'd0};
      else r = round_exact(sx, ma * mb, ea + eb, 0, rm);
    end else begin
      if ((is_zero(a) && is_zero(b)) || (is_inf(a) && is_inf(b))) r.res = 32'h7FC00000;
      else if (is_inf(a)) r.res = {sx, 8'hFF, 23'd0};
      else if (is_zero(b)) begin
        r.res = {sx, 8'hFF, 23'd0};
        r.dbz = 1;
      end else if (is_zero(a) || is_inf(b)) r.res = {sx, 31'd0};
      else begin
        n   = (ma << 80) / mb;
        rem = (ma << 80) % mb;
        r = round_exact(sx, n, ea - eb - 80, rem != 0, rm);
      end
    end
    r.snan = (is_nan(a) && !a[22]) || (is_nan(b) && !b[22]);
    return r;
  endfunction

endpackage
