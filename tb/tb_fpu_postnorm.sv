// tb_fpu_postnorm: self-checking test of the post-normalise and round unit.
// Drives raw results (sign, unbiased exponent, 48-bit significand worth
// man/2^46 * 2^exp, sticky bit) in all four rounding modes, covering
// left-normalisation of small significands, a carry into bit 47, results
// that overflow, results deep in the subnormal range, exact ties and zero.
// Expected values come from the exact rounding function of fp32_ref_pkg
// applied to man * 2^(exp-46). It also checks that a flagged special result
// is passed through unchanged with no rounding flags.
module tb_fpu_postnorm;
  import fpu_pkg::*;
  import fp32_ref_pkg::*;
  logic sign, sticky, special, zero, inexact, overflow, underflow;
  logic signed [EXP_W-1:0] exp;
  logic [RAW_W-1:0] man;
  rmode_e rmode;
  logic [31:0] special_result, result;
  int checks = 0, failures = 0;

  fpu_postnorm dut (.*);

  initial begin
    #(64'd1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic s, int e, logic [RAW_W-1:0] m, logic st, logic [1:0] rm);
    ref_t r;
    sign = s; exp = EXP_W'(e); man = m; sticky = st; rmode = rmode_e'(rm);
    special = 1'b0; special_result = $urandom;
    #1;
    if (m == 0) r = '{res: {s, 31'd0}, default: 0};
    else        r = round_exact(s, BW'(m), e - 46, st, rm);
    checks++;
    if (result !== r.res || inexact !== r.ine || overflow !== r.ovf || underflow !== r.unf ||
        zero !== (r.res[30:0] == 0)) begin
      failures++;
      if (failures <= 10) $display("FAIL s=%b e=%0d m=%h st=%b rm=%0d: %h %b%b%b want %h %b%b%b",
                                   s, e, m, st, rm, result, inexact, overflow, underflow,
                                   r.res, r.ine, r.ovf, r.unf);
    end
  endtask

  initial begin
    logic [RAW_W-1:0] m;
    // pass-through of a special result
    special = 1'b1; special_result = 32'h7FC00000; man = '1; exp = '0; sticky = 1'b1;
    #1;
    checks++;
    if (result !== 32'h7FC00000 || inexact || overflow || underflow) failures++;
    for (int rm = 0; rm < 4; rm++) begin
      apply(1'b0, 0, 48'h400000800000, 1'b0, 2'(rm));       // exact tie, odd lsb
      apply(1'b1, 0, 48'h400001800000, 1'b0, 2'(rm));       // exact tie, even lsb
      apply(1'b0, 127, 48'h7FFFFFC00000, 1'b0, 2'(rm));     // rounds up into overflow
      apply(1'b1, 128, 48'h400000000000, 1'b0, 2'(rm));     // overflow
      apply(1'b0, -127, 48'h400000000000, 1'b0, 2'(rm));    // subnormal, exact
      apply(1'b0, -127, 48'h7FFFFF000000, 1'b1, 2'(rm));    // subnormal rounds to normal
      apply(1'b1, -300, 48'h400000000000, 1'b0, 2'(rm));    // far below: rounds to 0 or min
      apply(1'b0, 5, 48'h0, 1'b0, 2'(rm));                  // zero
    end
    for (int k = 0; k < 50000; k++) begin
      m = {$urandom, $urandom};
      m = m >> ($urandom % 48);
      apply(1'($urandom), int'($urandom % 700) - 400, m, 1'($urandom), 2'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
