// tb_fpu_prenorm_muldiv: self-checking test of the multiply/divide
// pre-normalisation. For random normal and subnormal operand pairs it checks
// the XOR sign, that each output significand has its leading one at bit 23,
// and that significand and exponent still describe the operand's value:
// the input significand times 2^(unbiased exponent) must equal the output
// significand times 2^(output exponent), checked through the exponent sum and
// difference.
module tb_fpu_prenorm_muldiv;
  import fpu_pkg::*;
  fp32_t opa, opb;
  logic  sign;
  logic [MAN_W-1:0] man_a, man_b;
  logic signed [EXP_W-1:0] exp_mul, exp_div;
  int checks = 0, failures = 0;

  fpu_prenorm_muldiv dut (.*);

  initial begin
    #(64'd1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // exponent of the leading one of a nonzero operand, counting from 2^0
  function automatic int lead_exp(logic [31:0] x);
    int e;
    if (x[30:23] != 0) return int'(x[30:23]) - 127;
    e = -127;
    for (int i = 0; i < 23; i++) if (x[i]) e = i - 149;
    return e;
  endfunction

  task automatic apply(logic [31:0] a, logic [31:0] b);
    int ea, eb;
    logic [23:0] wa, wb;
    opa = a; opb = b;
    #1;
    ea = lead_exp(a);
    eb = lead_exp(b);
    // leading one moved to bit 23, the remaining fraction bits kept in order
    wa = (a[30:23] != 0) ? {1'b1, a[22:0]} : 24'({1'b0, a[22:0]} << (-126 - ea));
    wb = (b[30:23] != 0) ? {1'b1, b[22:0]} : 24'({1'b0, b[22:0]} << (-126 - eb));
    checks++;
    if (sign !== (a[31] ^ b[31]) || man_a !== wa || man_b !== wb ||
        exp_mul !== EXP_W'(ea + eb) || exp_div !== EXP_W'(ea - eb)) begin
      failures++;
      if (failures <= 10) $display("FAIL a=%h b=%h: %h %h %0d %0d want %h %h %0d %0d", a, b,
                                   man_a, man_b, exp_mul, exp_div, wa, wb, ea + eb, ea - eb);
    end
  endtask

  initial begin
    logic [31:0] a, b;
    apply(32'h00000001, 32'h00400000);
    apply(32'h7F7FFFFF, 32'h00000001);
    apply(32'h3F800000, 32'h007FFFFF);
    for (int k = 0; k < 50000; k++) begin
      a = $urandom;
      b = $urandom;
      if (k % 3 == 1) a[30:23] = 8'd0;
      if (k % 5 == 2) b[30:23] = 8'd0;
      if (a[30:0] == 0) a[0] = 1'b1;
      if (b[30:0] == 0) b[5] = 1'b1;
      if (a[30:23] == 8'hFF) a[30:23] = 8'hFE;
      if (b[30:23] == 8'hFF) b[30:23] = 8'hFE;
      apply(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
