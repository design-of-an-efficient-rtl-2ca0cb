// tb_fpu_div: self-checking test of the significand divider. For normalised
// 24-bit significands (leading one at bit 23), including equal operands,
// the extremes 1.0 and 2 - 2^-23, and random values, it checks the quotient
// floor(a * 2^25 / b), placed at bits 46..21 of the raw output, and the
// sticky bit (remainder nonzero) against the simulator's integer division.
module tb_fpu_div;
  import fpu_pkg::*;
  logic [MAN_W-1:0] man_a, man_b;
  logic [RAW_W-1:0] man;
  logic             sticky;
  int checks = 0, failures = 0;

  fpu_div dut (.*);

  initial begin
    #(64'd1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [22:0] fa, logic [22:0] fb);
    logic [63:0] num, q, r;
    man_a = {1'b1, fa}; man_b = {1'b1, fb};
    #1;
    num = 64'({1'b1, fa}) << 25;
    q   = num / 64'({1'b1, fb});
    r   = num % 64'({1'b1, fb});
    checks++;
    if (man !== (RAW_W'(q) << 21) || sticky !== (r != 0)) begin
      failures++;
      if (failures <= 10) $display("FAIL %h / %h: %h %b want %h %b", man_a, man_b, man, sticky,
                                   RAW_W'(q) << 21, r != 0);
    end
  endtask

  initial begin
    apply(23'd0, 23'd0);
    apply(23'h7FFFFF, 23'd0);
    apply(23'd0, 23'h7FFFFF);
    apply(23'h7FFFFF, 23'h7FFFFF);
    apply(23'h400000, 23'h000000);
    for (int k = 0; k < 50000; k++) apply($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
