// tb_fpu_addsub: self-checking test of the significand adder/subtractor.
// Drives aligned significand pairs (X >= Y, as the pre-normalisation
// guarantees) for true additions and subtractions, including equal operands
// in every rounding mode, and checks the raw 48-bit sum or difference, the
// exponent passed through and the sign (X's sign, or the IEEE 754 sign of an
// exact zero).
module tb_fpu_addsub;
  import fpu_pkg::*;
  logic eff_sub, sign_x, sign;
  logic signed [EXP_W-1:0] exp_x, exp;
  logic [RAW_W-1:0] man_x, man_y, man;
  rmode_e rmode;
  int checks = 0, failures = 0;

  fpu_addsub dut (.*);

  initial begin
    #(64'd1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic es, logic sx, logic [46:0] x, logic [46:0] y, logic [1:0] rm);
    logic [RAW_W-1:0] want;
    logic             wsign;
    if (y > x) begin logic [46:0] t; t = x; x = y; y = t; end
    eff_sub = es; sign_x = sx; man_x = {1'b0, x}; man_y = {1'b0, y};
    rmode = rmode_e'(rm); exp_x = EXP_W'($urandom % 300) - EXP_W'(150);
    #1;
    want  = es ? ({1'b0, x} - {1'b0, y}) : ({1'b0, x} + {1'b0, y});
    wsign = (es && x == y) ? (rm == 2'd3) : sx;
    checks++;
    if (man !== want || sign !== wsign || exp !== exp_x) begin
      failures++;
      if (failures <= 10) $display("FAIL es=%b x=%h y=%h rm=%0d: %h %b want %h %b", es, x, y,
                                   rm, man, sign, want, wsign);
    end
  endtask

  initial begin
    for (int rm = 0; rm < 4; rm++) begin
      apply(1'b1, 1'b0, 47'h400000800000, 47'h400000800000, 2'(rm));
      apply(1'b1, 1'b1, 47'h7FFFFF800000, 47'h7FFFFF800000, 2'(rm));
      apply(1'b0, 1'b1, 47'h7FFFFF800000, 47'h7FFFFF800000, 2'(rm));
    end
    for (int k = 0; k < 50000; k++)
      apply(1'($urandom), 1'($urandom), {$urandom, $urandom}, {$urandom, $urandom} >> ($urandom % 48),
            2'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
