// tb_booth_mul: self-checking test of the radix-4 Booth multiplier at its
// default 24-bit width. Covers the most negative operand, -1, 0, powers of
// two, operands whose bit groups recode to every Booth digit (+-1, +-2),
// and random signed operands; each product is compared with the simulator's
// signed multiplication. Combinational: checked 1 ns after each vector.
module tb_booth_mul;
  localparam int W = 24;
  logic signed [W-1:0]   a, b;
  logic signed [2*W-1:0] p;
  int checks = 0, failures = 0;

  booth_mul dut (.*);

  initial begin
    #(64'd1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic signed [W-1:0] x, logic signed [W-1:0] y);
    logic signed [2*W-1:0] want;
    a = x; b = y;
    #1;
    want = (2*W)'(x) * (2*W)'(y);
    checks++;
    if (p !== want) begin
      failures++;
      if (failures <= 10) $display("FAIL %0d * %0d = %0d, want %0d", x, y, p, want);
    end
  endtask

  initial begin
    logic signed [W-1:0] corner [8];
    corner = '{24'sh800000, 24'sh7FFFFF, -24'sd1, 24'sd0, 24'sd1, 24'sh555555,
               24'shAAAAAA, 24'sh333333};
    foreach (corner[i]) foreach (corner[j]) apply(corner[i], corner[j]);
    for (int i = 0; i < W; i++) begin
      apply(24'sh123457, W'(1) << i);
      apply(-24'sd98765, ~(W'(1) << i));
    end
    for (int k = 0; k < 50000; k++) apply($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
