// tb_bk_adder: self-checking test of the 32-bit Brent-Kung adder.
// Applies carry-propagation corner cases (all-ones plus one, alternating
// patterns, single-bit operands at every position) and random operands with
// random carry-in, and compares {cout, sum} with a + b + cin computed by the
// simulator. Combinational: each vector is checked 1 ns after it is applied.
module tb_bk_adder;
  localparam int W = 32;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  bk_adder dut (.*);

  initial begin
    #(64'd1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [W-1:0] x, logic [W-1:0] y, logic c);
    logic [W:0] want;
    a = x; b = y; cin = c;
    #1;
    want = {1'b0, x} + {1'b0, y} + (W+1)'(c);
    checks++;
    if ({cout, sum} !== want) begin
      failures++;
      if (failures <= 10) $display("FAIL %h + %h + %b = %b_%h, want %h", x, y, c, cout, sum, want);
    end
  endtask

  initial begin
    apply('1, '0, 1'b1);
    apply('1, 32'd1, 1'b0);
    apply('1, '1, 1'b1);
    apply(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    for (int i = 0; i < W; i++) begin
      apply(W'(1) << i, ~(W'(1) << i), 1'b1);
      apply((W'(1) << i) - 1, W'(1), 1'b0);
      apply('1 >> i, '0, 1'b1);
    end
    for (int k = 0; k < 50000; k++) apply($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
