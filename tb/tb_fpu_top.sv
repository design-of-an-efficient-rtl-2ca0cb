// tb_fpu_top: end-to-end test of the single precision FPU.
//
// Drives fpu_top with the worked examples of the FPU's published simulation
// (add, subtract, multiply, divide of small decimal values), then with
// random operands in all four operations and all four rounding modes, and
// compares result and flags against the exact reference model of
// fp32_ref_pkg. Operands are drawn from a mix of classes (raw random bits,
// nearby exponents for cancellation, subnormals, values near overflow,
// zeros, infinities and NaNs) so that every mechanism of the datapath is
// hit. The test counts how often each mechanism occurred and fails if one
// never did. The unit is combinational: each vector is applied, and checked
// 1 ns later. A watchdog ends the run if it does not finish in time.
module tb_fpu_top;
  import fp32_ref_pkg::*;

  localparam int NRAND = 500000;

  logic [31:0] opa, opb, result;
  logic [1:0]  fpu_op, mode;
  logic        zero, snan, qnan, inf, ine, overflow, underflow, div_by_zero;

  fpu_top dut (.*);

  int checks = 0, failures = 0;

  // mechanism counters
  int n_op[4], n_rm[4];
  int n_carry, n_cancel, n_inc, n_ovf, n_unf, n_sub_in, n_sub_out;
  int n_dbz, n_nan, n_snan, n_inf, n_zero, n_exact;

  initial begin
    #(64'd10_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] gen(int kind, logic [31:0] near);
    logic [31:0] x;
    x = $urandom;
    case (kind)
      0: ;                                                    // raw bits
      1: x[30:23] = 8'(int'(near[30:23]) + ($urandom % 5) - 2); // close exponent
      2: x[30:23] = 8'd0;                                     // subnormal / zero
      3: case ($urandom % 8)                                  // specials
           0: x = {x[31], 31'd0};
           1: x = {x[31], 8'hFF, 23'd0};
           2: x = {x[31], 8'hFF, 1'b1, x[21:0]};              // quiet NaN
           3: x = {x[31], 8'hFF, 1'b0, x[21:1], 1'b1};        // signalling NaN
           4: x = {x[31], 8'hFE, 23'h7FFFFF};
           5: x = {x[31], 8'h01, 23'd0};
           6: x = {x[31], 8'h7F, 23'd0};
           default: x = {x[31], 8'h80, 23'd0};
         endcase
      4: x[30:23] = 8'(240 + $urandom % 15);                  // large
      5: x[30:23] = 8'(1 + $urandom % 30);                    // small
      6: x[30:23] = 8'(100 + $urandom % 56);                  // moderate
      default: ;
    endcase
    if (x[30:23] == 8'hFF && kind != 0 && kind != 3) x[30:23] = 8'hFE;
    return x;
  endfunction

  task automatic check_one(logic [31:0] a, logic [31:0] b, logic [1:0] op, logic [1:0] rm);
    ref_t r;
    int   emax, eres;
    opa = a; opb = b; fpu_op = op; mode = rm;
    #1;
    r = fp_ref(a, b, op, rm);
    checks++;
    if (result !== r.res || ine !== r.ine || overflow !== r.ovf || underflow !== r.unf ||
        div_by_zero !== r.dbz || snan !== r.snan || qnan !== is_nan(r.res) ||
        inf !== is_inf(r.res) || zero !== is_zero(r.res)) begin
      failures++;
      if (failures <= 10)
        $display("FAIL op=%0d rm=%0d a=%h b=%h got %h (ine%b ovf%b unf%b dbz%b snan%b qnan%b inf%b z%b) exp %h (ine%b ovf%b unf%b dbz%b snan%b)",
                 op, rm, a, b, result, ine, overflow, underflow, div_by_zero, snan, qnan, inf, zero,
                 r.res, r.ine, r.ovf, r.unf, r.dbz, r.snan);
    end
    // mechanism counts
    n_op[op]++;
    n_rm[rm]++;
    emax = (a[30:23] > b[30:23]) ? a[30:23] : b[30:23];
    eres = result[30:23];
    if (op <= 1 && !is_nan(r.res) && !is_inf(r.res) && !is_inf(a) && !is_inf(b)) begin
      if ((a[31] ^ b[31] ^ op[0]) == 1'b0 && eres > emax && a[30:23] != 0 && b[30:23] != 0) n_carry++;
      if ((a[31] ^ b[31] ^ op[0]) == 1'b1 && eres + 2 <= emax && emax > 0) n_cancel++;
    end
    if (r.inc) n_inc++;
    if (r.ovf) n_ovf++;
    if (r.unf) n_unf++;
    if ((a[30:23] == 0 && a[22:0] != 0) || (b[30:23] == 0 && b[22:0] != 0)) n_sub_in++;
    if (result[30:23] == 0 && result[22:0] != 0) n_sub_out++;
    if (r.dbz) n_dbz++;
    if (is_nan(r.res)) n_nan++;
    if (r.snan) n_snan++;
    if (is_inf(r.res)) n_inf++;
    if (is_zero(r.res)) n_zero++;
    if (!r.ine && !is_nan(r.res) && !is_inf(r.res) && !is_zero(r.res)) n_exact++;
  endtask

  task automatic expect_value(logic [31:0] a, logic [31:0] b, logic [1:0] op, logic [31:0] want);
    opa = a; opb = b; fpu_op = op; mode = 2'd0;
    #1;
    checks++;
    if (result !== want) begin
      failures++;
      $display("FAIL example op=%0d a=%h b=%h got %h want %h", op, a, b, result, want);
    end
  endtask

  task automatic need(string name, int count);
    checks++;
    $display("  %-28s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", name);
    end
  endtask

  initial begin
    logic [31:0] a, b;
    // worked examples: values from the FPU's published simulation
    expect_value(32'hBFC00000, 32'h40E00000, 2'd0, 32'h40B00000); // -1.5 + 7.0  = 5.5
    expect_value(32'h40200000, 32'hC1580000, 2'd0, 32'hC1300000); //  2.5 + -13.5 = -11
    expect_value(32'hC0200000, 32'h41580000, 2'd0, 32'h41300000); // -2.5 + 13.5 = 11
    expect_value(32'h40C00000, 32'h3F800000, 2'd1, 32'h40A00000); //  6.0 - 1.0  = 5.0
    expect_value(32'h41100000, 32'h40C00000, 2'd1, 32'h40400000); //  9.0 - 6.0  = 3.0
    expect_value(32'h3F800000, 32'h40000000, 2'd2, 32'h40000000); //  1.0 * 2.0  = 2.0
    expect_value(32'hC0400000, 32'h40200000, 2'd2, 32'hC0F00000); // -3.0 * 2.5  = -7.5
    expect_value(32'h40C00000, 32'h40000000, 2'd3, 32'h40400000); //  6.0 / 2.0  = 3.0
    // directed corner cases
    check_one(32'h7F7FFFFF, 32'h7F7FFFFF, 2'd0, 2'd0);  // overflow on add
    check_one(32'h00800000, 32'h3F000000, 2'd2, 2'd0);  // result becomes subnormal
    check_one(32'h3F800000, 32'h00000000, 2'd3, 2'd0);  // divide by zero
    check_one(32'h3F800001, 32'h3F800000, 2'd1, 2'd3);  // cancellation
    check_one(32'h3F800000, 32'h3F800000, 2'd1, 2'd3);  // exact zero, round down
    for (int k = 0; k < NRAND; k++) begin
      int ka, kb;
      ka = $urandom % 8;
      kb = $urandom % 8;
      a = gen(ka, 32'h3F800000);
      b = gen(kb, a);
      check_one(a, b, 2'($urandom), 2'($urandom));
    end
    $display("mechanisms exercised:");
    for (int i = 0; i < 4; i++) need($sformatf("operation %0d", i), n_op[i]);
    for (int i = 0; i < 4; i++) need($sformatf("rounding mode %0d", i), n_rm[i]);
    need("add fraction overflow", n_carry);
    need("subtract cancellation", n_cancel);
    need("rounding increment", n_inc);
    need("exponent overflow", n_ovf);
    need("underflow", n_unf);
    need("subnormal operand", n_sub_in);
    need("subnormal result", n_sub_out);
    need("divide by zero", n_dbz);
    need("NaN result", n_nan);
    need("signalling NaN operand", n_snan);
    need("infinite result", n_inf);
    need("zero result", n_zero);
    need("exact result", n_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
