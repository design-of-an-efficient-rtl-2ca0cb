// tb_fpu_prenorm_addsub: self-checking test of the add/subtract
// pre-normalisation. For random operand pairs (random bits, nearby
// exponents, subnormals, huge exponent gaps) it checks the effective
// operation, the sign and exponent of the larger magnitude, and both aligned
// 48-bit significands. The expected alignment is computed differently from
// the block: the smaller significand is shifted inside a 256-bit field and
// bit 0 is set when shifting back does not restore it.
module tb_fpu_prenorm_addsub;
  import fpu_pkg::*;
  fp32_t opa, opb;
  logic  sub, eff_sub, sign_x;
  logic signed [EXP_W-1:0] exp_x;
  logic [RAW_W-1:0] man_x, man_y;
  int checks = 0, failures = 0;

  fpu_prenorm_addsub dut (.*);

  initial begin
    #(64'd1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [31:0] a, logic [31:0] b, logic s);
    logic        sb, a_big, w_sign;
    int          ea, eb, d, w_exp;
    logic [23:0] ma, mb;
    logic [255:0] wide, kept;
    logic [47:0] w_x, w_y;
    opa = a; opb = b; sub = s;
    #1;
    sb = b[31] ^ s;
    ea = (a[30:23] == 0) ? 1 : a[30:23];
    eb = (b[30:23] == 0) ? 1 : b[30:23];
    ma = {a[30:23] != 0, a[22:0]};
    mb = {b[30:23] != 0, b[22:0]};
    a_big  = (a[30:0] >= b[30:0]);   // binary32 magnitudes order like integers
    w_sign = a_big ? a[31] : sb;
    w_exp  = (a_big ? ea : eb) - 127;
    d      = a_big ? ea - eb : eb - ea;
    w_x    = {1'b0, (a_big ? ma : mb), 23'd0};
    wide   = 256'({1'b0, (a_big ? mb : ma), 23'd0});
    kept   = wide >> d;
    w_y    = kept[47:0];
    w_y[0] = w_y[0] | ((kept << d) != wide);
    checks++;
    if (eff_sub !== (a[31] ^ sb) || sign_x !== w_sign || exp_x !== EXP_W'(w_exp) ||
        man_x !== w_x || man_y !== w_y) begin
      failures++;
      if (failures <= 10)
        $display("FAIL a=%h b=%h sub=%b: got %b %b %0d %h %h want %b %b %0d %h %h", a, b, s,
                 eff_sub, sign_x, exp_x, man_x, man_y, a[31] ^ sb, w_sign, w_exp, w_x, w_y);
    end
  endtask

  initial begin
    logic [31:0] a, b;
    apply(32'h3F800000, 32'h3F800000, 1'b1);
    apply(32'h7F7FFFFF, 32'h00000001, 1'b0);
    apply(32'h00000001, 32'h4B000000, 1'b1);
    for (int k = 0; k < 50000; k++) begin
      a = $urandom;
      b = $urandom;
      if (a[30:23] == 8'hFF) a[30:23] = 8'hFE;
      if (b[30:23] == 8'hFF) b[30:23] = 8'hFE;
      case (k % 4)
        1: b[30:23] = 8'(a[30:23] + ($urandom % 60) - 30);
        2: a[30:23] = 8'd0;
        3: b[30:23] = 8'(a[30:23] + ($urandom % 5) - 2);
        default: ;
      endcase
      if (b[30:23] == 8'hFF) b[30:23] = 8'hFE;
      apply(a, b, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
