// bk_adder: Brent-Kung parallel-prefix adder, sum = a + b + cin.
//
// Three steps. Pre-computation forms a bit generate g = a & b and propagate
// p = a ^ b for every position (the carry-in is folded into bit 0's generate).
// The prefix tree then combines (G, P) pairs: an up-sweep of log2(WIDTH)
// levels builds group signals over blocks of 2, 4, 8 ... bits, and a
// down-sweep of log2(WIDTH)-1 levels fills in the remaining positions. A
// "black" cell computes G = Gh | Ph & Gl and P = Ph & Pl; a "gray" cell, used
// where the lower group already reaches bit 0, computes only G. Positions
// with no cell at a level pass their pair on (a buffer). Post-computation
// forms sum[i] = p[i] ^ carry[i]. The delay therefore grows with
// 2*log2(WIDTH)-1 cell levels while the cell count stays close to 2*WIDTH.
//
// The cell equations and the 32-bit default follow the published adder; the
// arbitrary-WIDTH generalisation and the carry-in handling are this design's
// choice. Purely combinational.
module bk_adder #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int L = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] p0;   // bit propagate, kept for the sum
  logic [WIDTH-1:0] g, p; // (G, P) pairs as they move through the tree

  always_comb begin
    // Pre-computation.
    p0   = a ^ b;
    g    = a & b;
    g[0] = (a[0] & b[0]) | (p0[0] & cin);
    p    = p0;

    // Up-sweep: level l joins position i with the group ending at
    // i - 2^(l-1). Walking i downwards lets each cell read the previous
    // level's value of its lower neighbour.
    for (int l = 1; l <= L; l++) begin
      for (int i = WIDTH - 1; i >= 0; i--) begin
        if (((i + 1) % (1 << l) == 0) && (i - (1 << (l - 1)) >= 0)) begin
          g[i] = g[i] | (p[i] & g[i - (1 << (l - 1))]);
          // gray cell when the group now reaches bit 0: P is not needed
          p[i] = (i + 1 == (1 << l)) ? 1'b0 : (p[i] & p[i - (1 << (l - 1))]);
        end
      end
    end

    // Down-sweep: level l (L-1 .. 1) fills positions k*2^l + 2^(l-1) - 1,
    // k >= 1, from the complete prefix 2^(l-1) positions lower (gray cells).
    for (int l = L - 1; l >= 1; l--) begin
      for (int i = WIDTH - 1; i >= 0; i--) begin
        if (((i + 1) % (1 << l) == (1 << (l - 1))) && (i >= (1 << l))) begin
          g[i] = g[i] | (p[i] & g[i - (1 << (l - 1))]);
          p[i] = 1'b0;
        end
      end
    end
  end

  // Post-computation: carry into bit i is the prefix generate of bits i-1..0.
  logic [WIDTH:0] carry;
  assign carry = {g, cin};
  assign sum   = p0 ^ carry[WIDTH-1:0];
  assign cout  = carry[WIDTH];

endmodule
