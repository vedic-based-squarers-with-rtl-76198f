// Brent-Kung parallel-prefix adder: {cout, sum} = a + b + cin.
// Bit generate g = a & b and propagate p = a ^ b feed a Brent-Kung prefix
// tree: an up-sweep combines spans of 1, 2, 4, ... bits at positions 2d-1,
// 4d-1, ..., then a down-sweep fills in the remaining positions, giving the
// carry into every bit in about 2*log2(WIDTH) gate levels with few prefix
// cells. The carry-in is folded into the generate of bit 0. The sum bits and
// propagate terms use the amended three-gate XOR. Purely combinational.
// The block is the "BK-CSLA" building block of the carry-select adder; the
// prefix-tree details are standard Brent-Kung, chosen here.
module bk_adder #(
  parameter int unsigned WIDTH = 3
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  // Largest power of two below WIDTH: first span of the down-sweep.
  localparam int unsigned TopSpan = (WIDTH <= 1) ? 1 : (1 << ($clog2(WIDTH) - 1));

  logic [WIDTH-1:0] g, p;
  logic [WIDTH:0]   c;            // c[i] = carry into bit i

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    amended_xor u_p   (.a(a[i]), .b(b[i]), .y(p[i]));
    amended_xor u_sum (.a(p[i]), .b(c[i]), .y(sum[i]));
  end
  assign g = a & b;

  always_comb begin
    logic [WIDTH-1:0] gg, pp;     // group generate / propagate, updated in place
    gg    = g;
    pp    = p;
    gg[0] = g[0] | (p[0] & cin);
    // up-sweep
    for (int unsigned d = 1; d < WIDTH; d = d * 2)
      for (int unsigned i = 2 * d - 1; i < WIDTH; i = i + 2 * d) begin
        gg[i] = gg[i] | (pp[i] & gg[i-d]);
        pp[i] = pp[i] & pp[i-d];
      end
    // down-sweep
    for (int unsigned d = TopSpan; d >= 1; d = d / 2)
      for (int unsigned i = 3 * d - 1; i < WIDTH; i = i + 2 * d)
        gg[i] = gg[i] | (pp[i] & gg[i-d]);
    c = {gg, cin};
  end

  assign cout = c[WIDTH];
endmodule
