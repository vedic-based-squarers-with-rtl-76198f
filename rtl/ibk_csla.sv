// Improved Brent-Kung carry-select adder (IBK-CSLA):
// {cout, sum} = a + b + cin for even WIDTH.
// The lower half is one Brent-Kung adder that takes cin. The upper half is
// a Brent-Kung adder with carry-in 0, giving {C1, sum_hi}, and a
// (WIDTH/2+1)-bit BEC that forms {C1, sum_hi} + 1, the result for an
// incoming carry of 1. A multiplexer steered by the lower half's carry out
// picks one of the two (WIDTH/2+1)-bit words, whose top bit is cout. So the
// upper half needs only one adder instead of the two of a plain CSLA.
// At the default WIDTH = 6 this is the published 6-bit adder: a 3-bit BK
// adder, a 3-bit BK adder with carry-in 0, a 4-bit BEC and an 8:4 mux.
// Wider instances (12 and 24 bits) are the same structure scaled, which is
// this design's choice. Purely combinational.
module ibk_csla #(
  parameter int unsigned WIDTH = 6
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned H = WIDTH / 2;

  logic         c_lo;             // carry out of the lower half: mux select
  logic [H-1:0] s_hi0;
  logic         c1;
  logic [H:0]   r0, r1;           // upper result for carry-in 0 / 1

  bk_adder #(.WIDTH(H)) u_lo (
    .a(a[H-1:0]), .b(b[H-1:0]), .cin(cin), .sum(sum[H-1:0]), .cout(c_lo)
  );
  bk_adder #(.WIDTH(H)) u_hi (
    .a(a[WIDTH-1:H]), .b(b[WIDTH-1:H]), .cin(1'b0), .sum(s_hi0), .cout(c1)
  );
  assign r0 = {c1, s_hi0};
  bec #(.WIDTH(H + 1)) u_bec (.b(r0), .inc(1'b1), .y(r1));

  always_comb begin
    if (c_lo) {cout, sum[WIDTH-1:H]} = r1;
    else      {cout, sum[WIDTH-1:H]} = r0;
  end

  if (WIDTH % 2 != 0 || WIDTH < 2) begin : g_bad_width
    $error("ibk_csla: WIDTH must be even and at least 2");
  end
endmodule
