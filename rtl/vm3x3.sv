// Conventional 3x3 Vedic (Urdhva Tiryagbhyam, "vertically and crosswise")
// multiplier. p = a * b for 3-bit operands.
// Nine AND gates form the partial products; each column of equal weight is
// reduced by the adder array: column 1 by a half adder, column 2 by a full
// adder followed by a half adder that takes column 1's carry, column 3 by a
// half adder followed by a full adder that absorbs the carries of column 2,
// and column 4 by a full adder whose carry out is p5. Three half adders and
// three full adders in all, as in the published conventional 3x3 VM.
// Purely combinational.
module vm3x3 (
  input  logic [2:0] a,
  input  logic [2:0] b,
  output logic [5:0] p
);
  logic [2:0][2:0] pp;            // pp[i][j] = a[i] & b[j]
  logic c1, s2a, c2a, c2b, s3a, c3a, c3b;

  always_comb begin
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        pp[i][j] = a[i] & b[j];
  end

  assign p[0] = pp[0][0];
  // weight 2^1
  half_adder u_ha_c1 (.a(pp[1][0]), .b(pp[0][1]), .sum(p[1]), .carry(c1));
  // weight 2^2
  full_adder u_fa_c2 (.a(pp[2][0]), .b(pp[1][1]), .cin(pp[0][2]), .sum(s2a), .carry(c2a));
  half_adder u_ha_c2 (.a(s2a), .b(c1), .sum(p[2]), .carry(c2b));
  // weight 2^3
  half_adder u_ha_c3 (.a(pp[2][1]), .b(pp[1][2]), .sum(s3a), .carry(c3a));
  full_adder u_fa_c3 (.a(s3a), .b(c2a), .cin(c2b), .sum(p[3]), .carry(c3b));
  // weight 2^4 and 2^5
  full_adder u_fa_c4 (.a(pp[2][2]), .b(c3a), .cin(c3b), .sum(p[4]), .carry(p[5]));
endmodule
