// Dedicated 3-bit squarer.
// Produces s = x * x for a 3-bit x with a handful of gates and no adders,
// replacing the half/full-adder array of a 3x3 multiplier fed twice with x:
//   s0 = x0                      (x0 & x0)
//   s1 = 0                       (x0x1 + x1x0 is always even)
//   s2 = x1 & ~x0                (NOT + AND)
//   s3 = x0 & (x1 ^ x2)          (XOR + AND)
//   s4 = x2 & (~x1 | x0)         (NOT + OR + AND)
//   s5 = x2 & x1                 (AND)
// The gate assignment per output bit follows the published dedicated squarer;
// the XOR is the amended three-gate XOR. Purely combinational.
module sq3_dedicated (
  input  logic [2:0] x,
  output logic [5:0] s
);
  logic x1_xor_x2;

  amended_xor u_xor (.a(x[1]), .b(x[2]), .y(x1_xor_x2));

  assign s[0] = x[0];
  assign s[1] = 1'b0;
  assign s[2] = x[1] & ~x[0];
  assign s[3] = x[0] & x1_xor_x2;
  assign s[4] = x[2] & (~x[1] | x[0]);
  assign s[5] = x[2] & x[1];
endmodule
