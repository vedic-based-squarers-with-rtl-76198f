// Half adder: sum = a ^ b (through the amended XOR), carry = a & b.
// Combinational helper of the 3x3 Vedic multiplier.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  amended_xor u_xor (.a(a), .b(b), .y(sum));
  assign carry = a & b;
endmodule
