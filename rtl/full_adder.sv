// Full adder: sum = a ^ b ^ cin (two amended XORs), carry is the majority of
// the three inputs. Combinational helper of the 3x3 Vedic multiplier.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic carry
);
  logic ab;

  amended_xor u_xor0 (.a(a),  .b(b),   .y(ab));
  amended_xor u_xor1 (.a(ab), .b(cin), .y(sum));
  assign carry = (a & b) | (ab & cin);
endmodule
