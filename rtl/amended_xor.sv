// Amended two-input XOR gate.
// Computes a ^ b with three basic gates instead of the five of the
// sum-of-products form: an OR of the inputs, a NAND of the inputs, and an AND
// of those two results, i.e. y = (a | b) & ~(a & b). Purely combinational.
// The gate structure follows the published amended XOR; it is used for every
// sum bit of the adders and every toggle of the excess-1 converters here.
module amended_xor (
  input  logic a,
  input  logic b,
  output logic y
);
  logic or_ab, nand_ab;

  assign or_ab   = a | b;
  assign nand_ab = ~(a & b);
  assign y       = or_ab & nand_ab;
endmodule
