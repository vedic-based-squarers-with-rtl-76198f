// Binary to excess-1 converter (BEC), also used as the increment-by-one
// (IB1) unit: y = b + inc, modulo 2^WIDTH.
// Bit i toggles when inc is set and every lower bit is 1, so the unit is a
// chain of AND gates (the running "all ones below" term) and amended XORs,
// with no full adders. With inc tied to 1 it is the classic BEC of a
// BEC-based carry-select adder; with inc driven by logic it is the
// controlled incrementer on the top bits of the squarer. The published
// design gives the function; this gate-level form is the usual one.
// Purely combinational.
module bec #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] b,
  input  logic             inc,
  output logic [WIDTH-1:0] y
);
  logic [WIDTH-1:0] t;            // t[i] = inc & b[i-1] & ... & b[0]

  assign t[0] = inc;
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    if (i > 0) begin : g_chain
      assign t[i] = t[i-1] & b[i-1];
    end
    amended_xor u_x (.a(b[i]), .b(t[i]), .y(y[i]));
  end
endmodule
