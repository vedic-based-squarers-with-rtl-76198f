// 24-bit pipelined Vedic-based squarer: sq_o = x_i * x_i (48 bits).
// Architecture (c) of the three pipelined 24-bit organisations: the squarer
// is broken down recursively (24 -> 12 -> 6 -> 3 bits) into eight dedicated
// 3-bit squarers and twenty-eight 3x3 Vedic multipliers (four in the 6-bit
// squarers, eight in the two 6x6 multipliers of the 12-bit squarers and
// sixteen in the 12x12 multiplier), and the 3-bit units are the pipelined
// ones. With PIPE_BITS = 3 the outputs of the 3-bit units and of every
// combining level (6, 12, 24 bits) are registered: 4 cycles of latency and
// one new operand every cycle. PIPE_BITS = 6 or 12 gives architectures (b)
// and (a), with 3 and 2 cycles of latency; 0 gives a combinational squarer.
// The break-down and the choice of pipelined units follow the published
// organisation; the exact register placement is this design's own.
//
// Interface: in_valid_i qualifies x_i; out_valid_o rises LATENCY cycles
// later together with the square of that operand. There is no back-pressure:
// the pipeline advances every clock. rst_ni is an asynchronous active-low
// reset that clears the valid pipeline and the data registers. The valid
// signal is this design's addition to make the pipeline usable. An
// assertion checks that bit 1 of every valid square is 0.
module vbs24_top #(
  parameter int unsigned N         = 24,
  parameter int unsigned PIPE_BITS = 3
) (
  input  logic           clk_i,
  input  logic           rst_ni,
  input  logic           in_valid_i,
  input  logic [N-1:0]   x_i,
  output logic           out_valid_o,
  output logic [2*N-1:0] sq_o
);
  import vbs_pkg::*;

  localparam int unsigned LATENCY = pipe_latency(N, PIPE_BITS);

  vbs #(.N(N), .PIPE_BITS(PIPE_BITS)) u_vbs (
    .clk_i, .rst_ni, .x(x_i), .s(sq_o));

  if (LATENCY == 0) begin : g_comb_valid
    assign out_valid_o = in_valid_i;
  end else begin : g_valid_pipe
    // vld_q[i] is the valid bit of the operand that entered i+1 cycles ago.
    logic [LATENCY:0] vld_q;
    assign vld_q[0] = in_valid_i;
    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) vld_q[LATENCY:1] <= '0;
      else         vld_q[LATENCY:1] <= vld_q[LATENCY-1:0];
    end
    assign out_valid_o = vld_q[LATENCY];

    // A square is 0 or 1 modulo 4, so bit 1 of every valid result is 0.
    a_sq_bit1_zero: assert property (
      @(posedge clk_i) disable iff (!rst_ni) out_valid_o |-> !sq_o[1]);
  end
endmodule
