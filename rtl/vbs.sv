// N-bit Vedic-based squarer (VBS), N = 3 * 2^m: s = x * x.
// For N = 3 it is the dedicated 3-bit squarer. Otherwise x is split into a
// high half H and a low half L of k = N/2 bits and
//   x^2 = H^2 * 2^N + 2*H*L * 2^k + L^2.
// Two k-bit squarers (instances of this module) give H^2 and L^2; a single
// k x k Vedic multiplier gives H*L, and its doubling is a one-position left
// shift instead of a second multiplier. The low k bits of L^2 pass straight
// to s. An N-bit IBK carry-select adder adds
//   A = {HL[N-2:0], 0}   and   B = {H2[k-1:0], L2[N-1:k]}
// giving s[N+k-1:k] and a carry C1. The top k bits are H2[N-1:k] plus C1
// plus the bit HL[N-1] that the shift pushed out of the adder, done with
// excess-1 converters (increment-by-one units) instead of an adder:
//   N = 6  : C1 and HL[5] are never both 1, so one 3-bit BEC driven by
//            (C1 | HL[5]) suffices, exactly as in the published 6-bit VBS.
//   N >= 12: C1 and HL[N-1] can both be 1 (100 of the 4096 12-bit inputs),
//            so two k-bit BECs in series add each one separately. This
//            extension is this design's own; the OR form would be wrong.
//
// Timing: with PIPE_BITS != 0, every level of width >= PIPE_BITS registers
// its result on clk_i; latency vbs_pkg::pipe_latency(N, PIPE_BITS) cycles,
// one operand accepted per cycle. The squarer and multiplier halves of a
// level have equal latency, so no balancing registers are needed.
// PIPE_BITS = 0 (the default) is the combinational squarer. rst_ni is an
// asynchronous active-low reset that clears the registers.
//
// Lint note: Verilator's lint reports the outputs of this module's own
// recursive sub-instances as undriven (and their inputs as unused). The
// signals are driven through the ports of the half-size instances; the
// report is an artefact of linting a self-instantiating module, and
// simulation of every width checks the results bit-exact.
module vbs #(
  parameter int unsigned N         = 6,
  parameter int unsigned PIPE_BITS = 0
) (
  input  logic           clk_i,
  input  logic           rst_ni,
  input  logic [N-1:0]   x,
  output logic [2*N-1:0] s
);
  import vbs_pkg::*;

  logic [2*N-1:0] s_c;            // combinational result of this level

  if (!legal_width(N)) begin : g_bad_width
    $error("vbs: N must be 3 * 2^m");
  end

  if (N == LEAF_BITS) begin : g_leaf
    sq3_dedicated u_sq (.x(x), .s(s_c));
  end else begin : g_split
    localparam int unsigned K = N / 2;

    logic [N-1:0] l2, h2;         // L^2, H^2
    logic [N-1:0] hl;             // H*L
    logic [N-1:0] mid;
    logic         c1;
    logic [K-1:0] top;

    vbs #(.N(K), .PIPE_BITS(PIPE_BITS)) u_sq_lo (
      .clk_i, .rst_ni, .x(x[K-1:0]), .s(l2));
    vbs #(.N(K), .PIPE_BITS(PIPE_BITS)) u_sq_hi (
      .clk_i, .rst_ni, .x(x[N-1:K]), .s(h2));
    vedic_mult #(.N(K), .PIPE_BITS(PIPE_BITS)) u_vm (
      .clk_i, .rst_ni, .a(x[N-1:K]), .b(x[K-1:0]), .p(hl));

    ibk_csla #(.WIDTH(N)) u_add (
      .a({hl[N-2:0], 1'b0}), .b({h2[K-1:0], l2[N-1:K]}), .cin(1'b0),
      .sum(mid), .cout(c1));

    if (N == 2 * LEAF_BITS) begin : g_inc_or
      bec #(.WIDTH(K)) u_ib1 (.b(h2[N-1:K]), .inc(c1 | hl[N-1]), .y(top));
    end else begin : g_inc_two
      logic [K-1:0] top_c1;
      bec #(.WIDTH(K)) u_ib1_c1 (.b(h2[N-1:K]), .inc(c1),      .y(top_c1));
      bec #(.WIDTH(K)) u_ib1_hl (.b(top_c1),    .inc(hl[N-1]), .y(top));
    end

    assign s_c = {top, mid, l2[K-1:0]};
  end

  if (level_registered(N, PIPE_BITS)) begin : g_reg
    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) s <= '0;
      else         s <= s_c;
    end
  end else begin : g_comb
    assign s = s_c;
  end
endmodule
