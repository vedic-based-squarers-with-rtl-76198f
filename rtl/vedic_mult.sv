// N x N Vedic (Urdhva Tiryagbhyam) multiplier, N = 3 * 2^m.
// p = a * b. For N = 3 it is the 3x3 array multiplier. Otherwise, with
// k = N/2 and each operand split into a high and a low half, four k x k
// multipliers (instances of this module) form
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH   (N bits each)
// and three N-bit IBK carry-select adders combine them:
//   {c1, s1} = q1 + q2
//   {c2, s2} = s1 + (q0 >> k)
//   p        = {q3 + ({c1|c2, s2} >> k), s2[k-1:0], q0[k-1:0]}
// c1 and c2 are never both 1 (q1 + q2 + (q0 >> k) < 2^(N+1)), so an OR
// merges them. The decomposition into four half-size multipliers down to
// 3x3 units follows the published break-down tree; the adder arrangement is
// this design's choice.
//
// Timing: with PIPE_BITS != 0, every level of width >= PIPE_BITS registers
// its result on clk_i, so the latency is vbs_pkg::pipe_latency(N, PIPE_BITS)
// cycles and a new operand pair is accepted every cycle. PIPE_BITS = 0 gives
// a combinational multiplier (clk_i and rst_ni unused). rst_ni is an
// asynchronous active-low reset that clears the registers.
//
// Lint note: Verilator's lint reports the outputs of this module's own
// recursive sub-instances as undriven (and their inputs as unused). The
// signals are driven through the ports of the half-size instances; the
// report is an artefact of linting a self-instantiating module, and
// simulation of every width checks the results bit-exact.
module vedic_mult #(
  parameter int unsigned N         = 6,
  parameter int unsigned PIPE_BITS = 0
) (
  input  logic           clk_i,
  input  logic           rst_ni,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  import vbs_pkg::*;

  logic [2*N-1:0] p_c;            // combinational result of this level

  if (!legal_width(N)) begin : g_bad_width
    $error("vedic_mult: N must be 3 * 2^m");
  end

  if (N == LEAF_BITS) begin : g_leaf
    vm3x3 u_vm (.a(a), .b(b), .p(p_c));
  end else begin : g_split
    localparam int unsigned K = N / 2;

    logic [N-1:0] q0, q1, q2, q3;
    logic [N-1:0] s1, s2, hi_add;
    logic         c1, c2, c_top;

    vedic_mult #(.N(K), .PIPE_BITS(PIPE_BITS)) u_ll (
      .clk_i, .rst_ni, .a(a[K-1:0]), .b(b[K-1:0]), .p(q0));
    vedic_mult #(.N(K), .PIPE_BITS(PIPE_BITS)) u_hl (
      .clk_i, .rst_ni, .a(a[N-1:K]), .b(b[K-1:0]), .p(q1));
    vedic_mult #(.N(K), .PIPE_BITS(PIPE_BITS)) u_lh (
      .clk_i, .rst_ni, .a(a[K-1:0]), .b(b[N-1:K]), .p(q2));
    vedic_mult #(.N(K), .PIPE_BITS(PIPE_BITS)) u_hh (
      .clk_i, .rst_ni, .a(a[N-1:K]), .b(b[N-1:K]), .p(q3));

    ibk_csla #(.WIDTH(N)) u_add_cross (
      .a(q1), .b(q2), .cin(1'b0), .sum(s1), .cout(c1));
    ibk_csla #(.WIDTH(N)) u_add_low (
      .a(s1), .b({{K{1'b0}}, q0[N-1:K]}), .cin(1'b0), .sum(s2), .cout(c2));
    // The full product fits in 2N bits, so c_top is always 0.
    ibk_csla #(.WIDTH(N)) u_add_high (
      .a(q3), .b({{(K-1){1'b0}}, c1 | c2, s2[N-1:K]}), .cin(1'b0),
      .sum(hi_add), .cout(c_top));

    assign p_c = {hi_add, s2[K-1:0], q0[K-1:0]};
  end

  if (level_registered(N, PIPE_BITS)) begin : g_reg
    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) p <= '0;
      else         p <= p_c;
    end
  end else begin : g_comb
    assign p = p_c;
  end
endmodule
