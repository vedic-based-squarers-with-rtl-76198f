// Shared constants and helper functions for the Vedic-based squarer (VBS)
// family. Operand widths are 3 * 2^m bits (3, 6, 12, 24): the recursion that
// builds an N-bit squarer from two N/2-bit squarers and one N/2 x N/2 Vedic
// multiplier stops at the dedicated 3-bit squarer and the 3x3 multiplier.
//
// Pipelining: PIPE_BITS selects the smallest sub-unit whose outputs are
// registered. Every squarer or multiplier level whose width is at least
// PIPE_BITS gets one register stage on its result; PIPE_BITS = 0 builds the
// whole unit as combinational logic.
package vbs_pkg;

  // Width of the smallest (leaf) squarer and multiplier.
  localparam int unsigned LEAF_BITS = 3;

  // True when n is 3 * 2^m for some m >= 0.
  function automatic bit legal_width(input int unsigned n);
    int unsigned v;
    if (n < LEAF_BITS || (n % LEAF_BITS) != 0) return 1'b0;
    v = n / LEAF_BITS;
    return (v & (v - 1)) == 0;
  endfunction

  // Whether a level of width n is followed by a register stage.
  function automatic bit level_registered(input int unsigned n, input int unsigned pipe_bits);
    return (pipe_bits != 0) && (n >= pipe_bits);
  endfunction

  // Clock cycles from operand to result of an n-bit squarer or multiplier:
  // one per registered level on the path n, n/2, ..., 3.
  function automatic int unsigned pipe_latency(input int unsigned n, input int unsigned pipe_bits);
    int unsigned lat = 0;
    for (int unsigned w = n; w >= LEAF_BITS; w = w / 2) begin
      if (level_registered(w, pipe_bits)) lat++;
      if (w == LEAF_BITS) break;
    end
    return lat;
  endfunction

endpackage
