# Vedic-based squarer: 6, 12 and 24 bits, pipelined

A squarer needs less hardware than a multiplier because both operands are the
same. This design squares an N-bit number (N = 3, 6, 12 or 24) by splitting it
into a high half H and a low half L and using

    x^2 = H^2 * 2^N  +  2*H*L * 2^(N/2)  +  L^2

The two half-size squares come from two half-size squarers, built the same way
again. The two equal cross products H*L and L*H of an ordinary multiplier
become one half-size multiplier whose result is shifted left by one bit. The
splitting ends at 3 bits, where a squarer that needs only a few gates replaces
the multiplier, and at a 3x3 "vertically and crosswise" (Urdhva
Tiryagbhyam) Vedic multiplier. The partial results are added by a Brent-Kung
carry-select adder. A simplified XOR gate made of three gates sits inside
every adder and incrementer.

The top level, `vbs24_top`, is a 24-bit squarer with a 48-bit result. It is
pipelined so that it accepts one operand per clock. The same RTL can also be
built as the 6- and 12-bit squarers, with coarser pipelining, or as pure
combinational logic.

## One level of the recursion

This is the part that needs the most care. The level is in `rtl/vbs.sv`. Let
k = N/2, H = x[N-1:k], L = x[k-1:0], and let the three sub-units deliver

    L2 = L*L   (N bits)     H2 = H*H   (N bits)     HL = H*L   (N bits)

The weights line up like this (for N = 6, k = 3, as bit positions of the
12-bit result):

    bit:     11 10  9 |  8  7  6  5  4  3 |  2  1  0
    L2                |          L2[5:3]  | L2[2:0]
    2*HL     HL[5]    | HL[4:0], 0        |
    H2       H2[5:3]  | H2[2:0] at 8..6   |

* `L2[k-1:0]` is already final. It goes straight to `s[k-1:0]`.
* One N-bit adder (`ibk_csla`) adds `A = {HL[N-2:0], 0}` and
  `B = {H2[k-1:0], L2[N-1:k]}`. This gives `s[N+k-1:k]` and a carry C1.
* The top k bits are `H2[N-1:k] + C1 + HL[N-1]`. Bit `HL[N-1]` is the bit that
  the doubling shift pushed out of the adder. A full adder is not needed here.
  Increment units do the job instead: a binary-to-excess-1 converter (BEC)
  with an enable.

**6 bits.** C1 and `HL[5]` are never both 1, which the exhaustive test
confirms. So a single 3-bit BEC, enabled by `C1 | HL[5]`, forms the top
three bits. This is the published 6-bit circuit.

**12 and 24 bits.** The OR trick does **not** carry over. For a 12-bit operand,
C1 and `HL[11]` are both 1 for 100 of the 4096 inputs. One example is
x = 0xAF5, where H = 43 and L = 53. The top bits then need +2. For N >= 12 this
design therefore chains two k-bit BECs: the first is enabled by C1 and the
second by `HL[N-1]`. This extension is our own. The testbench counts the
"both" case and requires that it occurs.

Each level's squarer halves and multiplier have the same depth. So when the
design is pipelined, their results arrive in the same cycle without extra
delay registers.

## The 3-bit squarer

`rtl/sq3_dedicated.sv` replaces the adder array with one gate per output bit
(x = x2 x1 x0, s = x*x):

| bit | logic            | gates            |
|-----|------------------|------------------|
| s0  | x0               | wire             |
| s1  | 0                | constant         |
| s2  | x1 & ~x0         | NOT, AND         |
| s3  | x0 & (x1 ^ x2)   | XOR, AND         |
| s4  | x2 & (~x1 \| x0) | NOT, OR, AND     |
| s5  | x2 & x1          | AND              |

Bit 1 of any square is 0. In the 24-bit result it is therefore a constant,
and synthesis reports it as an idle output.

## Multipliers

`rtl/vm3x3.sv` is a conventional 3x3 array multiplier. It uses nine AND
gates, three half adders and three full adders, and reduces the partial
products column by column.

`rtl/vedic_mult.sv` builds an N x N multiplier (N = 6, 12) from four N/2 x N/2
multipliers, itself included, and three N-bit carry-select adders:

    {c1, s1} = aH*bL + aL*bH
    {c2, s2} = s1 + (aL*bL >> k)
    p        = { aH*bH + ({c1|c2, s2} >> k),  s2[k-1:0],  (aL*bL)[k-1:0] }

c1 and c2 cannot both be 1, because the three terms sum to less than
2^(N+1). The way the four sub-products are added is our own choice. The
published design fixes only the four-way split. The 24-bit squarer uses one
12x12 multiplier (sixteen 3x3 units). Each 12-bit squarer holds one 6x6
multiplier (four 3x3 units), and each 6-bit squarer holds one 3x3 unit. That
makes 28 3x3 multipliers and eight 3-bit squarers in all.

## Adders: IBK carry-select adder, BEC, amended XOR

`rtl/ibk_csla.sv` (default 6 bits) splits the addition in half:

* The lower half is a Brent-Kung adder (`bk_adder`) with the real carry-in.
* The upper half is a Brent-Kung adder with carry-in 0. It gives `{C1, sum}`.
  A (half+1)-bit BEC forms `{C1, sum} + 1` alongside it.
* The lower half's carry-out drives a multiplexer, which picks one of the two
  upper results. The top bit of the chosen result is the carry-out.

A classic carry-select adder duplicates the upper adder. Here the BEC replaces
the duplicate. The 12- and 24-bit instances have the same structure.

`rtl/bk_adder.sv` is a generic Brent-Kung prefix adder. It does an up-sweep
over spans 1, 2, 4, … and then a down-sweep. The carry-in is folded into bit
0.

`rtl/bec.sv` computes `b + inc`. Bit i toggles when `inc` and all lower bits
are 1. Inside the carry-select adder `inc` is tied to 1. In the squarer,
`inc` is the correction signal.

`rtl/amended_xor.sv` computes XOR as `(a | b) & ~(a & b)`: an OR, a NAND and an
AND. Every propagate, sum and toggle XOR in the adders, BECs, half adders and
full adders is an instance of it. Synthesis tools merge it back into plain
XOR logic. It records the published gate structure and has no effect on
function.

## Pipelining and the 24-bit top

The parameter `PIPE_BITS` chooses which levels end in a register. A level of
width N has a register on its result when `PIPE_BITS != 0` and
`N >= PIPE_BITS`. The latency of an N-bit unit is therefore the number of
registered widths among N, N/2, …, 3 (`vbs_pkg::pipe_latency`).

| PIPE_BITS | organisation                                   | latency (24-bit) |
|-----------|------------------------------------------------|------------------|
| 3 (default of `vbs24_top`) | (c) 3-bit squarers and 3x3 multipliers are the pipelined units, plus every combining level | 4 |
| 6         | (b) 6-bit units pipelined                      | 3 |
| 12        | (a) 12-bit units pipelined                     | 2 |
| 0         | combinational (default of `vbs` and `vedic_mult`) | 0 |

Organisation (c) is the one the source reports as smallest and fastest, so it
is the default. Exactly where the registers sit is our own choice. The source
names the pipelined units but does not give their register placement.

`vbs24_top` interface:

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| clk_i        | in  | 1     | clock |
| rst_ni       | in  | 1     | asynchronous active-low reset. Clears all data registers and the valid pipeline |
| in_valid_i   | in  | 1     | `x_i` carries an operand this cycle |
| x_i          | in  | 24    | operand |
| out_valid_o  | out | 1     | `sq_o` carries a result this cycle |
| sq_o         | out | 48    | `x_i * x_i` of the operand presented LATENCY clocks earlier |

There is no back-pressure. The pipeline moves on every clock, so a new
operand may be presented every cycle, and a reset drops the operands in
flight. The valid signals are additions of this design and are not part of
the published datapath.

## Files and hierarchy

    vbs24_top                 24-bit pipelined squarer, valid pipeline
      vbs #(24)               recursive squarer level
        vbs #(12) x2 -> vbs #(6) x2 -> vbs #(3) -> sq3_dedicated
        vedic_mult #(12) -> vedic_mult #(6) x4 -> vedic_mult #(3) -> vm3x3
        ibk_csla -> bk_adder x2, bec
        bec (top-bit increment)
    vbs_pkg                   width check and pipeline latency functions
    half_adder, full_adder    helpers of vm3x3
    amended_xor               used by all of the above

Each `rtl/*.sv` holds one module or package. Each block has a self-checking
testbench `tb/<module>_tb.sv`. `tb/vbs24_arch_tb.sv` runs organisations (a),
(b) and the combinational build side by side.

## Simulating

With Verilator 5 (`-Irtl` lets it find the modules by name):

    verilator --binary --timing --assert -Irtl rtl/vbs_pkg.sv tb/vbs24_top_tb.sv \
              --top-module vbs24_top_tb -o sim
    ./obj_dir/sim

Every testbench prints one line, `TB_RESULT checks=<n> failures=<m>`. Every
testbench also has a watchdog that counts a failure if it hangs. To try
another size or organisation, override `N` (3·2^m) and `PIPE_BITS` on `vbs`,
`vedic_mult` or `vbs24_top`. An illegal `N` stops elaboration with an error.

## What the tests establish

* The 3-bit squarer, the 3x3 multiplier, the XOR, the 3- and 6-bit Brent-Kung
  adders, the 3-, 4- and 7-bit BECs and the 6-bit carry-select adder are each
  checked on every input combination. The 12-, 13- and 24-bit adders are
  checked with random operands and the longest carry chain.
* The 6- and 12-bit squarers are checked on every operand, and the 6x6
  multiplier on every operand pair. The 24-bit squarer and the 12x12
  multiplier are checked with random operands and the extremes.
* The pipelined 12-bit squarer and multiplier are checked cycle-exactly.
* `vbs24_top_tb` runs the 24-bit top at its default parameters. It checks
  about 4,000 results for value and for the exact 4-cycle latency. The
  stream includes bubbles and back-to-back operands, and a reset while
  operands are in flight. The testbench fails if any of these was never
  exercised: the two carry-select paths of the final adder, or the top-bit
  corrections by C1, by the shifted-out bit, or by both.
* Each testbench was also run against a deliberately broken copy of its
  module and failed.

No timing or area figures were measured. The published results were FPGA
numbers: 4-input LUTs and ns on a Virtex-4. They do not carry over to this
RTL, whose XOR and gate structure any synthesis tool will restructure.

## Departures from the published design

* **Top-bit correction for 12 and 24 bits:** two BECs in series instead of one
  BEC enabled by an OR. The OR version gives wrong squares (see above).
* **Number of 3x3 multipliers:** the 24-bit organisation (c) has 28 of them,
  as the recursive break-down requires. The source's count of twenty-four does
  not match its own break-down.
* **Insides the source leaves open, filled in here with standard
  structures:**
  * the Brent-Kung prefix tree;
  * the BEC gate chain;
  * how the four partial products of the 6x6 and 12x12 multipliers are added;
  * where the pipeline registers sit;
  * reset;
  * the valid handshake.

  The 12- and 24-bit carry-select adders are the 6-bit structure scaled up.
* **Not included:** the comparison variants built with ripple-carry and plain
  carry-select adders, and the conventional 3-bit squarer built from a half-
  and full-adder array. The dedicated 3-bit squarer replaces it. A complete
  floating-point squarer is also left out: only the significand squaring is
  provided.

## Lint notes

Verilator's lint reports these warnings. They are expected and harmless:

* **Undriven outputs of the recursive sub-instances in `vbs` and
  `vedic_mult`, and unused inputs:** Verilator lints a self-instantiating
  module this way. The ports are connected, and simulation at every width
  checks them.
* **`c_top` unused in `vedic_mult`:** it is the carry-out of the high-half
  adder, which is always 0 because the product fits in 2N bits.
* **`clk_i` and `rst_ni` unused in the combinational builds** (`PIPE_BITS = 0`).
