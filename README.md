# Low-delay leading zero counters for 6-input-LUT FPGAs

A leading zero counter (LZC) takes an N-bit word and returns how many zero bits
precede its most significant one. Floating-point adders need it after an
effective subtraction, to know how far to shift the mantissa and how much to
lower the exponent. On an FPGA built from 6-input look-up tables, the counter's
delay is set by how many LUTs a signal crosses between the input and output
registers.

This RTL implements an LZC organised around one idea. A 16-bit counter needs
only **two** LUT levels when its first level is cut into overlapping slices that
each fit one LUT. The usual approach stacks two 8-bit counters, which costs an
extra level. Wider counters add a single 2:1 multiplexer level per doubling of
the width. Any width N ≥ 2 is supported. The default is N = 64.

## What the counter returns

For an N-bit input `x` (`x[N-1]` is the most significant bit) the counter
returns a pair `(v, c)`:

* `v = 1` if and only if `x` is zero;
* `c`, `clog2(N)` bits wide, is the leading zero count when `v = 0`, and all
  ones when `v = 1`.

So an LZC-16 of `0x0002` gives `(0, 14)`, and an LZC-16 of zero gives `(1, 15)`.
An LZC-12 of zero gives `(1, 15)` too, because its count is 4 bits wide. The
all-ones convention is not an extra feature. It falls out of the intermediate
signals at no cost, and it lets missing parts of a wider counter be replaced by
constants (see below).

## The first LUT level: leading-parity signals

The basic LUT function takes a 6-bit slice X6..X1, with X6 the most
significant bit. It computes four signals:

| X6 | X5 | X4 | X3 | X2 | X1 | LP3 | LP2 | LP1 | LP4 |
|----|----|----|----|----|----|-----|-----|-----|-----|
| 1  | -  | -  | -  | -  | -  | 0   | 0   | 0   | 0   |
| 0  | 1  | -  | -  | -  | -  | 0   | 0   | 1   | 0   |
| 0  | 0  | 1  | -  | -  | -  | 0   | 1   | 0   | 0   |
| 0  | 0  | 0  | 1  | -  | -  | 0   | 1   | 1   | 0   |
| 0  | 0  | 0  | 0  | 1  | -  | 1   | 0   | 0   | 0   |
| 0  | 0  | 0  | 0  | 0  | 1  | 1   | 0   | 1   | 0   |
| 0  | 0  | 0  | 0  | 0  | 0  | 1   | 1   | 1   | 1   |

`{LP3, LP2, LP1}` is the slice's own leading zero count, with 7 for an
all-zero slice. `LP4` flags the all-zero slice. As Boolean expressions
(`lzc_pkg`):

```
LP1 = ~X6 & (X5 | (~X4 & (X3 | ~X2)))
LP2 = ~X6 & ~X5 & (X4 | X3 | (~X2 & ~X1))
LP3 = ~X6 & ~X5 & ~X4 & ~X3
LP4 = ~(X6 | X5 | X4 | X3 | X2 | X1)
```

LP1 does not depend on X1. When only X1 can be set, the count is 5, and the
all-zero code is 7. Both are odd, so bit 0 is 1 either way. The same holds for
the lowest bit of any slice whose all-zero case is resolved elsewhere. This
saved input is what lets the 16-bit counter fit in two LUT levels.

## LZC-16 in two LUT levels (`lzc8_intermediate`, `lzc16`)

Number the 16 input bits X16 (MSB) down to X1. The first level reads these
overlapping slices. No LUT has more than six inputs, and pairs that share
inputs fit one dual-output LUT (LUT6-2):

| signal            | reads        | meaning                                     |
|-------------------|--------------|---------------------------------------------|
| LP1_H, LP3_H      | X16..X12     | count bits 0 and 2 within X16..X11           |
| LP2_H             | X16..X11     | count bit 1 within X16..X11                  |
| LP4_H             | X16..X11     | X16..X11 all zero                            |
| LP1_L, LP4_L      | X10..X6      | count bit 0 within X10..X5; X10..X6 all zero |
| LP2_L             | X8..X3       | count bit 1 within X8..X3                    |
| LP1_LL, LP4_LL    | X5..X1       | slice `{0, X5..X1}`: bit 0; X5..X1 all zero  |

X10, X9 and X5 bypass the first level. The second level is then a set of
functions of at most six signals each:

```
V_H = LP4_H & ~X10 & ~X9                     upper byte all zero
V   = LP4_H & LP4_L & LP4_LL
Z3  = V_H
Z2  = V_H ? (LP4_L & ~X5) : LP3_H
Z1  = V_H ? LP2_L         : LP2_H
Z0  = LP4_H ? (LP4_L ? LP1_LL : LP1_L) : LP1_H
```

The bit-0 formula works because the slices are laid out as 6 + 5 + 5 bits
with even offsets:

* If the leading one is in X16..X11, LP1_H is the answer.
* Otherwise the count is 6 plus the count within X10..X5, which has the same
  parity. LP1_L gives it, and it may ignore X5.
* If X10..X6 are zero as well, the count is 10 plus the count within the
  6-bit slice `{0, X5..X1}`, and LP1_LL gives that parity.

Bits 1 and 2 follow the byte split instead. The upper byte's count bits come
from the H slice, because X10 and X9 only matter when X16..X11 are all zero.
In that case LP2_H = LP3_H = 1 already matches counts 6 and 7. The lower byte's
bit 2 is "X8..X5 all zero". When V_H = 1 that equals `LP4_L & ~X5`.

Worked example, `x = 0x0002`. Every H and L signal is 1, and LP1_LL and
LP4_LL are 0. So V_H = 1, V = 0, Z3 = Z2 = Z1 = 1 and Z0 = 0, giving a
count of 14.

`lzc16` takes a width parameter `W` (1..16). The valid bits sit at the top of
its 16-bit port.

* W = 15 or 16 uses the two-level form above.
* W = 9..14 uses two ordinary 8-bit counters (`lzc8_half`) and one merge
  stage.
* W ≤ 8 uses one 8-bit counter. Its missing low half is replaced by the
  constants `v = 1, c = 111`.

In all three forms, absent input bits are tied to zero inside. The equations
then simplify by constant propagation. The results are exactly those of a
hand-pruned circuit, and all widths are tested exhaustively.

`lzc8_half` is the plain 8-bit counter used in those cases. It has one
leading-parity group on its top six bits and bypasses the two bottom bits
(B2, B1):

```
V  = LP4 & ~B2 & ~B1     Z2 = LP3     Z1 = LP2     Z0 = (LP1 & ~LP4) | (LP4 & ~B2)
```

## Wider counters: the multiplexer tree (`lzc_merge`, `lzc`)

Two counters covering 2^W bits each combine into one of 2^(W+1) bits:

```
V          = V_H & V_L
C[W]       = V_H
C[W-1:0]   = V_H ? C_L : C_H
```

Each output bit depends on at most three signals. It maps to one small LUT, or
to the MUXF7/MUXF8 multiplexers of a slice with V_H as select.

`lzc #(.N(N))` builds the whole counter:

1. It cuts `x` into S = ceil(N/16) slices from the top. Each slice is an
   `lzc16`, and the last slice gets the leftover width.
2. It combines the slices in a binary tree of `lzc_merge` stages,
   ceil(log2 S) levels deep.
3. Where a level has an odd number of nodes, the unpaired node is merged with
   the all-true constants. An all-zero padding slice would produce the same
   values.

The count is finally cut to `clog2(N)` bits. The dropped bits can only differ
from zero for the all-zero input, whose count is all ones at any width.

Logic depth: two LUT levels for the slices plus one multiplexer level per tree
level. For the default N = 64 that is two LUT levels and two mux levels.

## The multiplexer-only LZC-8 (`lzc8_muxf`)

This is an 8-bit counter in which no LUT feeds another LUT. It is built for
the slice multiplexers of Xilinx CLBs. Four LUTs read only the input X8..X1:

* LP3(X8..X5) and LP2(X8..X3), which are count bits 2 and 1;
* X7 | LP1(X6..X2);
* "X6..X1 all zero".

Input bits then select between these values and constants:

```
LP1 = X8 ? 0 : (X7 | LP1(X6..X1))       one MUXF7
LP4 = X7 ? 0 : (X6..X1 == 0)            one MUXF7
V   = X8 ? 0 : LP4                      one MUXF8
```

The RTL writes the multiplexers as `?:`. A synthesis tool may or may not map
them onto MUXF7/MUXF8 cells. Forcing that mapping needs vendor primitives,
which this code does not use.

## Registered top (`lzc_top`)

The counters are combinational. Their delay matters between two registers,
and `lzc_top` provides that arrangement for an LZC-N (default 64) and, beside
it, the multiplexer LZC-8. Each has its own ports and a valid bit:

* A word given with `in_valid` at clock edge k is captured at edge k.
* Its result appears with `out_valid` after edge k+1: two edges of latency.
* It accepts one word per cycle and has no stalls.
* `rst_n` is a synchronous, active-low reset. It clears the valid bits and the
  data registers.

The register stages, the valid bits and the reset are choices made for this
wrapper. The counters themselves follow the published scheme.

## Files

| file | contents |
|------|----------|
| `rtl/lzc_pkg.sv` | LP1..LP4 functions; `lp_t` and `inter_t` structs |
| `rtl/lzc_lp6.sv` | one 6-bit leading-parity LUT group |
| `rtl/lzc8_half.sv` | plain LZC-8 (LP group + 2 bypass bits) |
| `rtl/lzc8_intermediate.sv` | first LUT level of the two-level LZC-15/16 |
| `rtl/lzc_merge.sv` | one tree stage, parameter `W` (input count width) |
| `rtl/lzc16.sv` | counter for a slice of `W` ≤ 16 bits |
| `rtl/lzc8_muxf.sv` | multiplexer-only LZC-8 |
| `rtl/lzc.sv` | LZC-N, parameter `N` (default 64) |
| `rtl/lzc_top.sv` | registered LZC-N and LZC-8 side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |

Hierarchy: `lzc_top` → `lzc` → `lzc16` → (`lzc8_intermediate` |
`lzc8_half` → `lzc_lp6`) and `lzc_merge`. `lzc_top` also instantiates
`lzc8_muxf`.

## Verification

Every testbench compares against a loop that counts leading zeros. None of
them reuses the design's equations. Each prints `TB_RESULT checks=… failures=…`
and stops itself through a watchdog if it hangs.

* `tb_lzc_lp6`, `tb_lzc8_half`, `tb_lzc8_muxf`: all inputs.
* `tb_lzc8_intermediate`: all 2^16 inputs. Each first-level signal is checked
  against what it must mean for the count.
* `tb_lzc_merge`: all pairs of bytes. The merged result must equal the 16-bit
  count. A second instance checks the missing-half constants.
* `tb_lzc16`: all inputs for W = 16, 15, 14, 12, 9, 8, 5 and 1, with random
  bits below the valid field, plus the `0x0002` example.
* `tb_lzc`: N = 64, 32, 16, 8, 26, 55, 68, 2, 12, 40 and 128. Every
  leading-one position is tried with random lower bits, plus the zero word
  and random words. The list includes the mantissa-path widths of IEEE single
  (26) and double (55) precision adders and of x87 extended precision (68),
  and widths with an odd slice count or a partial slice.
* `tb_lzc_top`: the top at its default parameters. It runs a stream with
  random idle cycles and checks the exact two-edge latency with a scoreboard.
  It requires every count 0..63, the zero word, each slice, each part of a
  slice (X16..X11, X10..X9, X8..X6, X5..X1) and the low-half selection at
  both tree levels to occur.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/lzc_pkg.sv tb/tb_lzc.sv --top-module tb_lzc -o sim
./obj_dir/sim
```

All testbenches finish in well under a second.

## Limits and departures

* **LUT mapping is not forced.** The RTL is written so that each first-level
  signal is a function of at most six inputs, and each later signal of at most
  six signals. It does not carry vendor attributes (`KEEP`, `DONT_TOUCH`,
  `LUTNM`). Whether a tool keeps this two-level structure, combines LUTs or
  maps the muxes onto MUXF7/MUXF8 depends on the tool and its settings.
  Expect published LUT counts and path delays only with a similarly
  constrained Vivado flow.
* **No internal pipelining.** Very wide counters (about 68 bits and up at
  650 MHz on UltraScale+) may need registers inside the tree. None are
  provided; `lzc_top` registers only the input and output.
* **Partial slices are simplified by constants.** A slice narrower than 16
  bits is not a hand-pruned netlist: absent bits are tied to zero and left to
  constant propagation. Functionally this is identical.
* **N = 1 is not supported.** Its count would have no bits.
* **The worked example is resolved one way.** One published walk-through of
  the `0x0002` example lists V among the signals equal to 1. That contradicts
  its own result (0, 14) and the V equation. This code returns V = 0; the
  signal that is 1 there is V_H.
