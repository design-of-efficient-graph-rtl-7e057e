# Graph-based constant multiplication with a modified carry save adder

Multiplying a signal by several fixed constants at once (multiple constant
multiplication, MCM) is the core of a transposed-form FIR filter: every
coefficient multiplies the same input sample. With constants known in
advance, a multiplier is unnecessary; each product can be built from shifts
and additions. This design does two things to make that fast:

1. **Share partial products.** Instead of one addition per `1` bit of each
   constant, a small graph of shift-add operations computes an intermediate
   product once and reuses it. For the constants 29 and 43, the binary
   expansions (`11101b`, `101011b`) cost six additions. The graph below costs
   three:

   ```
   7x  = (x << 3) - x
   29x = (7x << 2) + x
   43x = 29x + (7x << 1)
   ```

2. **Make every adder a modified carry save adder (MCSA).** Each of those
   operations, and the filter's tap adder, is a three-operand adder whose
   final carry-propagate stage is split into carry-selected groups, so its
   delay is set by a short ripple plus a chain of multiplexers rather than a
   full-width carry ripple.

The top level, `gb_fir`, is a two-tap transposed-form FIR filter
`y[n] = 29 x[n] + 43 x[n-1]` built from these parts.

## The modified carry save adder (`mcsa`, `mcsa_group`)

`mcsa` adds three unsigned N-bit words `a + b + c` and returns the exact
N+2-bit sum.

**Carry save row.** One full adder per bit turns the three operands into a
sum vector `sv` and a carry vector `cv`. No carry moves sideways here.

**Final stage.** `sv + (cv << 1)` still has to be added with carry
propagation. That addition covers result bits `[N:0]`, and its carry out is
bit N+1. In a conventional carry save adder this is a ripple-carry adder
across all N+1 bits. Here it is cut into groups. For N = 16:

| group | result bits | carry out | how it is formed |
|-------|-------------|-----------|------------------|
| 1 | `s[4:0]`   | c4  | ripples with carry-in 0 |
| 2 | `x[7:5]`   | c7  | selected by c4 |
| 3 | `x[10:8]`  | c10 | selected by c7 |
| 4 | `x[13:11]` | c13 | selected by c10 |
| 5 | `x[16:14]` | bit 17 | selected by c13 |

Each selected group (`mcsa_group`) ripples its slice assuming a carry-in of 0.
At the same time it forms the carry-in-1 answer by incrementing that result:
bit i flips when all lower bits of the carry-0 sum are 1, and the carry out
becomes `c0 | (all bits 1)`. Both answers are ready before the group's
carry-in settles, so a 2:1 multiplexer finishes the group. The carry
therefore passes through one multiplexer per group instead of rippling
through every bit. The critical path is the carry save row, then group 1's
5-bit ripple, then four multiplexers.

**Sizing rule.** The first group is `log2(N)+1` bits wide. Each later group
has `log2(N)-1` sum bits plus its carry (`log2(N)` values), and the last group
takes whatever bits remain. These rules are the functions in `mcsa_pkg`, so
`N = 32` gives groups of 6, then 4, ..., 4, 3 bits, and `N = 64` gives 7, then
5 bits each. `FIRST_W` and `GRP_W` can also be set directly.

**Carry outputs.** `grp_carry[g]` is the carry into selected group g (c4, c7,
c10, c13 at N = 16). Nothing in the datapath uses these outputs. They exist
so the carry-select paths can be observed.

The adder is purely combinational and has no clock.

## The graph-based multiplier (`gb_mcm`)

`gb_mcm` takes an 8-bit two's complement `x` and returns `p7`, `p29` and `p43`
as 16-bit two's complement words. It contains three 16-bit `mcsa` instances,
one per graph operation:

- **Subtraction.** `7x = 8x - x` is formed as `8x + ~x + 1`, where the `+1`
  of the two's complement goes in through the adder's third operand. This is
  why a three-operand adder suits the graph: a subtraction costs no more than
  an addition.
- **Additions.** For the two additions, the third operand is 0.
- **Widths.** The operands are sign-extended to 16 bits and the sums are taken
  modulo 2^16. The products are exact, because `|43 x| <= 5504` for 8-bit
  inputs. With wider inputs they stay exact as long as `|43 x| < 2^15`,
  i.e. up to `DATA_W = 10`.

The path to `p43` goes through three adders in series (7x, then 29x, then
43x). The multiplier is combinational.

## The filter (`gb_fir`)

In the transposed form, each input sample feeds the MCM block. The product
for the later tap (`43x`) is stored in a tap register `z1`. The output is the
earlier tap's product (`29x`) plus `z1`, added in a fourth `mcsa`.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | synchronous, active low; clears `z1`, `y_out`, `out_valid` |
| `in_valid` | in | 1 | `x_in` holds a sample this cycle |
| `x_in` | in | 8 | two's complement sample |
| `out_valid` | out | 1 | high for one cycle, the cycle after each accepted sample |
| `y_out` | out | 16 | `29 x[n] + 43 x[n-1]`, held until the next sample |

- **Timing.** A sample accepted on one clock edge produces its output at that
  same edge, so latency is one register stage and the filter accepts one
  sample per cycle.
- **Idle cycles.** Cycles with `in_valid` low leave the filter state untouched.
  The filter therefore advances per sample, not per clock.
- **Range.** The output range is `|y| <= 72 * 128 = 9216`, so it never
  overflows.

## How closely this follows the source description

These parts are specified by the description and built as given:

- the grouping of the 16-bit adder's final stage and its carry-selecting
  multiplexers;
- sharing 7x between 29x and 43x;
- using the MCSA for every addition;
- using an MCM block inside a transposed-form FIR filter.

These are this design's own choices:

- **Three operands.** The description does not say how many operands the
  adder takes. An 18-bit result from 16-bit inputs implies three.
- **The carry-in-1 result.** The description only says that each group is
  evaluated for a carry-in of 0 and that a multiplexer picks the final
  result. Forming the carry-in-1 result with an incrementer is this design's
  choice.
- **Group widths.** The description's sizing sentence (groups of `log2 n`
  bits) and its explicit 16-bit group list (3 sum bits per group) disagree.
  The RTL follows the explicit list, and reads the sentence as counting the
  carry.
- **The exact graph edges.** The description names only the shared 7x and
  the use of subtraction. `29x = 4*7x + x` and `43x = 29x + 2*7x` is one
  three-operation graph consistent with that.
- **Filter details.** These are not specified and were chosen here: two taps
  with the coefficients 29 and 43, 8-bit inputs, the valid handshake, the
  reset, and the one-cycle latency.

These parts are not built:

- **Digit-serial version.** The description mentions a digit-serial version
  of the MCM architecture but gives no details of one; everything here is
  bit-parallel.
- **Reference figures.** The published delay figures (about 12.0 ns with
  plain adders against 6.2 ns with MCSAs, on an FPGA) and power figures are
  implementation results that this RTL does not reproduce or check.

## Files

| file | contents |
|------|----------|
| `rtl/mcsa_pkg.sv` | default widths, the constants 29/43/7, group-sizing functions |
| `rtl/mcsa_group.sv` | one carry-selected group: carry-0 ripple, incrementer, multiplexer |
| `rtl/mcsa.sv` | the modified carry save adder |
| `rtl/gb_mcm.sv` | the 7x / 29x / 43x shift-add graph |
| `rtl/gb_fir.sv` | top level: two-tap transposed FIR filter |
| `tb/tb_mcsa.sv` | adder test at N = 16, 32, 64 |
| `tb/tb_gb_mcm.sv` | multiplier test |
| `tb/tb_gb_fir.sv` | end-to-end filter test at default parameters |

## Simulating

Each testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_gb_fir rtl/mcsa_pkg.sv tb/tb_gb_fir.sv
./obj_dir/Vtb_gb_fir
```

Replace `tb_gb_fir` with `tb_mcsa` or `tb_gb_mcm` to run the others. Each
runs in well under a second.

- **`tb_mcsa`** compares the 16-, 32- and 64-bit adders with integer
  addition on corner values and random words. At 16 bits it also checks
  every group carry against a reference. It fails if any group multiplexer
  never picked both of its inputs.
- **`tb_gb_mcm`** checks all 256 8-bit inputs and random 10-bit inputs. It
  fails if any of the three adders never used a carry-in-1 path.
- **`tb_gb_fir`** does the following:
  - runs every input value, back to back and with idle gaps;
  - resets in mid-stream;
  - runs 4000 random samples with random idle cycles;
  - checks every output value and the one-cycle `out_valid` timing;
  - counts idle cycles, resets, and carry-in-1 selections in the 7x
    subtractor and the tap adder, and fails if any of these never occurred.

## Changing the design

- **Adder width.** Set `N` on `mcsa`, and the group widths follow
  automatically. For `gb_mcm` and `gb_fir`, `N` must stay large enough for
  the products, that is `|43 x| < 2^(N-1)` and `|72 x| < 2^(N-1)`
  respectively.
- **Other constants.** These need a new shift-add graph in `gb_mcm`. Its
  structure is written out by hand, not generated from the constants in
  `mcsa_pkg`, which only the testbenches use as reference values.
