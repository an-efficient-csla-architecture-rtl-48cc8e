# Latch-based carry select adder

A carry select adder (CSLA) cuts a word into groups and computes each group's
sum twice, once for an incoming carry of 0 and once for 1. When the real carry
arrives from the group below, a multiplexer only has to pick one of the two
results. That is fast, but it needs two ripple carry adders per group.

This design keeps the speed idea but uses **one** adder per group and the two
phases of the clock. The clock is wired into the group's carry input:

* **clock high**: the group adder computes `a + b + 1`, and a bank of D latches,
  enabled by the same clock, follows that result;
* **clock low**: the latches close and hold `a + b + 1`, and the adder, whose
  carry input is now 0, computes `a + b + 0`.

During the low phase both candidate results exist at once. One is stored in the
latches and the other is live at the adder output. The carry from the group
below picks between them. The second ripple carry adder of a classic CSLA
becomes a set of latches.

## The group (`latch_group`)

```
          a[W-1:0] b[W-1:0]
               |    |
   clk ---> [ W-bit RCA, carry in = clk ] --{co_live, s_live}--+-----------------+
                                                                |                 |
   clk ---> [ W+1 D latches, enable = clk ] <-------------------+                 |
                       | held = {co, s} of a+b+1                                  |
                       v                                                          v
              [ 2(W+1):(W+1) mux ]  in1 = held, in0 = live  <--- c_sel (carry from below)
                       |
                  {co, s}
```

* `rca` is a chain of `full_adder` cells. Its lowest carry input is `clk`.
* `d_latch` is a level-sensitive latch: transparent while `e` is high, holding
  while `e` is low, with a complementary output `q_n`, which the adder does not use.
* `sel_mux` is a row of 2:1 multiplexers. With `sel = 1` it passes the latched
  carry-one result. With `sel = 0` it passes the live carry-zero result.

For a 2-bit group (bits 3:2) this is two full adders, three latches (two sum
bits and the carry) and a 6:3 multiplexer selected by `c1`.

## Timing contract

This is the part to understand before using the adder:

1. Apply `a`, `b` and `cin` at (or before) a rising clock edge.
2. Hold them **until the end of that clock cycle**. The latches capture the
   carry-one result from the operands present while the clock is high. If the
   operands changed in the low phase, the latched half would belong to the old
   operands and the live half to the new ones.
3. Read `sum` and `cout` late in the **low phase** of the same cycle.

The adder accepts one operand pair per clock cycle. During the high phase the
outputs are not the sum: a group whose select carry is 0 then shows
`a + b + 1`. Nothing in the RTL marks the output as valid. The user's logic
has to sample it in the low phase, for example on the next rising edge, given
enough low-phase time.

In silicon, the low phase has to be long enough for the whole select chain to
settle: the lowest 2-bit adder, then one mux per group. In a chained wide adder
(below) the carry also has to ripple through every 16-bit stage. The latches
also need their hold time respected at the falling edge. The adder output
starts to change as soon as its carry input falls, so that change must not
reach the latch before the latch has closed. This RTL has no delays and
assumes both conditions hold. It does not model them.

## The 16-bit adder (`csla16`)

The word is cut into groups of 2, 2, 3, 4 and 5 bits:

| group | bits  | built as                 | mux   | selected by |
|-------|-------|--------------------------|-------|-------------|
| 1     | 1:0   | plain 2-bit RCA, `cin`   | –     | –           |
| 2     | 3:2   | `latch_group`, W = 2     | 6:3   | c1          |
| 3     | 6:4   | `latch_group`, W = 3     | 8:4   | c3          |
| 4     | 10:7  | `latch_group`, W = 4     | 10:5  | c6          |
| 5     | 15:11 | `latch_group`, W = 5     | 12:6  | c10         |

The carry out of group 5 is `cout`. The widths live in `csla_pkg`
(`GROUP_W`, `group_lsb()`), which the adder's generate loop and the
testbenches share.

## Other word sizes (`csla8`, `csla_top`)

* **8 bits** (`csla8`): groups 1-3 as above (bits 6:0), then a single full
  adder for bit 7 whose carry input is `c6`.
* **32 and 64 bits**: 16-bit adders are chained. The carry out of one stage
  drives the carry in of the next, so a 32-bit adder is two 16-bit adders and
  a 64-bit adder is two 32-bit adders. All stages share the clock.

`csla_top` is the top level. It has one parameter, `WIDTH`, with a default
of 16:

| `WIDTH`       | built                                      |
|---------------|--------------------------------------------|
| 8             | `csla8`                                    |
| 16 (default)  | one `csla16`                               |
| 16·k          | k `csla16` stages, carry chained           |

Any other value stops elaboration with an error.

Ports (all widths): `clk`, `a[WIDTH-1:0]`, `b[WIDTH-1:0]`, `cin`,
`sum[WIDTH-1:0]`, `cout`. In every configuration,
`{cout, sum} = a + b + cin`.

## Files

| file | contents |
|------|----------|
| `rtl/csla_pkg.sv` | group widths and the bit-offset function |
| `rtl/full_adder.sv` | one-bit full adder |
| `rtl/rca.sv` | W-bit ripple carry adder |
| `rtl/d_latch.sv` | W-bit D latch with enable and complementary output |
| `rtl/sel_mux.sv` | 2N:N select mux from 2:1 muxes |
| `rtl/latch_group.sv` | one carry select group (RCA + latches + mux) |
| `rtl/csla16.sv` | 16-bit adder |
| `rtl/csla8.sv` | 8-bit adder |
| `rtl/csla_top.sv` | top level, `WIDTH` = 8 or a multiple of 16 |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `csla_top_full_tb` |

## Simulating

Each testbench drives the clock itself: it sets the operands, holds the clock
high for 5 time units and low for 5, and compares `{cout, sum}` with the
integer sum just before the next rising edge. Each prints
`TB_RESULT checks=N failures=M` and stops. A watchdog ends a run that hangs.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/csla_pkg.sv tb/csla_top_tb.sv --top-module csla_top_tb -o sim
./obj_dir/sim
```

Swap in any other `tb/<name>_tb.sv` the same way. What they cover:

* `full_adder_tb`, `rca_tb`, `sel_mux_tb`: exhaustive or near-exhaustive
  truth-table checks.
* `d_latch_tb`: the latch's transparent / hold / transparent sequence, on one
  bit and on random 4-bit words.
* `latch_group_tb`: every operand pair for 2- and 5-bit groups, with both
  select values. It also checks that in the high phase the group shows
  `a + b + 1`. Then it changes the operands in the low phase and checks that
  the latched result is held while the live result follows the new operands.
* `csla16_tb`: corner cases at every group boundary and 100,000 random
  additions. It counts, per group, how often the latched path and the live
  path were selected. Both must occur.
* `csla8_tb`: all 2^17 operand and carry combinations.
* `csla_top_tb`: 8-, 16-, 32- and 64-bit instances side by side with 50,000
  random additions. It counts the latched path, the live path, carries between
  16-bit stages and carry out. Each must occur.
* `csla_top_full_tb`: the default 16-bit top with no parameter overrides, over
  about 240,000 additions.

Every testbench also checks that N additions take N clock cycles.

## How far to trust it, and where it departs

* The logic function is verified: for every configuration the outputs equal
  `a + b + cin` in the low phase, exhaustively up to 8 bits and by random
  testing above that. Synthesis gives 18 latch bits for the 16-bit adder
  (3 + 4 + 5 + 6) and no flip-flops.
* The latch is written as a behavioural `always_latch`, not as a gate
  netlist. The full adder uses the standard sum/majority equations, since
  only its role is defined, not its gates.
* Timing is not modelled (see the timing contract). The zero-delay simulation
  cannot show a hold violation at the falling edge or a low phase that is too
  short. Static timing analysis on a real implementation must cover both.
* The delay, gate count and power figures quoted for this scheme come from an
  FPGA implementation. This RTL does not reproduce them, and a zero-delay
  simulation cannot confirm them.
* Choices of this implementation:
  * the operand hold rule above;
  * chaining 16-bit stages by their carries for wider words;
  * an explicit error for unsupported `WIDTH` values;
  * a width parameter on the latch and the mux, so that one instance serves a
    whole group.
* Not included: the classic two-adder CSLA and the variant that replaces the
  second adder with a binary-to-excess-1 converter. Those are the reference
  designs this scheme is compared against, not part of it.
