# Carry-save extended-GCD accelerator

This RTL computes the extended greatest common divisor of two large unsigned
integers. Given `a` and `b` it returns `g` and the Bezout coefficients
`ca`, `cb` such that

    ca * a + cb * b = g,   |g| = gcd(a, b)

Modular inversion is the main use: with `b` an odd modulus and `gcd = 1`,
`ca` is the inverse of `a` up to sign. The design runs one iteration of a
subtraction-based binary GCD per clock. Every variable is kept in
**carry-save form**: a pair of vectors whose sum is the value. No carry
ever runs across the 255- or 512-bit word during the iterations, so the
cycle time does not depend on the operand width. The chip this RTL models
runs at 3.25 GHz in a 12 nm process. It has two units: one for 255-bit and
one for 512-bit operands.

Running the RTL with the default sizes gives these average times at
3.25 GHz, on random full-length inputs:

| workload | average cycles | at 3.25 GHz | published chip |
|---|---|---|---|
| 512-bit XGCD, 512-bit unit | 573.5 | 176.5 ns | 176 ns |
| 255-bit XGCD, 512-bit unit | 290.1 | 89.3 ns | 87 ns |
| 255-bit XGCD, 255-bit unit | 365.5 | 112.5 ns | 119 ns |
| 512-bit, constant time | 779 | 239.7 ns | 239 ns |
| 255-bit, constant time, 255-bit unit | 522 | 160.6 ns | 119 ns (see *Departures*) |

## The iteration

Pre-processing first makes both inputs odd. An even input is replaced by
`a + b`, so at least one input must be odd. It then sets

    a = a0, u = 1, m = 0          so that  u*a0 + m*b0 = a
    b = b0, y = 0, n = 1          so that  y*a0 + n*b0 = b

Each cycle exactly one side changes: either `(a, u, m)` or `(b, y, n)`. The
rules, checked in this order:

| condition | side updated | new operand | delta change |
|---|---|---|---|
| a divisible by 8 / 4 / 2 | a | a >> 3 / 2 / 1 | -3 / -2 / -1 |
| b divisible by 8 / 4 / 2 | b | b >> 3 / 2 / 1 | +3 / +2 / +1 |
| both odd, delta >= 0 | a | (a + b)/4 or (a - b)/4, whichever is divisible by 4 | -1 |
| both odd, delta < 0 | b | (b + a)/4 or (b - a)/4 | +1 |

The 255-bit unit (`MAX_SHIFT = 1`) never divides by 4 or 8 in the first
two rows; it only halves.

The coefficients must follow their operand. Shifting `a` right by `s` needs
`u*a0 + m*b0` to stay equal to `a`, so the coefficients are divided too,
after adding a multiple of the other constant that makes them divisible:

    u' = (u + k*b0) / 2^s,   m' = (m - k*a0) / 2^s,   k = -u * b0^-1 mod 2^s

`k` is at most 7. The pre-processing therefore tabulates `j*a0` and `j*b0`
for `j = 0..7`. Since `b0` is odd, `b0^-1 = b0 (mod 8)`, so `k` depends only
on the three low bits of `u` and `b0`. The sum and difference updates work
the same way, with `u + y` or `u - y` in place of `u`. Once `u'` is exact,
`m'` is exact too, because the identity forces it.

The loop ends when `a` or `b` is zero. Post-processing then adds instead of
selecting: `g = a + b`, `ca = u + y`, `cb = m + n`. If an input was
replaced by `a + b`, the coefficients are mapped back to the original
inputs.

### Choosing without comparing: delta

When both operands are odd, the larger one should be reduced. Comparing two
carry-save numbers needs a full carry propagation, so the design does not
compare them. It keeps `delta`, a cheap estimate of `log2|a| - log2|b|`.
Each update moves `delta` by the number of bits the update is *guaranteed*
to remove. `delta` starts at 0, even when the inputs differ in length.
`delta` needs a 10-bit adder (`xgcd_delta`).

The estimate is often wrong. The end-to-end test counts hundreds of such
cases per run. The algorithm stays correct, because every update preserves
the GCD and the two identities. There are two visible effects:

- operands and coefficients go negative, so all arithmetic is two's
  complement;
- the final `g` may come out negated, with both coefficients negated too.
  `ca*a + cb*b = g` still holds.

The design does not fix the sign of `g`.

## Shifting in carry-save form (`cs_shift`)

This is the subtle part of the datapath. Let `(c, s)` be a carry-save pair
whose value `v = c + s (mod 2^W)` is divisible by `2^k`. Shifting `c` and `s`
separately goes wrong in two places.

**Low end.** The dropped low bits of `c` and `s` add up to either 0 or
`2^k`. In the second case a carry is lost. For example, `c = 3, s = 3`
(value 6) shifted by one gives `1 + 1 = 2` instead of 3. Because `v` is a
multiple of `2^k`, one gate detects the lost carry:

- `k = 1`: the lost carry is `c[0] & s[0]`;
- `k = 2`: the only possible low-bit pairs are (00,00), (01,11), (11,01) and
  (10,10), so the lost carry is `c[1] | s[1]`;
- `k = 3`: the lost carry is `c[2] | s[2]`.

A row of half adders over the shifted vectors frees the carry vector's LSB,
and the lost carry goes into that slot. The row is one gate deep at any
width.

**High end.** The two shifted vectors are shifted logically. Their plain sum
overshoots the sign-extended result by 0, 1 or 2 times `2^(W-k)`. Provided
`|v| < 2^(W-3)`, the overshoot follows from the top two bits of each
shifted vector alone:

| sum of the two top-2-bit fields | overshoot |
|---|---|
| 0 or 1 | 0 |
| 2 to 4 | 1 |
| 6 | 2 |

The overshoot is subtracted in the top `k` bits of the carry vector,
without a carry chain. The datapath width `W = N + 8` keeps every
intermediate value inside this range.

## The update units and late select (`xgcd_update`)

Six units of one design hold `a, b, u, m, y, n`. Each cycle, every unit
computes all the values its variable could take next:

- hold;
- 2 shift-by-1, 4 shift-by-2 and 8 shift-by-3 options, one per `k`;
- 4 sum options and 4 difference options.

That is up to 23 candidates, built from 3:2 carry-save rows and `cs_shift`.
A subtraction uses the complemented vectors. Its +1 terms go into the free
LSBs of the carry vectors.

A registered control word picks one candidate *after* all of them are
computed (late select). Two 4:1 multiplexers on `k` choose among the sum
options and among the difference options. Their outputs join the other 15
options in a 17:1 AND-OR multiplexer. `a` and `b` add no multiple, so only
their `k = 0` candidates are built.

The sum options are the same on both sides of a pair: `(a + b)/4` equals
`(b + a)/4`. `u` and `y` see the same `k`, because the control word is
common, and so do `m` and `n`. So the `a`, `u` and `m` units build the sum
options and export the one that `k` selects. The `b`, `y` and `n` units,
built with `ADD_SHARED = 1`, take it instead of building their own. The
difference options are not shared: once the multiple is added, `b - a` and
`a - b` no longer give values that are simple negations of each other.

## Control one cycle ahead (`xgcd_lsb_ctrl`)

The decision for the next cycle depends only on:

- the three low bits of the next `a, b, u, y`;
- the low bits of `b0`;
- the sign of the next `delta`.

`xgcd_lsb_ctrl` computes these low bits in a small separate datapath, during
the current cycle and in parallel with the wide one. It uses six-bit
residues, because `(x + p + k*M) >> 3` needs bits 5:0 to give bits 2:0.

The block does not wait for the current control word before it decodes.
For each of the 17 late-select positions, and for each side, it computes
the residues that position would produce. It then decodes a candidate
control word from them (`xgcd_pkg::decode_ctrl`). That gives 34 small
decoders. The current control word then picks one candidate through the
same kind of one-hot AND-OR select as the wide datapath, and the result is
registered. The path from the control register to the next control word
is therefore only a multiplexer. The wide multiplexers see a settled select
at the start of every cycle. The 255-bit unit does not build the shift-by-2
and shift-by-3 positions.

## One unit (`xgcd_unit`) and its modes

Latency from `start_i` to `done_o` is `R + 10` clocks:

- 4 clocks of pre-processing (`xgcd_preproc`: `a0`, `b0`, then `3x`, then
  `5x` and `7x`, then the output register);
- 1 clock to load;
- R reduction clocks;
- 1 hand-over clock;
- 4 clocks of post-processing (`xgcd_postproc`: carry-save trees,
  carry-propagate adders, change of basis, output register).

The end test is a carry-free zero test on each pair (`cs_zero_detect`).
`c + s = 0` exactly when `c ^ s == (c | s) << 1`. Once it fires, all
registers hold.

| `mode_i` | behaviour |
|---|---|
| `MODE_FAST` | stops when `a` or `b` is zero. `cycles_o` = R |
| `MODE_CONST` | always runs `CT_CYCLES` reduction clocks, whatever the data. `ct_overrun_o` flags a budget that was too small |
| `MODE_DEBUG` | halts after `dbg_cycles_i` reduction clocks. `dbg_sel_i` selects a variable, and its carry and sum vectors, the control word and `delta` can be read. A new `start_i` resumes for another `dbg_cycles_i` clocks |

## The chip (`xgcd_chip`) and its register map

`xgcd_chip` holds a 255-bit unit (`MAX_SHIFT = 1`) and a 512-bit unit
(`MAX_SHIFT = 3`). Each unit has its own register block (`xgcd_regs`) on a
shared 32-bit bus:

- hold `req_i`, `we_i`, `addr_i` and `wdata_i` until `ack_o` pulses;
- read data comes with `ack_o`;
- `addr_i[12]` selects the unit: 0 is the 255-bit unit, 1 the 512-bit unit.

The register side works at a quarter of the core clock. A request is served
only every fourth core cycle, and debug stops are programmed in units of
four cycles.

| word address | name | access | content |
|---|---|---|---|
| 0x000 | CTRL | W | bit 0 start/resume, bits 2:1 mode (0 fast, 1 constant time, 2 debug) |
| 0x001 | STATUS | R | bit 0 busy, 1 done, 2 halted, 3 constant-time overrun |
| 0x002 | DBG_QUADS | RW | debug interval / 4 |
| 0x003 | CYCLES | R | reduction cycles of the last run |
| 0x004 | DBG_SEL | RW | 0 a, 1 b, 2 u, 3 m, 4 y, 5 n |
| 0x005 | DBG_CTRL | R | bits 6:0 control word (`{side_b, op[2:0], k[2:0]}`), bits 25:16 delta |
| 0x100+i / 0x200+i | A / B | RW | operand words, least significant first |
| 0x300+i / 0x400+i / 0x500+i | G / CA / CB | R | results, `N+8`-bit two's complement |
| 0x600+i / 0x700+i | DC / DS | R | carry / sum vector of the selected variable |

The core clock and the control processor are outside this RTL. `clk` and
the bus are the top's ports.

## Departures and limits

- **Constant-time budget of the 255-bit unit.** From the published 119 ns,
  the budget would be 379 reduction cycles. This design's iteration needs up
  to 388 cycles on random full-length 255-bit inputs. When the two inputs
  differ greatly in length it needs up to 510 cycles. The chip therefore
  uses `CT_CYCLES_255 = 512` (160.6 ns). Set it back to 379 if the inputs
  are known to fit. `ct_overrun_o` (STATUS bit 3) reports a run that did
  not fit.
- The 512-bit budget of 769 cycles comes from the published 239 ns. It sits
  well above the largest count measured, 595 cycles.
- Both counts are measured, not proven bounds.
- **Inputs.** At least one input must be odd.
- **Output sign.** The sign of `g` is not normalised.
- **Shared update logic.** The published chip computes updates that are
  equal, or differ only in sign, in one unit and shares them, which saves
  area. Here only the sum options are shared (see the update units
  above). Every unit builds its own difference options, so the area is
  larger than it could be. The function is the same.
- **Design choices not taken from the published chip.** The MSB rule of
  `cs_shift`, the full half-adder row, the zero test, the change of basis,
  the width `W = N + 8`, the stage scheduling inside the 4-cycle pre- and
  post-processing, the bus, the address map, debug resume and reset
  behaviour are this design's own.
- **Physical design.** Cell choices (low threshold voltage, upsized cells
  on the control path), the adjustable clock generator and everything else
  physical are not modelled.

## Files and simulation

`rtl/`:

| file | content |
|---|---|
| `xgcd_pkg.sv` | types and the control law |
| `cs_shift.sv` | carry-save shift |
| `cs_zero_detect.sv` | carry-free zero test |
| `xgcd_update.sv` | update unit with late select |
| `xgcd_delta.sv` | delta register and adder |
| `xgcd_lsb_ctrl.sv` | early control path |
| `xgcd_preproc.sv` | pre-processing |
| `xgcd_postproc.sv` | post-processing |
| `xgcd_unit.sv` | one unit |
| `xgcd_regs.sv` | register interface |
| `xgcd_chip.sv` | top level |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`.
`xgcd_unit_checker.sv` is the driver for `tb_xgcd_unit`. Two further
testbenches:

- `tb_xgcd_chip` runs the whole chip end to end at default sizes, over the
  bus, in all modes, and counts each mechanism;
- `tb_xgcd_workloads` measures the average latencies in the table above.

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. Example:

    verilator --binary --timing -j 8 rtl/xgcd_pkg.sv rtl/*.sv \
        tb/tb_xgcd_chip.sv --top-module tb_xgcd_chip -o sim
    ./obj_dir/sim

For `tb_xgcd_unit`, add `tb/xgcd_unit_checker.sv`. The module-level
testbenches need only the files their module uses. The 512-bit tests take
a few seconds.
