# Pipelined radix-4 Booth MAC with a hybrid carry-lookahead / carry-select adder

This is a 16 x 16-bit signed multiply-accumulate unit with a 32-bit result.
It is built to spend little power and area. It does this in three ways:

- **Radix-4 (modified) Booth recoding** halves the number of partial products
  from 16 to 8.
- **Spurious-power suppression (SPST).** When the multiplier is small enough
  that its upper Booth digits are all zero, a latch freezes the inputs of the
  upper partial-product multiplexers so they do not switch.
- **Conditional gating of the pipeline.** A register only loads when a real
  operation reaches it. A product with a zero operand skips the datapath
  altogether.

The multiplier's final carry-propagate addition and the accumulate addition
both use a **hybrid adder**. It is a 28-bit carry-lookahead adder for the low
bits and a 4-bit carry-select adder for the top bits. The carry-lookahead
carry-out picks one of the two precomputed top-bit sums.

```
 a[15:0] ──► pp_generator ─┬──────────────► pp_select (digits 0-3) ─┐
                           └─► pp_latch ──► pp_select (digits 4-7) ─┤ 8 rows
 b[15:0] ──► spst_detect ──► booth_encoder ─ digits, N1/N2 (freeze) ┘
                                                                    │  stage 1 reg
                 ppr_tree: 8 ─► 6 ─► 4 rows  (3:2 carry-save rows)  │  stage 2 reg
                           4 ─► 3 ─► 2 rows (sum, carry)            │  stage 3 reg
                 hybrid_adder (CLA 28 + carry-select 4) ──► c       │  stage 4 reg
 acc_in ──────► hybrid_adder ──► accumulator ──► acc_out
                 conditional_gating: load enables for stages 1-4
```

## Booth recoding and partial products

The multiplier `b` is read as eight overlapping bit triples
`{b[2k+1], b[2k], b[2k-1]}`, with an implicit 0 below bit 0. Each triple
becomes one digit:

| triple      | digit |
|-------------|-------|
| 000, 111    | 0     |
| 001, 010    | +1    |
| 011         | +2    |
| 100         | -2    |
| 101, 110    | -1    |

The sum of `digit_k * 4^k` equals the signed value of `b`. A digit is carried as
`booth_digit_t {neg, two, one}` (see `mac_pkg`).

`pp_generator` forms the four multiples +A, +2A, -A and -2A of the
multiplicand once. Each is 18 bits wide, because -2 x (-32768) needs 18 bits.
`pp_select` holds eight multiplexers. Each one picks the multiple `v` for its
digit. The row is then placed at weight 4^k.

Rows are not sign-extended to 32 bits. Each row keeps only the inverted
sign bit `~s` and a few constant bits, the usual sign-extension-prevention
pattern of a Booth matrix:

```
row 0:      ~s  s  s  v[16:0]
row k > 0:   1 ~s     v[16:0]
```

The constant 1s add up to exactly the sign-extension terms of all rows. The
leading 1 of the top row falls above bit 31 and is dropped. So the plain sum
of the eight rows, taken modulo 2^32, is the product. A single row is not a
weighted partial product on its own. A zero digit still gives the row's
constant bits.

## Suppressing redundant upper partial products

Digits 4 to 7 depend only on bits 7 to 15 of `b`. If those nine bits are all
0, `b` lies in [0, 127]. If they are all 1, `b` lies in [-128, -1]. In both
cases digits 4 to 7 are zero.

- `spst_detect` flags the two cases.
- `booth_encoder` passes the flags on as `N1` (all zero) and `N2` (all one).
  While either flag is set, it forces digits 4 to 7 to zero.
- `pp_latch` is a level-sensitive latch that is transparent while `N1|N2` is
  low. It feeds the multiples to the upper four multiplexers. While the
  multiplier is small, a new multiplicand therefore does not reach those
  multiplexers, and their outputs stay at zero.

The held value is never used, because the digits that would select it are
zero. This is the only latch in the design. Synthesis reports 72 latch bits
for it, and that is intended.

## Pipeline, timing and conditional gating

| rising edge (1 = the edge that samples `a`, `b`) | register loaded |
|---------------------|---------------------------------------------------|
| 1                   | 8 partial-product rows (`modified_booth.rows_q`)  |
| 2                   | 4 rows after two carry-save levels (`ppr_tree`)   |
| 3                   | sum and carry rows (`ppr_tree`)                   |
| 4                   | product `c` (hybrid adder of sum + carry)         |
| 5                   | `acc_out` (hybrid adder of `c` + `acc_in`)        |

The unit accepts one operation per clock. `conditional_gating` sends a valid
bit and a zero-product bit down the pipeline with every operation. Stage *k*
loads only if the operation arriving there is valid and does not have a zero
operand. So a bubble (`enable` low) changes no register. For a zero-operand
operation, none of the partial-product, reduction or adder registers is
loaded. When that operation reaches stage 4, the product register is cleared
instead, and `c_skipped` marks the result. Every register has a synchronous,
active-high reset to zero.

## The hybrid adder

`hybrid_adder #(WIDTH=32, CSEL_W=4)` has three parts:

- `carry_lookahead_adder` adds bits 27:0. Inside each 4-bit group, every
  carry is a two-level function of the group's generate/propagate signals and
  the group carry-in. Groups pass on their carry through the group
  generate/propagate signals.
- `carry_select_adder` adds bits 31:28 twice, once for carry-in 0 (`s0`,
  `c0`) and once for carry-in 1 (`s1`, `c1`).
- Two multiplexers, driven by the carry-lookahead carry-out, pick the top
  nibble and the carry-out.

The sum wraps modulo 2^32, and `cout` gives the carry out of bit 31. The same
module with `WIDTH=16, CSEL_W=2` is a 16-bit adder split 2 + 14. It is tested
too.

## Accumulating

`acc_out <= c + acc_in` on the edge after each new product. `acc_in` is a
port:

- **Running MAC.** Tie `acc_in` to `acc_out` (outside the module) to get
  `acc <= acc + a*b`. This is the classic running sum. The loop goes through
  the accumulator register, so it is not combinational.
- **Product plus any value.** Drive `acc_in` from elsewhere to add the
  product to any 32-bit value.

`acc_in` is sampled on the edge that loads `acc_out`: the 5th edge, counting
the one that samples `a` and `b` as the 1st. Accumulator overflow wraps modulo 2^32, with no saturation and no
flag. `reset` is the only way to clear the accumulator.

## Top-level interface: `modified_booth_mac`

| port       | dir | width | meaning                                                  |
|------------|-----|-------|----------------------------------------------------------|
| clk        | in  | 1     | rising-edge clock                                        |
| reset      | in  | 1     | synchronous, active high, clears every register          |
| enable     | in  | 1     | `a`, `b` are sampled on this edge                        |
| a, b       | in  | 16    | multiplicand and multiplier, two's complement            |
| acc_in     | in  | 32    | value added to the product                               |
| c          | out | 32    | product, loaded by the 4th edge (the sampling edge is the 1st) |
| c_valid    | out | 1     | `c` is new this cycle                                    |
| c_skipped  | out | 1     | that product had a zero operand and bypassed the datapath |
| acc_out    | out | 32    | `c + acc_in`, one edge after `c`                         |
| acc_valid  | out | 1     | `acc_out` is new this cycle                              |

The sizes come from `mac_pkg` (`A_W`, `B_W`, `P_W`, `CSEL_W`). The
carry-save tree in `ppr_tree` is written for 8 partial products, so it is
fixed at a 16-bit multiplier.

## How this RTL relates to the original description

The following come from the original description:

- the block structure and the radix-4 recoding table
- SPST detection with a latch on the upper multiplexer inputs
- carry-save reduction to a sum and a carry row, followed by the hybrid final
  adder
- the 4 + 28 split of the hybrid adder, with the carry-lookahead carry-out
  selecting the carry-select sum
- the multiplier, hybrid adder and accumulator chain
- the names `a`, `b`, `acc_in`, `c`, `acc_out`, `enable`, `reset`

The following are choices made for this RTL. The description leaves them
open:

- the number of pipeline stages and their contents
- the valid outputs and all latencies
- the exact SPST test and the meaning given to N1/N2
- the two gating conditions (bubble, zero operand)
- synchronous reset
- accumulation through the external `acc_in` port. This port is what lets
  the unit both add a product to any value and, with the port tied to
  `acc_out`, keep a running sum.

There are also some known differences from the original:

- **The printed product ABCD x 6789.** The original waveforms print
  `DDF2042C` for this product. That is 0x6789 less than the correct
  two's-complement result, `DDF26BB5`. This RTL produces the correct product.
  The other printed products (0004 x 0003, FFFC x 0003, 1234 x 5678) agree
  with it.
- **Which end of the hybrid adder gets the carry-select part.** The
  description puts the carry-select adder on the top 4 bits, selected by the
  carry-lookahead carry-out, and this RTL does that. The reference
  waveforms' internal signals instead show the 4-bit part on the low nibble,
  feeding the carry-lookahead carry-in. The sum `Y` is the same either way.
- **The signal `rangea[3:0]`.** The reference multiplier model has a signal
  `rangea[3:0]` whose purpose is not explained. It is not reproduced here.
- **Area and power.** The area and power figures reported for the original
  standard-cell implementation cannot be reproduced with this RTL alone.

## Verification

Every module has a self-checking testbench in `tb/` named `tb_<module>`. Each
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

- `tb_modified_booth_mac` exercises the whole unit at its real sizes in three
  phases:
  - the reference operations
  - 20,000 open-loop operations, each with a random `acc_in`, with bubbles,
    zero operands and a reset in mid-stream
  - 20,000 closed-loop operations whose final accumulator must equal the sum
    of all the products

  It checks that `c` arrives on the 4th edge and `acc_out` on the 5th. It also requires each mechanism to
  occur at least once: the N1 freeze, the N2 freeze, zero gating, bubbles,
  the carry-select top sum being chosen, accumulator wrap-around and the
  closed loop.
- `tb_modified_booth` streams the reference products and 20,000 random ones
  through the multiplier, checking value, latency and the gating flag.
- The encoder, detector and generator testbenches are exhaustive over all
  65,536 inputs.
- The adder testbenches cover carry chains and random operands. They test the
  32-bit (4 + 28) and 16-bit (2 + 14) hybrid adders, and the CLA at a width
  that is not a multiple of 4.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/mac_pkg.sv tb/tb_modified_booth_mac.sv --top-module tb_modified_booth_mac
./obj_dir/Vtb_modified_booth_mac
```

Replace the testbench name to run any other test. The full MAC test finishes
in a few seconds.

## Files

| file                          | contents                                          |
|-------------------------------|---------------------------------------------------|
| `rtl/mac_pkg.sv`              | widths, `booth_digit_t`, `pp_mult_t`, recoding function |
| `rtl/modified_booth_mac.sv`   | top: multiplier, accumulate adder, accumulator    |
| `rtl/modified_booth.sv`       | pipelined Booth multiplier                        |
| `rtl/spst_detect.sv`          | detection of redundant upper digits               |
| `rtl/booth_encoder.sv`        | radix-4 recoding, N1/N2                           |
| `rtl/pp_generator.sv`         | +A, +2A, -A, -2A                                  |
| `rtl/pp_latch.sv`             | freeze latch for the upper multiplexers           |
| `rtl/pp_select.sv`            | partial-product multiplexers                      |
| `rtl/ppr_tree.sv`, `rtl/csa_row.sv` | pipelined carry-save reduction              |
| `rtl/conditional_gating.sv`   | stage load enables, zero-operand bypass           |
| `rtl/hybrid_adder.sv`         | CLA + carry-select adder                          |
| `rtl/carry_lookahead_adder.sv`, `rtl/carry_select_adder.sv` | its two parts |
| `rtl/accumulator.sv`          | accumulator register                              |
