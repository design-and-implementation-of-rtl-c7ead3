# Relaxed 16-point Haar wavelet transform

This is a small, multiplier-free hardware block that computes a four-level Haar
discrete wavelet transform (DWT) of 16 pixels at a time. It is meant as an
accelerator next to a processor in a wavelet image or video codec (the MJPEG2000 /
JPEG XR family). Software hands it one row or column of a 16x16 pixel block, and
it returns 16 coefficients:

- the mean of the block row,
- then the detail (difference) coefficients of each level, coarse to fine.

The transform is *relaxed*. A textbook orthonormal Haar transform scales every
level by 1/sqrt(2), and in hardware that needs a multiplier. Here each level is a
plain sum and difference. The whole result is scaled once at the end by 1/16,
which is a 4-bit right shift. Inputs and outputs are both 8 bits wide.

## Butterflies and how the lanes move

The only arithmetic element is a two-input, two-output butterfly (`haar_bpu`).
Its upper output is `a + b` and its lower output is `a - b`. One Haar level is a
row of butterflies over the samples taken in even/odd pairs. Each butterfly gives
one approximation value (the pair sum) and one detail value (the pair difference).
The next level works on the approximations only. The details are carried to the
output without change.

The four levels form a four-stage pipeline. Each stage keeps 16 lanes:

| stage | module | lanes in (width) | butterflies | lanes out (width) |
|---|---|---|---|---|
| one   | `haar_stage` W=8, N_BF=8   | 16 pixels (8, unsigned) | on lanes 0..15 | 0..7 sums, 8..15 level-1 details (9) |
| two   | `haar_stage` W=9, N_BF=4   | 16 (9) | on lanes 0..7 | 0..3 sums, 4..7 level-2 details, 8..15 passed (10) |
| three | `haar_stage` W=10, N_BF=2  | 16 (10) | on lanes 0..3 | 0..1 sums, 2..3 level-3 details, 4..15 passed (11) |
| four  | `haar_stage_four` W=11     | 16 (11) | on lanes 0..1 | 0 total sum, 1 level-4 detail, 2..15 passed (12, then divided by 16 to 8) |

In a stage with `N_BF` butterflies, butterfly `k` reads lanes `2k` and `2k+1`. It
writes the sum to lane `k` and the difference to lane `N_BF + k`. So each stage
packs its new approximations to the front, and its new details go right behind
them. With this one rule, the final lane order is the usual Haar coefficient
order, with no reordering network.

```
coef[0]      mean           (s0 + ... + s15) / 16                 unsigned 0..255
coef[1]      level 4        ((s0..s7) - (s8..s15)) / 16           signed
coef[2..3]   level 3        ((s8k..s8k+3) - (s8k+4..s8k+7)) / 16  signed
coef[4..7]   level 2        ((s4k, s4k+1) - (s4k+2, s4k+3)) / 16  signed
coef[8..15]  level 1        (s2k - s2k+1) / 16                    signed
```

Here `(a..b)` stands for the sum of those samples. The reference model in
`tb/haar_ref_pkg.sv` computes each coefficient straight from this table, with
no butterflies.

## Number format and bit growth

Every lane grows by one bit per stage: 8 → 9 → 10 → 11 → 12 bits. Nothing
overflows, because the two kinds of lane are read differently:

- **Approximation lanes** hold sums of pixels and are never negative. A butterfly
  only ever sees these lanes, so `haar_bpu` zero-extends both inputs. Its sum is
  unsigned and its difference is two's complement, each one bit wider than the
  inputs.
- **Detail lanes** are two's complement. When a stage passes one through, it
  sign-extends it by one bit.

At the end, the sum of 16 pixels is at most 4080, which fits 12 unsigned bits.
The largest detail is ±2040, which fits 12 signed bits. The divide by 16 keeps
bits 11..4 of each lane:

- For the mean, this is a logical shift, and the result is 0..255.
- For a detail, it is an arithmetic shift, which rounds toward minus infinity.
  The result is −128..127.

Both cases come down to the same bit selection, so `haar_stage_four` does no
further work. The output is truncated, not rounded to nearest. A consumer must
read `coef[0]` as unsigned and `coef[1..15]` as signed.

## Interface and timing (`hdwt_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `nrst` | in | 1 | asynchronous reset, active low; clears all pipeline registers |
| `in_valid` | in | 1 | `pix` holds a vector |
| `pix` | in | 16 × 8 | `pix[i]` = sample `s_i`, unsigned |
| `out_valid` | out | 1 | `coef` holds a result |
| `coef` | out | 16 × 8 | coefficients in the order above |

- There is one register bank per stage, so a result appears 4 clocks after its input.
- A new vector can enter on every clock, and there is no stall.
- `in_valid` travels down the pipe beside the data and comes out as `out_valid`.
  The datapath registers load on every clock, whatever `in_valid` is.
- A full 16x16 block takes 16 row vectors, or 16 + 16 when the pixel columns
  are transformed as well. That is 35 clocks from the first input to the last
  result.

The shared constants (16 lanes, 8-bit pixels, shift of 4) and the stage types
are in `rtl/haar_pkg.sv`.

## Files

- `rtl/haar_pkg.sv`: sizes and lane types.
- `rtl/haar_bpu.sv`: the butterfly (combinational).
- `rtl/haar_stage.sv`: one registered stage with a given width and butterfly
  count, used for stages one to three.
- `rtl/haar_stage_four.sv`: the last butterfly and the divide by 16, registered.
- `rtl/hdwt_top.sv`: the four stages in a chain.

## Where the design follows its source, and where it chooses

These parts are taken from the published design:

- the add/subtract butterfly as the only processing element;
- the even/odd pairing of the 16 inputs;
- detail lanes routed through without any operation;
- four stages with 9, 10 and 11-bit lanes between them;
- 8-bit input and output, with the final divide by 16 done as a 4-bit shift.

These are this implementation's own choices:

- **Signedness.** The widths only work out if approximations are unsigned and
  details are two's complement, as described above.
- **Coefficient order.** The standard Haar order is used: mean, then coarse to fine.
- **Rounding.** The shift truncates toward minus infinity.
- **Reset.** The reset is asynchronous and active low. The source shows only a
  reset pin on each stage.
- **Handshake.** The `in_valid`/`out_valid` flag is an addition. The source
  gives no handshake.
- **Difference sign.** The butterfly computes even − odd.

## Limits

- **Inputs are unsigned 8-bit pixels.** A true separable 2-D transform of a
  16x16 block feeds the row coefficients back in for the column pass, and those
  are signed. This block cannot take them as they are. Two things would be
  needed:
  - an input stage that accepts signed data, with one more bit of headroom;
  - a transpose buffer between the passes.

  Neither is part of this design. What it does support is one 1-D pass over the
  rows or the columns of pixel data.
- **Only the 16-point, four-level configuration is provided.** The stage modules
  are parameterised, but `hdwt_top` wires exactly four stages.
- **No particular FPGA or clock rate is assumed.** The deepest logic path is one
  12-bit adder per stage.

## Verification

Each testbench checks its results against values computed independently in the
testbench. Each one prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb/tb_haar_bpu.sv`: every 8-bit input pair exhaustively, plus random 11-bit
  pairs.
- `tb/tb_haar_stage.sv`: stages one, two and three, through `tb/haar_stage_harness.sv`.
  - Random and corner inputs; detail lanes at the most negative value.
  - Idle cycles, a one-cycle latency check and a reset check.
- `tb/tb_haar_stage_four.sv`: the last stage, including ±2040 and the largest
  sum.
- `tb/tb_hdwt_top.sv`: the whole transform at its default size.
  - About 4000 vectors, random plus flat, step, alternating and ramp patterns.
  - Back-to-back and idle cycles, an exact 4-clock latency check, and a reset
    while vectors are in flight (those vectors must be dropped).
  - Checks that the mean 255 and the details −128 and +127 all occur.
- `tb/tb_hdwt_block16.sv`: a generated 16x16 block, rows then columns, streamed
  at one vector per clock. It also checks the 35-clock total.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/haar_pkg.sv tb/haar_ref_pkg.sv tb/tb_hdwt_top.sv --top-module tb_hdwt_top
./obj_dir/Vtb_hdwt_top
```

All five testbenches pass. Each block's testbench was also run against a copy of
the block with a deliberate bug, and it caught every one:

- `haar_bpu`: the subtraction swapped;
- `haar_stage`: detail lanes zero-extended instead of sign-extended;
- `haar_stage_four`: the same zero-extension in the last stage;
- `hdwt_top`: stage three given four butterflies instead of two.
