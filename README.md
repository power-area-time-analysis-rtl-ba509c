# Systolic three-octave Haar DWT

This is a one-dimensional discrete wavelet transform (DWT) engine. It computes
three octaves of the Haar wavelet decomposition of a sample stream with a single
filter. That filter is a chain of two filter cells. Each cell has one multiplier
and one adder, and the same cells produce the low-pass (approximation) and the
high-pass (detail) output. All three octaves share the filter. A fixed 8-step
schedule interleaves the second and third octaves between the first-octave
computations, so the engine keeps up with one input sample per time unit and
needs no memory. Intermediate results live in a few registers.

The filter length is a parameter. `TAPS = 2` gives Haar, the default. `TAPS = 6`
gives six-tap wavelets such as Daubechies-3, and it is tested too.

## The transform being computed

The input is `a(n)`. Per octave, the filter pair (`h` for low pass, `g` for high
pass) is applied and the result is decimated by 2:

```
octave 1:  c(2m)   = sum_k h_k a(2m-k)          b(2m)   = sum_k g_k a(2m-k)
octave 2:  e(4m)   = sum_k h_k c(4m-2k)         d(4m)   = sum_k g_k c(4m-2k)
octave 3:  g(8m+4) = sum_k h_k e(8m+4-4k)       f(8m+4) = sum_k g_k e(8m+4-4k)
```

`b`, `d` and `f` are the detail coefficients of octaves 1 to 3. `c`, `e` and
`g` are the approximations. `c` and `e` are also the inputs of the next octave.
Samples before time 0 count as zero. For Haar, `k` takes the values 0 and 1.

## The schedule

Everything depends on this. A **time unit** is two clock cycles (see the next
section). The schedule repeats every 8 time units. These are numbered 1 to 8
within a period, counting from the first time unit after `en` rises:

| time unit in period | work | operands come from |
|---|---|---|
| 1, 3, 5, 7 | octave 1: `b`, `c` | input delay unit: `a(n)`, `a(n-1)`, … |
| 4, 8 | octave 2: `d`, `e` | register bank, `c` chain |
| 2 | octave 3: `f`, `g` (from the second period on) | register bank, `e` chain |
| 6 (and 2 in the first period) | idle | – |

Over a whole run, the sample applied in time unit `j+1` is `a(j)`. The
computations go as follows:

* Octave 1 runs in time unit `2m+1` and computes `c(2m)` from the present
  sample and the `TAPS-1` samples before it.
* Octave 2 runs in time unit `4m+4` and computes `e(4m)` from the `TAPS` most
  recent `c` values in the register bank.
* Octave 3 runs in time unit `8m+10` and computes `g(8m+4)` from the `TAPS`
  most recent `e` values. The first one runs in time unit 10, the second period's
  slot 2.

The result of a time unit is on the outputs during the next time unit: the
latency is one time unit. In steady state, 7 of every 8 time units are busy
(87.5 %). Per 8 input samples the engine emits 4 + 2 + 1 coefficient pairs:
8 wavelet coefficients (`b` ×4, `d` ×2, `f`, `g`), plus the `c` and `e` values
that it consumes itself.

The register bank's timing makes this work. A low-pass result computed in time
unit `t` is on the filter output during `t+1`. It is shifted into the bank at the
end of `t+1`, so it can be used from `t+2` on. Take time unit 8. `c(6)`, from
time unit 7, is not in the bank yet, and the two newest `c` values are `c(4)` and
`c(2)`: exactly the operands of `e(4)`. The third octave works the same way.
In time unit 10, the `e` chain holds `e(4)` (computed in 8) and `e(0)`.

## Two phases per time unit: one multiplier for both bands

Each filter cell holds two coefficient registers, `h_k` and `g_k`, but has only
one multiplier. A time unit is therefore two clock cycles:

* **Phase 0**: every cell multiplies by `h_k`. The sum is captured in a holding
  register.
* **Phase 1**: the same multipliers and adders use `g_k`. At the clock edge that
  ends phase 1, the low-pass and high-pass results go together into the output
  registers.

The operands stay constant through both phases. The input delay unit and the
register bank only move at the end of phase 1, and so does the control unit's
slot counter. The clock therefore runs at twice the sample rate.

## Blocks

* **Control unit** (`dwt_control_unit`). It contains:
  * a two-state phase machine;
  * a modulo-8 slot counter;
  * a two-state start-up machine, which keeps slot 2 idle until the first `e`
    values exist;
  * a decoder, which maps slot and start-up state onto a switch selection (idle,
    input delay, `c` chain, `e` chain).

  The switch multiplexes the `TAPS` operands. The control unit also tells the
  register bank when to store the filter's low-pass output: first-octave results
  go to the `c` chain, second-octave results to the `e` chain. Third-octave
  results are final. `en = 0` freezes the unit in phase 0 of slot 1, so
  coefficients can be loaded after reset.
* **Input delay unit** (`dwt_input_delay`). It is a chain of `TAPS-1` registers
  that shifts once per time unit. Tap 0 is the present input itself, so a
  six-tap filter needs five registers.
* **Filter unit** (`dwt_filter_unit`) and **filter cell** (`dwt_filter_cell`).
  Cell `TAPS-1` starts from zero. Each cell adds `coefficient × operand` to the
  partial sum from its neighbour, and cell 0 delivers the result. The partial
  sums ripple through the cells within a time unit. The only registers are at
  the filter's output, which keeps the latency at one time unit.
* **Register bank** (`dwt_register_bank`). It has two shift chains of `TAPS`
  words: one for `c` values and one for `e` values. Values enter in arrival
  order and only move forward. A register is not reassigned while its value is
  still needed. For Haar the bank is 4 words. For six taps it is 12 words.

### Signed multiplication

Coefficients are stored in sign-magnitude form. Data is two's complement. The
multiplier inside a cell is unsigned:

1. A negative data operand is inverted into its magnitude.
2. The product's sign is the XOR of the operand sign and the coefficient sign.
3. A negative product is inverted back before the adder.

Products are truncated to 32 bits, so the result is ordinary 32-bit wrap-around
arithmetic. A coefficient of "minus zero" behaves as zero.

## Interface and number formats (`dwt_sa_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low (clears all data and coefficient registers) |
| `en` | in | 1 | 0: hold before time unit 1; 1: run |
| `coef_we`, `coef_addr` | in | 1, clog2(TAPS) | write the coefficient pair of tap `coef_addr` |
| `coef_lo`, `coef_hi` | in | 13 | `h_k`, `g_k`, sign-magnitude, sign in bit 12 |
| `sample_in` | in | 16 | `a(n)`, two's complement, held for a whole time unit |
| `sample_take` | out | 1 | the sample is taken at this clock edge (end of a time unit) |
| `band_sel` | in | 1 | 1: `out_coef` is the low-pass result; 0: the high-pass result |
| `out_valid`, `out_oct` | out | 1, 2 | a result pair is present this time unit, and its octave (1 to 3) |
| `out_lo`, `out_hi`, `out_coef` | out | 32 | approximation, detail, band-selected coefficient (two's complement) |

Operating sequence:

1. Hold `en` low and release reset.
2. Write the `TAPS` coefficient pairs, one per clock.
3. Raise `en` at the same time as presenting `a(0)`.
4. Change `sample_in` after every clock edge at which `sample_take` is 1.

The outputs are stable for both cycles of a time unit.

There is no built-in fixed-point scaling: coefficients are integers. Haar uses
magnitude 18 for all four coefficients, with the high-pass tap 0 negative. That
is `coef_lo = 13'h0012` for both taps, `coef_hi = 13'h1012` for tap 0 and
`13'h0012` for tap 1. Each octave therefore multiplies the signal level by
36 = 2 × 18. Three octaves of a 16-bit input can exceed 32 bits: scale the
coefficients down, or widen `DW`, if that matters for the application.

### Worked example: constant input of 1, Haar

| | octave 1 (`c`) | octave 2 (`e`) | octave 3 (`g`) |
|---|---|---|---|
| first value | 0x12 | 0x144 | 0x71E8 |
| steady state | 0x24 | 0x510 | 0xB640 |

All detail outputs are 0 once the start-up is over.

The first values are partial because the history starts at zero. If the input
is taken as already 1 before `a(0)`, the first values become 0x24, 0x288 and
0x88B0 instead. 0x88B0 is `18 × (0x510 + 0x288)`: the first third-octave output
sees one full `e` and one partial `e`. The steady-state values are the same in
both cases.

## Where this design makes its own choices

* **Two-phase time unit.** One multiplier per cell serves both bands in one time
  unit by using two clock cycles. A variant with two multipliers per cell would
  halve the clock rate.
* **Partial sums ripple within a time unit.** They are not registered cell by
  cell. The one-time-unit latency that the schedule relies on holds for any
  `TAPS`. The cost is a combinational path through all `TAPS` multiply-add
  stages.
* **Third octave in slot 2, idle slot 6.** Running the third octave in slot 6
  instead would also fit in the 8-slot period. This design uses the "8k+10"
  placement, which pairs `e(8m+4)` with `e(8m)` for Haar.
* **Register bank size.** The operands of a computation are read in parallel,
  so a bank of `2 × TAPS` words is enough. A schedule that streams operands
  through a single serial chain needs many more registers: 26 for six taps.
* **Storage elements are edge-triggered flip-flops.**
* **Widths.** Input 16 bits, data path and outputs 32 bits, coefficients 13-bit
  sign-magnitude. These are parameters (`IN_W`, `DW`, `CW`).
* **`en` input and the reset to zero history.** Both are this design's choices.
* **Three octaves are fixed.** More octaves would need a longer period and
  another register-bank chain.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_dwt_sa_top`, at the default Haar size, runs two tests:
  * the constant-input Haar example above, with its hand-worked values;
  * 400 time units of random 16-bit samples with random 13-bit coefficients
    and a random band select.

  An independent model of the pyramid algorithm predicts every time unit's
  output: valid or not, octave, both bands, and the band-selected word. The test
  also checks:
  * the first third-octave result appears 20 clock cycles after start;
  * steady-state utilisation is exactly 7/8;
  * every mechanism happened: all three octaves, the start-up idle slot, the
    steady idle slot, and both band selections.
* `tb_dwt_sa_top_6tap` runs the same random test with `TAPS = 6`.
* The block tests cover:
  * the filter cell: all sign combinations, minus-zero coefficients and the
    most negative operand;
  * the filter unit at 2 and 6 taps, including output hold over idle time units;
  * the register bank against queue models;
  * the input delay unit at 2 and 6 taps, with random shift enables;
  * the control unit's schedule, switch and register-bank write strobes,
    slot by slot over 40 periods.

To run one with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb rtl/dwt_pkg.sv tb/tb_dwt_sa_top.sv \
          --top-module tb_dwt_sa_top -Mdir obj_top
./obj_top/Vtb_dwt_sa_top
```

Replace `tb_dwt_sa_top` with any other testbench name. `-Wall --lint-only` on a
file in `rtl/`, with `rtl/dwt_pkg.sv` listed first, lints a single module.

## Changing it

* `TAPS` on `dwt_sa_top` sets the filter length. All blocks follow it, and the
  schedule needs no change.
* `DW` sets the data-path width, `IN_W` the sample width and `CW` the
  coefficient width. The coefficient sign is always the top bit.
* The schedule lives in the decoder of `dwt_control_unit`. The testbenches'
  reference models encode the same slot rules. If you change the schedule,
  update the register bank's chain depths and the models together.
