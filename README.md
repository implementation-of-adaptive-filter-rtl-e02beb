# Pipelined LMS adaptive equalizer

A channel with multipath smears each transmitted symbol into its neighbours
(inter-symbol interference). An adaptive equalizer is an FIR filter placed
after the channel that learns an approximate inverse of the channel. During
training it is given the known transmitted sequence as the desired signal
`d(n)` and moves its coefficients along the negative gradient of the squared
error. That is the least-mean-square (LMS) rule of Widrow and Hoff:

```
y(n)   = sum_k w_k x(n-k)                 (filter)
e(n)   = d(n) - y(n)                      (error)
w_k   <- w_k + mu * e(n) * x(n-k)         (weight update)
```

This repository holds a five-tap LMS equalizer in synthesizable
SystemVerilog, after the paper "Implementation of Adaptive Filter Based on
LMS Algorithm". Every multiplier and adder is registered (fine-grained
pipelining), so the filter takes a new sample on every clock. The error
reaching the update is therefore many cycles old, and the filter is a
*delayed* LMS (DLMS). Two further parts sit beside it:

* a display unit that squares the error and shows it on four 7-segment digits;
* a serial LMS filter, the low-cost reference structure: one
  multiplier-accumulator, taking one sample every 12 clocks.

## Number formats

| signal | width | format | range |
|---|---|---|---|
| `x`, `d`, `y`, `e` | 8 | Q1.7 | [-1, 1) |
| coefficient `w_k` | 16 | Q2.14 | [-2, 2) |
| coefficient as the filter multiplier sees it | 8 | Q2.6 (top byte of `w_k`) | [-2, 2) |
| filter product, tree sum | 16 | Q3.13 | [-4, 4) |
| update product `e*x` | 16 | Q2.14 | |

The 8-bit data, the 8x8 multipliers and the 16-bit coefficients come from the
paper. The paper gives the reason for the wide coefficients: the small step
size of a pipelined filter makes each update tiny. The Q formats are this
design's choice. Coefficients use the same format as the product `e*x`, so
the update needs nothing between the multiplier and the coefficient adder
except the step-size shift. The step size is `mu = 2^-6`, realised as a 6-bit
arithmetic shift right, as in the paper. Every adder saturates instead of
wrapping. The filter output is the tree sum shifted to Q1.7 and saturated to
8 bits.

## The pipeline and the adaptation delay

This is the part that needs care. Register stages, counted in sample strobes
(`en` high), with the default 7-stage multipliers:

```
x_in ─► x delay line (1) ─► tap multiplier x(n-k)·w_k[15:8] (7) ─► adder tree (3) ─► y_out
d_in ─► d delay line (11) ──────────────────────────────────────► error subtract (1) ─► e_out
e_out, x(n-k) ─► update multiplier (7) ─► >>>6 ─► coefficient register += (1)
```

* `y(n)` appears on `y_out` after the 11th enabled edge that follows the
  edge which took `x(n)`, counting that edge. In other words it is the output
  of register stage 11. `e(n)` comes one stage later (stage 12).
* The loop from a sample to the coefficients holds 20 registers: line 1,
  multiplier 7, tree 3, error 1, multiplier 7, coefficient 1. The update
  from sample `n` is in the coefficients from strobe `n+19` on. The
  arithmetic is therefore exactly:

  ```
  w_k(n) = sat16( w_k(n-1) + ((e(n-19) * x(n-19-k)) >>> 6) )
  y(n)   = sat8( tree_k( x(n-k) * w_k(n)[15:8] ) >>> 6 )
  e(n)   = sat8( d(n) - y(n) )
  ```

  Here `w_k(n)` is the coefficient when `x(n)` enters the multipliers, and
  `tree` adds pairs (0+1), (2+3), then (01+23), then adds tap 4, clipping to
  16 bits at each adder.
* The weight update must multiply `e(n)` by the *same* `x(n-k)` that
  produced it, not by the current sample. The x delay line is therefore 16
  deep (11 + 5): tap `k` reads `x_line[k]` for filtering and
  `x_line[11+k]` for its update.
* The delay makes the loop less stable: the step size must be smaller than
  for a plain LMS. With `mu = 2^-6` and five taps the filter converges well
  (see Verification).

The adder tree is balanced rather than the chain of adders of the usual
direct-form drawing. The paper notes that in its direct-form design the
latency does not grow linearly with the number of taps, and a balanced tree
gives exactly that. An odd leftover value is passed through a register so
that all paths have the same latency.

The multiplier follows the paper's description: eight partial products
(the one for the sign bit with negative weight), then a three-level adder
tree 8→4→2→1, with registers at the partial products and after each tree
level. The paper lists the multiplier with a latency of 7, which is read as
7 cycles. The structure needs 4 registers, so 3 balancing registers follow
the tree. `MULT_LAT` can be set to 4 or more. The adaptation delay and the
output latency follow it automatically (filter latency `MULT_LAT+4`).

`adapt_en = 0` freezes the coefficients while filtering goes on, for example
after training. It and the `en` strobe are this design's additions. With
`en` low the whole pipeline, the display squarer included, holds its state.
Delays therefore count in samples, not clocks. `y_valid` rises once 11
strobes have passed since reset.

## Squared-error display

`mse_display` squares `e_out` with one more pipelined 8x8 multiplier
(Q2.14, 16 bits). A free-running `SCAN_BITS`-bit counter (default 16)
drives the four digits. Its top two bits choose the digit: they set one bit
of `an` (one-hot, digit 0 is the least significant nibble) and select that
nibble through a 4-to-1 multiplexer. The nibble goes to a single hex
7-segment decoder, whose output `seg` is `{g,f,e,d,c,b,a}` with 1 = lit. The
square is latched into `sq` each time the scan returns to digit 0, so one
scan shows one value. Each digit stays lit for 2^14 clocks. The scan rate,
the latching and the output polarity are choices made here; the paper
names only the squarer, the 4x1 mux and the binary-to-7-segment conversion.

## Serial reference filter

`serial_lms` is the economical structure: one multiplier and an
accumulating adder compute the FIR, one term per clock (`serial_fir`). The
sum is then multiplied by the constant `round(2^15/TAPS)` (normalisation by
1/Taps, which keeps the output away from saturation). A small state machine
then runs:

| phase | clocks | work |
|---|---|---|
| IDLE | ≥1 | wait for `in_valid`; shift `x_in` into the 5-sample line, latch `d_in` and `step` |
| FIR | 5 | `acc += x(n-k) * c_k` |
| ERR | 1 | `y = sat8(acc/5)`, `e = sat8(d - y)`; `out_valid` pulses on the next clock |
| UPD | 5 | `c_k = sat16(c_k + ((x(n-k)*e)*step >>> 8))` |

`step` is an unsigned Q0.8 input. This filter uses the current error, so it
is a plain LMS with no delay. A sample is taken only when `in_valid` and
`in_ready` are both high, at best every 12 clocks. Because of the 1/5
scaling, the largest gain one coefficient can give is 0.4. The filter
therefore suits identification of a small system better than inverting a
strong channel. The two filters share nothing except the clock and reset.

## Modules

| module | role |
|---|---|
| `lms_pkg` | widths, `data_t`/`coef_t`, `sat()` |
| `pipe_mult` | pipelined 8x8 adder-tree multiplier |
| `reg_adder` | registered saturating adder / subtractor |
| `delay_line` | tapped shift register |
| `adder_tree` | balanced tree of `reg_adder` |
| `lms_tap` | one tap: filter product, update product, step shift, coefficient register |
| `lms_control` | pipeline fill flag `y_valid` |
| `lms_equalizer` | the five-tap DLMS equalizer |
| `seg7_decoder` | hex to 7-segment |
| `mse_display` | squarer, digit scan, 4x1 mux, decoder |
| `serial_fir`, `serial_lms` | serial reference filter |
| `lms_equalizer_top` | everything side by side; serial ports prefixed `s_` |

Reset is synchronous and active high and clears every register,
coefficients included. Top parameters are `TAPS` (5), `MU_SHIFT` (6),
`MULT_LAT` (7) and `SCAN_BITS` (16).

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The references are
computed independently in the testbench: integer products, clipped sums,
and a sample-level DLMS model derived from the component latencies.

* `tb_lms_equalizer` and `tb_lms_equalizer_top` (the latter at default
  parameters) send a random ±0.375 training sequence through a channel
  `0.75 + 0.31 z^-1 - 0.125 z^-2` with a little noise. The desired signal is
  the sequence delayed by two samples. The testbenches check `y_out`,
  `e_out`, `y_valid` and all coefficients after every clock edge against the
  model. The error power falls from about 1800 LSB² over the first 200
  samples to about 90 LSB² once converged, and the main coefficient settles
  near 1.25. Strobe gaps, a period with adaptation held and an overdriven
  input that saturates `y` are each exercised. The top test also checks the
  display (latched square, digit order, segment patterns). It runs the
  serial filter on a system-identification task, where the error goes to
  zero.
* `tb_lms_two_tap` runs the same check with `TAPS = 2`, the two-coefficient
  form in which the LMS equations are usually first written. Its tree has
  one level and its adaptation delay is 17.
* The block tests also cover multiplier corner values (-128·-128) and
  latency, adder saturation in both directions, coefficient saturation,
  and the serial filter's handshake timing (`out_valid` at the sixth clock
  edge after the one that takes a sample, at most one sample per 12 clocks).

To run one test with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/lms_pkg.sv tb/tb_lms_equalizer_top.sv \
          -y rtl --top-module tb_lms_equalizer_top -Mdir obj
./obj/Vtb_lms_equalizer_top
```

The full-size system test takes about a second.

## Limits and departures

* The channel and the training-sequence source are outside the design. `x_in`
  and `d_in` come from the outside; no decision-directed mode (slicer
  feeding `d`) is built, since the paper describes training only.
* The paper also mentions a transposed-form variant, which is not built.
  Only the direct form is.
* The step size of the pipelined equalizer is fixed by `MU_SHIFT`. Drawings
  of LMS usually scale the error by mu once, before the per-tap
  multipliers. Here the shift comes after each tap's `e*x` product, which
  keeps precision that shifting an 8-bit error by 6 would lose.
* The filter multipliers see only the top 8 bits of each coefficient
  (truncation). This limits how finely the equalizer can settle, which is
  the residual error seen in simulation.
* The reading of the multiplier latency as 7 cycles is an interpretation;
  with `MULT_LAT = 4` the same structure has no balancing registers and an
  adaptation delay of 13.
