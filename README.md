# Wavelet-neural network datapath for transformer differential protection

Transformer differential protection has to tell a real internal fault
from magnetising inrush current. Both can produce a large differential
current. The scheme implemented here splits the job in two:

1. A **wavelet front end** decomposes each window of the sampled current with
   the Daubechies-2 (DB2) wavelet. It uses one Mallat step: a high-pass and a
   low-pass FIR filter, each followed by decimation by two.
2. A **neural network**, trained offline, classifies the wavelet features.
   It is built from one reusable hardware **neuron**. The neuron computes
   `tanh(sum w[i]*x[i])` with a serial multiply-accumulate and a
   piecewise-linear hyperbolic tangent.

This RTL provides both parts and their sub-blocks: the wavelet transform and
the single neuron with its tanh unit. Two things are not fixed by the
underlying design and are not built: the features passed from the wavelet
coefficients to the network (energy values), and the size and wiring of the
network. The top level `wnn_top` therefore holds the two parts side by side,
each with its own ports.

Everything is synchronous to one clock `clk`. Every module has an
asynchronous, active-low reset `rst_n`.

## Number formats

| Quantity | Format | Notes |
|---|---|---|
| current sample `x` | 16-bit signed integer | one sample per clock |
| wavelet coefficients `ch`, `cl` | 32-bit signed | 16 x the true DB2 coefficient |
| neuron inputs, weights, tanh argument | 22-bit signed, value x 2^18 | range [-8, 8) |
| weighted-sum accumulator | 48-bit signed, value x 2^36 | full-precision products |
| tanh output, neuron output | 20-bit signed, value x 2^18 | 1.0 = 262144 |

The shared constants live in `rtl/wnn_pkg.sv`.

## Wavelet front end (`wavelet_transform`)

```
x ──► wt_zero_cross ──► wt_data_proc ──┬─► wt_fir4 (G, high-pass) ─► wt_downsample ─► ch
                         (window +      │
                          extension)    └─► wt_fir4 (H, low-pass)  ─► wt_downsample ─► cl
```

### Filters

The filter taps are the DB2 decomposition filters, multiplied by 16 and
rounded. Index 0 multiplies the newest sample:

* low-pass  `H = (-2, 4, 13, 8)`   (exact: -2.07, 3.59, 13.38, 7.73)
* high-pass `G = (-8, 13, -4, -2)` (exact: -7.73, 13.38, -3.59, -2.07)

Every coefficient that comes out is therefore 16 times the true wavelet
coefficient. The rounding of the taps costs a few percent against a
floating-point DWT. `wt_fir4` is a plain direct-form filter with a registered
output.

### Windowing and the symmetric extension

This part takes the most care. The decomposition works on windows of `N`
samples (default 12):

* `wt_zero_cross` raises `zc_pulse` on the first positive sample after a
  sample that is zero or negative. That sample becomes `x0` of the window.
* `wt_data_proc` emits the window with a two-sample half-point symmetric
  extension in front:

  ```
  x1, x0, x0, x1, x2, ..., x[N-1]        (N + 2 samples)
  ```

  The stream is built from a three-register delay line. `x1` is taken
  straight from the input one cycle after the pulse. `x0` is taken from two
  cycles back. After that the stream is the input delayed by three cycles.
  So `x1` appears 2 cycles after the pulse, `x0` 3 cycles after it, and
  `x[k]` 4+k cycles after it.
* `wt_downsample` keeps filter outputs 3, 5, ..., N+1 of the extended
  stream (0-based). These are exactly the outputs whose four taps lie inside
  the extended window. A 12-sample window thus gives 6 detail and 6
  approximation coefficients. Each kept value is held on the output until
  the next one.

The extended window is two samples longer than the input window. While a
window is being emitted (`busy`), further zero crossings are ignored, with
one exception: a crossing in the cycle that emits the last sample starts the
next window without a gap. Windows can therefore follow each other every
N+2 samples. A current whose crossings come every N samples (for example the
same 12-sample window repeated) has every second window processed.

Timing from the window's first sample (cycle t0): the first `coef_valid`
comes in t0+7, then one every two cycles. `coef_last` marks the N/2-th pair.

Example: the 12-sample window

```
x = 2, 13, 36, 1464, 6682, 9294, 8562, 4865, 95, 23, 7, 0
```

gives

```
ch = -112, -11300, 6586, 21846, -35533, -191
cl =  112,  -2599, 27460, 198796, 132075, 1087
```

and the extended stream starts `13, 2, 2, 13, 36`.

## Excitation function (`tanh_unit`, `tanh_coef_rom`)

tanh is odd, so only `|x|` is approximated. The range [0, 8) is cut into
1024 segments of width 1/128. On each segment tanh is replaced by its
least-squares line `a0 + a1*x`, the one that minimises the integral of the
squared error over the segment. The pipeline:

1. **Absolute value.** If `x < 0` the input is bitwise inverted. This is a
   one's complement, so it gives `-x - 2^-18`; it needs no adder, and
   -8 maps to 8 - 2^-18, which stays in range.
2. **Address translation.** `|x|[20:11]` is the segment number.
3. **ROM A / ROM B** (`tanh_coef_rom`, 1024 x 24 bits each) give `a1` and `a0`.
   The offset `a0` is stored x 2^18. The slope `a1` is stored x 2^23; the
   extra fraction bits keep the error of `a1*|x|` small up to |x| = 8.
4. **Multiply-add.** `a0 + ((a1*|x|) >> 23)`.
5. **Output.** For a negative input the result is bitwise inverted again.
   A negative `x` thus gives `-tanh(|x| - 2^-18) - 2^-18`.

Pipeline: ROM read, product, adder. Latency 3 cycles; it accepts one input
per cycle.

Accuracy: for x >= 0 the result is within 2 LSB (2^-18 each) of
`tanh(x)*2^18` over the whole range. For example, `tanh(1.0)` gives 199648
(0.7616). Negative inputs carry one more LSB from the one's complement.

The tables are not stored in a data file. `tanh_coef_rom` computes them at
elaboration with a constant function: Simpson's rule (16 intervals) for the
two integrals

```
b1 = 12/h^3 * ∫_0^h (t - h/2) tanh(u+t) dt
b0 = (1/h) * ∫_0^h tanh(u+t) dt - b1*h/2
a1 = b1,   a0 = b0 - b1*u           (segment [u, u+h), h = 1/128)
```

Both results are rounded to the nearest integer. Synthesis turns the table
into ROM contents. Any tool that evaluates `$tanh` in constant functions
handles it (Verilator and slang-based flows do).

## Neuron (`neuron`)

```
           x[0..7] ─► MUX ─┐
 neuron_ctrl ─ idx ─┤      ├─► mac_unit ─► buffer + bus conversion ─► tanh_unit ─► y
                    └─► weight_ram ─┘                 (>>18, saturate)
```

The weights sit in a single-port RAM (`weight_ram`, 8 x 22 bits), so only
one can be read per cycle. The evaluation is therefore serial:

* `start` (while idle) starts `neuron_ctrl`. It counts `idx = 0..7` in the
  next 8 cycles; `busy` is high during those 8 cycles.
* In each cycle `idx` addresses the RAM and selects `x[idx]`. The pair is
  registered and multiplied in `mac_unit`. On `idx = 0` the accumulator
  reloads with the product instead of adding to it. This clears the
  previous sum, so no separate clear cycle is needed.
* After the last term, the 2^36-scaled sum is shifted by 18. It is
  saturated to the 22-bit range [-8, 8 - 2^-18] (tanh is flat there
  anyway), held in the output buffer `sum`, and passed to
  `tanh_unit`.

Timing: `start` in cycle S gives `sum` in S+11 and `y_valid` in S+14. The
inputs `x[]` must stay stable while `busy` is high. A new `start` is taken in
any cycle with `busy` low, so evaluations can run every 9 cycles.

Weight loading: `w_we`, `w_addr` and `w_data` write the RAM through its single
port. Write only while the neuron is idle; an assertion checks this. A
`start` in a cycle with `w_we` high is ignored. The RAM is not reset, so
weights must be written before use.

Example: weights (1, 0, 1, 2, 0, 0, 0, 1) and inputs (0, 1, 1, 0, 0, 0, 0, 0),
all x 2^18. The result is `sum = 262144` (1.0) and `y = 199648` (0.7616).

## Top level (`wnn_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `x` | in | 16 | current sample, one per clock |
| `ext_sample` | out | 16 | extended sample stream fed to the filters |
| `ch`, `cl` | out | 32 | detail / approximation coefficient (x16) |
| `coef_valid`, `coef_last` | out | 1 | new pair / last pair of the window |
| `wt_busy` | out | 1 | a window is being processed |
| `nn_x[8]` | in | 8 x 22 | neuron inputs (x 2^18) |
| `nn_start` | in | 1 | start an evaluation |
| `w_we`, `w_addr`, `w_data` | in | 1, 3, 22 | weight write port |
| `nn_busy` | out | 1 | evaluation in progress |
| `nn_sum` | out | 22 | weighted sum (x 2^18, saturated) |
| `nn_y`, `nn_y_valid` | out | 20, 1 | neuron output (x 2^18) and its strobe |

Parameters: `N` (window length, 12) and `N_IN` (neuron inputs, 8). `N`
must be even and at least 4.

Size after synthesis (coarse): about 150 word-level cells, 445 flip-flop bits,
and 49,328 memory bits (two 1024 x 24 ROMs and the 8 x 22 weight RAM).

## What is this design's own choice

These points are not fixed by the scheme this RTL follows. They were chosen
here and can be changed:

* the zero-crossing rule (upward, "<= 0 then > 0") and the window length 12;
* how crossings that arrive during a window are handled (ignored);
* the start/busy handshake of the neuron, the requirement that inputs be held
  while busy, and the weight-write interface;
* all pipeline depths and latencies quoted above;
* saturation in the neuron's bus conversion;
* the slope scaling 2^23 in the tanh ROM, and the Simpson-rule table
  generation;
* the widths of the accumulator (48) and of the tanh output (20).

Not built: the energy features of the wavelet coefficients that would feed the
network, the network of neurons, and multi-level decomposition (iterating the
low-pass branch). The RTL implements one decomposition level.

## Files

`rtl/`:

* `wnn_pkg.sv`: widths, scaling, filter taps.
* `wt_zero_cross.sv`, `wt_data_proc.sv`, `wt_fir4.sv`, `wt_downsample.sv`,
  `wavelet_transform.sv`: the wavelet front end.
* `tanh_coef_rom.sv`, `tanh_unit.sv`: the excitation function.
* `weight_ram.sv`, `neuron_ctrl.sv`, `mac_unit.sv`, `neuron.sv`: the neuron.
* `wnn_top.sv`: the top level.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M` and has a watchdog. The testbenches
compare against models written independently of the RTL: a convolution of
the extended window for the wavelet path, and `$tanh` with a 2-LSB tolerance
for the excitation function. They also check the latencies quoted above.
`tb_wnn_top` runs the whole design at its default sizes. It counts each
mechanism (window start, ignored crossing, back-to-back windows, neuron
evaluation, saturation, negative output, start blocked by a write, start
ignored while busy) and fails if any of them never happened.

## Simulating

With Verilator 5 (two-state simulation), from the directory that holds `rtl/`
and `tb/`:

```sh
verilator --binary --timing --assert -Irtl -Itb --top-module tb_wnn_top \
          rtl/wnn_pkg.sv tb/tb_wnn_top.sv -o sim
./obj_dir/sim
```

Replace `tb_wnn_top` with any other testbench name. Verilator finds the
other modules through `-Irtl`, since each module is in a file of its own
name. The package must be named first. Lint with:

```sh
verilator --lint-only -Wall -Irtl rtl/wnn_pkg.sv rtl/wnn_top.sv
```

Verilator reports that `rst_n` is used both as an asynchronous reset and
synchronously. The synchronous use is only the `disable iff (!rst_n)` of the
assertions, not logic.
