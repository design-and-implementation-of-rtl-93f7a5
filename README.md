# Event-driven FIR filtering of level-crossing samples

A signal such as a temperature, a pressure, an ECG or speech stays flat for long
stretches and then moves quickly. If you sample it at a fixed rate, most of the
samples carry no information, yet every one of them is converted, stored and
filtered. This design samples only when something happens. Its converter emits a
sample each time the input crosses one of a fixed set of levels. Each sample
records how long it has been since the previous one. The FIR filter takes these
irregular samples directly: each arriving sample starts one convolution, and a
flat input costs no samples and no filter activity at all.

The design follows a published architecture for an asynchronous
(micropipeline) FIR filter fed by an asynchronous level-crossing ADC. It has:

* `aadc`: a level-crossing converter. An up/down counter, a timer, and
  behavioural models of the DAC and the difference comparator.
* `micropipeline`: a clockless FIFO built from C-elements and capture/pass
  latches. It carries samples from the converter to the filter.
* `fir_filter`: the irregular-sampling FIR filter. It has a delay line, the MIN
  controller, a multiplier, an accumulator and an output buffer.
* `async_fir_system`: the top. It chains the three.

## Samples are couples

Every sample on every channel is a couple `(amplitude, dt)`:

| field | type (`fir_pkg`) | meaning |
|---|---|---|
| `a`  | `amp_t`, signed `M` = 8 bits | level index, -127 … +127 |
| `dt` | `dt_t`, unsigned `DT_W` = 16 bits | timer periods T_C since the previous sample; saturates at 65535 |

The filter output is `(o, dt)`: a 41-bit signed sum and the same kind of
interval. The output interval is always the interval of the input sample that
caused it, so the output is sampled at exactly the input's sampling instants.

## The converter (`aadc`)

There are 2^M − 1 = 255 levels, one quantum `q` apart, symmetric about zero.
The converter's current level `V_num` is held in an up/down counter. The loop
works as follows:

1. The DAC (`dac`) turns `V_num` into `V_ref`.
2. The comparator (`diff_quantifier`) raises `+LS` when `i(t) − V_ref > q/2`
   and `−LS` when it is below `−q/2`. Either one raises `req`.
3. The counter (`updown_counter`) steps one level in that direction and raises
   `ack`. It also sends the new level as a sample, together with the timer's
   count (`adc_timer`). The timer then restarts.
4. `req` returns to zero while `ack` is high. The counter drops `ack`, and the
   comparator looks again, this time against the new `V_ref`.

While the input stays within ±q/2 of `V_ref`, nothing moves. A fast input is
followed one level per loop turn. The loop takes about six clock cycles, so
inputs steeper than about q per 6 T_C lose track until they slow down. This is
the tracking condition |di/dt| ≤ q/δ.

The analog domain is modelled as a signed fixed-point integer `vin`. It has
`FRAC` = 4 bits below `q`, so `q` = 16 and level `n` sits at `16·n`. The DAC
and the comparator are behavioural models with small delays (2 ns and 1 ns).
They describe analog parts and are not meant for synthesis. The counter and
the timer are synthesizable and run on `clk`, whose period is the timer
resolution T_C. The counter's inputs from the comparator and from the sample
channel pass through two-flop synchronizers.

The counter never drops a sample. If the previous sample has not been
acknowledged yet, it withholds `ack` and the whole loop waits. The `stalled`
output shows this. The input may move on in the meantime. The converter then
catches up, one level per loop turn, when the channel frees up. The level
saturates at ±127.

## The irregular convolution (`fir_filter`)

This is the part that needs the most thought. With regular sampling, an FIR
output is `T · Σ h_k · x_{n−k}`: the k-th tap meets the k-th older sample. With
irregular sampling, the impulse-response samples and the input samples no
longer line up in time, so those products mean nothing. Instead the filter
computes the true convolution integral of two piecewise-constant signals:

* The input, looking back from the newest sample, is a run of segments. Segment
  `k` has amplitude `ax_{n−k}` and length `dtx_{n−k}`.
* The impulse response is likewise a run of `NH` segments. Segment `j` has
  amplitude `ah_j` and length `dth_j`. The response may itself be irregularly
  sampled.

Overlay the two runs on one time axis and merge their breakpoints. Each piece
between neighbouring breakpoints has a constant `ax` and a constant `ah`. Its
area is `dt_min · ax_{n−k} · ah_j`, and `o_n` is the sum of these areas. In
effect, each signal is resampled at the other's sampling times.

Example: input segments (length/amplitude) 3/a0, 5/a1; response segments
4/h0, 4/h1.

```
time  0   1   2   3   4   5   6   7   8
x     |--a0-------|--a1---------------|
h     |--h0-----------|--h1-----------|
step      dt=3          dt=1   dt=4
          k=0,j=0       k=1,j=0 k=1,j=1
o_n = 3·a0·h0 + 1·a1·h0 + 4·a1·h1
```

### Blocks

* **`delay_line`** holds the last `NX` input couples in a shift register
  (k = 0 is the newest). It also holds the `NH` response couples in a small
  table, loaded through the `coef_*` port. Both are read combinationally at
  the indices `k` and `j`. It receives samples over a 2-phase handshake. It
  takes a new sample only while no convolution runs, and signals each one
  with a one-cycle `start`.
* **`min_unit`** is the controller. It keeps `k`, `j` and how much of each
  current segment has already been used. Each cycle it issues
  `dt_min = min(rest of x segment k, rest of h segment j)`. It then advances
  `k`, `j` or both, whichever segment is used up. The walk ends when the
  response is used up (`j = NH−1`) or the stored history is (`k = NX−1`).
  The controller then raises `acc_reset` and `buf_enable` together.
* **`multiplier`** registers `dt_min · ax · ah`. This is an exact 33-bit
  signed product of an unsigned interval and two signed amplitudes.
* **`accumulator`** adds the products and is cleared by `acc_reset`.
* **`out_buffer`** takes the sum and the newest sample's `dt` on `buf_enable`.
  It offers them on a 2-phase output channel.

### Timing

A convolution with S merged pieces takes S cycles of steps, one drain cycle
for the multiplier register, and one cycle for enable/reset: **S + 2 cycles**
in all, if the output channel is free. S is at most NX + NH − 1. If the output
buffer still holds an unacknowledged result, the controller waits in its last
state. Samples that arrive meanwhile wait in the micropipeline, and when that
is full, in the converter.

Reset fills the history with zero amplitude and the longest interval, which
reads as "silence for a long time". It fills the response with zero
amplitudes spaced `T_SAMPLE` = 4 timer periods apart. A regularly sampled
response designed with classical tools is therefore loaded simply by writing
the amplitudes. Write the table only while `busy` is low.

The sum is in units of (timer periods × input code × response code). No
division by a sampling period is made, so scale the coefficients to suit.

## The micropipeline channel (`micropipeline`, `mp_stage`, `c_element`)

Between the converter and the filter, samples travel through `N_STAGES` = 3
stages of a 2-phase bundled-data micropipeline, with no clock. Each stage has
three parts:

* A **Muller C-element** (`c_element`). Its output follows its inputs when they
  agree and holds otherwise. Its inputs are the request from the left and the
  inverted acknowledge from the right.
* A **capture/pass latch**. It is transparent while the C-element output equals
  the acknowledge from the right (stage empty). It holds while they differ
  (stage full).
* **Delay elements** (`delay_element`, behavioural). The request from the left
  is delayed by `REQ_DELAY` so that the data it bundles has settled. The
  acknowledge to the left leaves after `CAP_DELAY`, the latch's capture time.
  The acknowledge from the right reaches the C-element only after
  `PASS_DELAY`. That last delay matters: without it the latch would be told
  to pass and to capture at the same instant, and it would keep the old word.

Every edge on a request wire announces one word, and every edge on an
acknowledge wire retires one. The receiving side (the filter, which is clocked)
synchronizes the request. It reads the data only after seeing a new edge. The
data is stable then, because the last stage holds it until it is acknowledged.

The C-element and the latches are written as `always_latch` and synthesize to
latches. That is intended, not a coding slip. The delay elements are for
simulation only. In silicon they would be sized buffer chains matched to the
data path.

## Interfaces of the top (`async_fir_system`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | timer clock (period T_C); asynchronous active-low reset |
| `vin` | in | analog input, `ain_t` (13-bit signed, q = 16) |
| `coef_we`, `coef_addr`, `coef_ah`, `coef_dth` | in | write response segment j |
| `out_req`, `out_ack`, `out_data` | out/in/out | filter output, 2-phase; `out_data` = `{o, dt}` |
| `adc_req`, `adc_ack`, `adc_data`, `adc_level`, `adc_stalled` | out | converter sample channel and state, for observation |
| `fir_busy` | out | a convolution is running |

Parameters: `NX` (history length, 16), `NH` (response segments, 16),
`T_SAMPLE` (default response interval, 4), `N_STAGES` (micropipeline depth,
3). The widths `M`, `FRAC`, `DT_W`, `H_W` and the derived `PROD_W` and `ACC_W`
are in `fir_pkg`. `NX` and `NH` must be at least 2.

## Departures and choices

The published description gives the architecture and the block functions but
no sizes, encodings or control timing. Everything below is this design's own
choice.

* **A clocked filter loop.** The filter's inner loop runs one step per cycle
  of the timer clock. It is not self-timed, because no matched delays or
  completion detection were specified for it. The filter's ports are still
  handshakes, and it does nothing between samples. The clockless micropipeline
  is used for the channel into the filter.
* All sizes: M = 8, 16-bit intervals, 8-bit response amplitudes, 16 + 16
  segments, 3 pipeline stages.
* Order-0 segments are taken to extend backwards from their own sample. Sample
  `k` is held over the interval `dtx_{n−k}` that precedes it.
* A convolution stops at the end of the response or of the stored history,
  whichever comes first. If the history is shorter than the response, the
  older part of the integral is lost. Make `NX` large enough for the sample
  density you expect over one response length.
* The DAC's own request/acknowledge is replaced by its settling time, which is
  shorter than the counter's handshake. The timer restarts on the counter's
  sample event.
* Reset values, saturation of the level and the timer, the stall rule of the
  converter, and the response load port are all additions.

## Simulating

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. Delays are in ns, so
compile with a 1 ns time unit. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
  rtl/fir_pkg.sv tb/tb_async_fir_system.sv --top-module tb_async_fir_system -o sim
./obj_dir/sim
```

`tb_async_fir_system` runs the whole chain at the default sizes. It loads a
random irregular response and drives ramps and rests. It checks every converter
sample (one level per sample, `dt` equal to the elapsed cycles). It checks
every filter output against a reference that integrates the two
piecewise-constant signals one timer period at a time, which shares nothing
with the breakpoint walk. It also requires each mechanism to occur at least
once:

* crossings upwards and downwards
* silence while the input rests
* several words queued in the micropipeline
* converter stalls
* output back-pressure
* convolutions ending on the response and on the history

It finishes in a few seconds. `tb_fir_filter` does the same for the filter
alone. It also checks the S + 2 cycle count. Each remaining block has its own
testbench named `tb_<module>`.

## How far to trust it

* The synthesizable blocks lint with warnings only about the intended latches
  and about signals used both as asynchronous resets or handshake inputs and in
  clocked logic. They are checked against independent models.
* The asynchronous parts (C-element, latch stage, micropipeline) are verified
  only in event-driven simulation with the delays given here. Their
  correctness in silicon rests on the delay assumptions listed above.
* The converter's analog front end exists only as behavioural models. Its
  loop speed in this design is set by the synchronizers, not by the analog
  delay.
