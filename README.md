# Reduced-multiplier concurrent FIR filter

A fully parallel N-tap FIR filter needs N multipliers and produces one output
per clock. A filter with a single multiply-accumulate unit needs only one
multiplier, but takes N clocks per output. This design sits between the two.
It evaluates a 12-tap FIR filter with **6 multipliers** and produces **one
output every 3 clocks**. That rate does not depend on the number of taps.

It relies on one property of linear-phase filters, for example those designed
with a Hamming window: their coefficients are symmetric,
`h[k] == h[N-1-k]`. Each multiplier therefore serves two taps that share one
coefficient. The multiplier handles one tap in one clock and the other tap in
the next. A small adder tree and an accumulator combine the two halves.

```
            x_in
             |
   +----+  +----+  +----+         +----+
   | R1 |->| R2 |->| R3 |-> ... ->| R12|     delay line (rmc_delay_line)
   +----+  +----+  +----+         +----+
      \      \   pair k = {tap k, tap 11-k}  /
       [2:1] [2:1] [2:1] [2:1] [2:1] [2:1]   <- sel (rmc_tap_mux)
         |     |     |     |     |     |
        *b0   *b1   *b2   *b3   *b4   *b5    multipliers (rmc_mult_bank)
          \   /       \   /       \   /
           (+)         (+)         (+)       adder tree (rmc_adder_tree)
              \       /            |
                (+)               /
                    \            /
                        (+)
                         |
                   accumulator  <-+          (rmc_accumulator)
                         |--------+
                   output register -> y_op
                                             control: rmc_fsm (3 states)
```

## How the taps are split: odd and even registers

Number the delay registers from 1. Register 1 holds the newest sample, so
register `r` holds `x(n-r+1)` and carries coefficient `h[r-1]`. Split them
into two sets:

* the **odd** set: registers 1, 3, 5, 7, 9, 11 (taps 0, 2, 4, 6, 8, 10);
* the **even** set: registers 2, 4, 6, 8, 10, 12 (taps 1, 3, 5, 7, 9, 11).

Take a symmetric pair `{k, 11-k}`. Since 11 is odd, the two tap indices have
opposite parity. So every pair has exactly one member in each set. Multiplier
`k` takes coefficient `b_k = h[k] = h[11-k]`. Its 2:1 multiplexer picks
whichever member of pair `k` is in the set being processed:

| multiplier | coefficient | odd pass (sel = 0) | even pass (sel = 1) |
|-----------:|:-----------:|:------------------:|:-------------------:|
| 0 | b0 = h0 = h11 | register 1 (tap 0)   | register 12 (tap 11) |
| 1 | b1 = h1 = h10 | register 11 (tap 10) | register 2 (tap 1)   |
| 2 | b2 = h2 = h9  | register 3 (tap 2)   | register 10 (tap 9)  |
| 3 | b3 = h3 = h8  | register 9 (tap 8)   | register 4 (tap 3)   |
| 4 | b4 = h4 = h7  | register 5 (tap 4)   | register 8 (tap 7)   |
| 5 | b5 = h5 = h6  | register 7 (tap 6)   | register 6 (tap 5)   |

Over the two passes every register is multiplied exactly once, by its own
coefficient. The sum of the two pass results is the full convolution
`y(n) = sum_k h[k] x(n-k)`. The coefficients never change between passes;
only the multiplexers switch.

This only works when the tap count is even and the coefficients are
symmetric. `rmc_tap_mux` refuses an odd `TAPS` at elaboration. Nothing checks
symmetry, because the hardware only stores half the coefficients: `coef[k]`
*is* both `h[k]` and `h[TAPS-1-k]`.

## The three-state sequence

`rmc_fsm` cycles through three states, one clock each:

| state | what happens in the cycle | at the closing clock edge |
|-------|---------------------------|---------------------------|
| `ST_LOAD_ODD` | the delay line holds the new sample; the odd set goes through the multipliers and the tree | `acc <= acc + odd_sum` (acc is 0 here) |
| `ST_EVEN` | the even set goes through the same multipliers and tree | `acc <= acc + even_sum` |
| `ST_OUT` | `x_take` is high | `y_op <= acc`, `acc <= 0`, next sample shifted into the delay line |

Each pass is one combinational path within a single clock: multiplexer,
multiplier, adder tree, then the accumulator adder. The same three states
serve any even `TAPS`. A larger filter only adds multipliers, a deeper adder
tree and a longer clock period.

### Timing at the ports

| cycle after reset | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|---|
| state | OUT | ODD | EVEN | OUT | ODD | EVEN | OUT |
| `x_take` | 1 | 0 | 0 | 1 | 0 | 0 | 1 |
| sample taken at the end of the cycle | x0 | | | x1 | | | x2 |
| `y_valid` | 0 | 1 | 0 | 0 | 1 | 0 | 0 |
| `y_op` | 0 | 0 (empty history) | | | y(x0) | | |

* `x_in` is sampled at the rising edge that ends a cycle with `x_take` high.
  That happens every third clock.
* The result for the window that ends with that sample is loaded into `y_op`
  three edges later. This is the same edge that takes the next sample.
  `y_valid` is high for the one cycle that follows the load.
* `y_op` holds its value for the two clocks in between.
* Reset (`rst`, synchronous, active high) clears the delay line, the
  accumulator and the output, and enters `ST_OUT`. The first clock edge after
  reset therefore takes a sample and loads the result of an all-zero history.
  The first `y_valid` pulse carries 0.

The filter runs freely. There is no input handshake, so the source must
present a new sample every third clock (or watch `x_take`).

## Number formats

| quantity | width (default) | format |
|----------|-----------------|--------|
| `x_in` | `DATA_W` = 8 | signed two's complement |
| `coef[k]` | `COEF_W` = 8 | signed two's complement |
| products | 16 | exact |
| adder-tree sum | 19 | exact (6 products) |
| accumulator | 20 | exact (12 products) |
| `y_op` | `OUT_W` = 18 | low 18 bits of the accumulator |

The 8-bit input and 18-bit output are the widths of the reference design. A
worst-case 12-tap result with 8-bit operands needs 20 bits. `y_op`
therefore **wraps** (keeps the low 18 bits) when the true result leaves the
range -131072 .. 131071. It is always exact if the absolute values of the
12 coefficients sum to less than 1024. That holds for a low-pass filter
scaled to a peak of 127. To get exact output for any coefficients, set
`OUT_W` to 20.

## Modules

| file | role |
|------|------|
| `rtl/rmc_pkg.sv` | default sizes, controller state enum, select encoding |
| `rtl/rmc_fir.sv` | top level; wires the blocks below |
| `rtl/rmc_fsm.sv` | three-state controller |
| `rtl/rmc_delay_line.sv` | `TAPS` sample registers with a shift enable |
| `rtl/rmc_tap_mux.sv` | `TAPS/2` 2:1 multiplexers (pairing as in the table above) |
| `rtl/rmc_mult_bank.sv` | `TAPS/2` signed multipliers |
| `rtl/rmc_adder_tree.sv` | binary adder tree; with 6 inputs: 3 adders, then 1, then 1 |
| `rtl/rmc_accumulator.sv` | accumulator and load-and-hold output register |

Top-level parameters: `TAPS` (12, must be even), `DATA_W` (8), `COEF_W` (8),
`OUT_W` (18). Ports: `clk`, `rst`, `x_in`, `coef[TAPS/2]`, `x_take`,
`y_op`, `y_valid`.

The coefficients are input ports, so they can be changed at run time. Hold
them steady while a result is being computed (from the sample edge to the
load three clocks later). Otherwise that one result mixes old and new
coefficients.

## What follows the reference design and what does not

Taken from the reference design:
* the odd/even split, the symmetric pairing and the reuse of each of the 6
  multipliers twice;
* the adder-tree shape;
* the accumulator with feedback, and the output register that loads and then
  holds;
* the three controller states and their order;
* the 3 clocks per output;
* the 12 taps, the 8-bit input and the 18-bit output.

Choices made here, where the reference is silent:
* the coefficient width (8 bits);
* signed arithmetic throughout;
* coefficients as input ports. The reference computed its coefficient set
  offline (a 1 kHz Hamming-window low-pass) and does not list the values,
  nor the sample rate;
* wrap-around rather than saturation at the 18-bit output;
* reset behaviour and the reset state;
* the `x_take` and `y_valid` strobes;
* shifting the delay line on the edge that enters the odd state, so that the
  odd pass already uses the new sample.

The reference describes the final addition in two places: once as part of the
even pass, and once in the output state. Here the even pass adds into the
accumulator and the output state only copies and clears it. The result is the
same.

Not reproduced: the FPGA figures the reference reports, namely path delay,
maximum clock frequency and slice/LUT counts on a Spartan-3E. They belong to
a particular synthesis flow and device.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_rmc_fir`: the whole filter at its default sizes. It runs four cases:
  * a 12-tap Hamming-window low-pass (1 kHz cut-off at an assumed 8 kHz
    sample rate, computed in the testbench and scaled to 8 bits), driven
    with a ramp;
  * an impulse, which must return `b0..b5, b5..b0`;
  * random coefficient sets with random samples;
  * full-scale coefficients and samples, so results wrap past 18 bits.

  Every output is compared with a direct convolution. The testbench also
  checks:
  * one sample and one result every 3 clocks;
  * a result appearing 3 clocks after its sample;
  * `y_op` holding between updates.

  It counts odd passes, even passes, output loads, hold cycles and wrapped
  results, and fails if any count is zero.
* `tb_rmc_fir_lowpass`: the filter used as the 1 kHz low-pass it is meant
  for. The testbench designs the coefficients itself: a Hamming window at an
  assumed 8 kHz sample rate, which gives `b0..b5 = -1, -1, 6, 38, 88, 127`.
  It applies a constant, a 250 Hz sine and a 3 kHz sine, each with
  amplitude 100. It measures the output amplitude at each frequency and
  compares it with the gain worked out from the coefficients. With this set
  the 250 Hz tone passes at about 495 times the input amplitude; the 3 kHz
  tone comes out at about 0.86 times.
* `tb_rmc_delay_line`, `tb_rmc_tap_mux`, `tb_rmc_mult_bank`,
  `tb_rmc_adder_tree` (6 and 5 inputs), `tb_rmc_accumulator`, `tb_rmc_fsm`:
  unit tests against independent models.

Each testbench was also run against a deliberately broken copy of its module,
and each one reported failures.

## Simulating

With Verilator 5:

```
verilator --binary --timing -y rtl -y tb rtl/rmc_pkg.sv tb/tb_rmc_fir.sv \
    --top-module tb_rmc_fir
./obj_dir/Vtb_rmc_fir
```

`-y rtl -y tb` lets Verilator find each module in the file of the same name;
only the package has to be named first. Replace `tb_rmc_fir` with any other
testbench name to run a unit test. Lint with
`verilator --lint-only -Wall -y rtl rtl/rmc_pkg.sv rtl/rmc_fir.sv --top-module rmc_fir`.
The top lints clean. A single module linted on its own draws warnings only
for package constants it does not use.

## Changing it

* **More taps:** set `TAPS` to any even number. The multiplier count follows
  (`TAPS/2`), the adder tree deepens on its own, and the controller stays at
  three states. The critical path grows by one adder level each time the
  multiplier count doubles.
* **Wider data:** `DATA_W` and `COEF_W` widen the multipliers. The tree and
  accumulator widths follow. Set `OUT_W` to
  `DATA_W + COEF_W + clog2(TAPS/2) + 1` for exact results.
* **Pipelining:** each pass is a single combinational path. To raise the
  clock rate, the controller sequence would have to change, because the
  accumulator expects each pass sum in the same cycle that the multiplexers
  select it.
