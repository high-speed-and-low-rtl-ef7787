# Significance-driven shift-and-add multiplier, neural accelerator and four-tap FIR filter

A multiplier that adds shifted copies of its operand, one per **set** bit of
the coefficient, taken from the most significant bit down. Two things follow
from that order:

* a coefficient with few set bits gives a short multiply. Zero bits cost
  neither a cycle nor an adder toggle.
* stopping early leaves out only the smallest partial products. One input,
  `prec`, sets the number of partial products per multiply. This trades
  accuracy against cycles and switching at run time, and needs no change to
  the hardware.

Two 8-bit uses of this multiplier are built on it, side by side in one top
(`simul_top`):

* **Neural accelerator** (`nn_accelerator`): four neurons. Each multiplies its
  "fuzzy weight" input by a coefficient taken from its own small memory, and
  adds the products into a 16-bit weighted sum.
* **Four-tap FIR filter** (`fir4`): `y[n] = sum_k h[k] * x[n-k]`, with one
  shift-and-add multiplier per tap.

All arithmetic is unsigned. With `prec >= 8` every result is exact.

## The multiplier (`simul_mult`)

```
           a ──► [ B ] ──► SHIFTER ──► ADDER ──► [ Z1 ] ──┬──► p
                              ▲          ▲                │
 coef ──► [ SREG ] ──► sequencer (S1)    └────────────────┘
                        │
                        └─ counter of partial products, limit = prec
```

| part | what it is |
|---|---|
| `B` | register that holds the multiplicand |
| `SREG` | register with the coefficient bits not used yet |
| sequencer | priority encoder: finds the highest remaining set bit of `SREG` and gives its position `S1` |
| shifter | computes `B << S1` |
| adder | computes `Z1 + (B << S1)` |
| `Z1` | product register; its output feeds back into the adder |
| counter | counts the partial products added so far |

Each busy cycle the unit does three things at once:

1. it adds `B << S1` into `Z1`;
2. it clears bit `S1` in `SREG`;
3. it increments the counter.

The unit stops when `SREG` is empty or the counter reaches `prec`. In the
cycle of its last add, it loads the sum into `p` and pulses `done`.

Timing:

* `start` samples `a`, `coef` and `prec` when `busy` is low, or in the cycle
  where `done` is high, so products can run back to back.
* The latency from `start` to `done` is `max(1, min(popcount(coef), prec))`
  cycles.
* `terms` gives the number of partial products behind the last `p`.
* With reduced precision, `p = a * c'`. Here `c'` is `coef` with all but its
  `prec` most significant set bits cleared.
  * Example: `coef = 0b1011_0001` and `prec = 2` give `p = a * 0b1010_0000`
    in 2 cycles, not 4.

The main cost is the sequencer, which is a priority encoder over 8 bits, plus
a barrel shift of 8 bits. The datapath holds one 16-bit adder.

## Coefficient memory and the operand path (`coef_mem`, `main_multiplier`)

`coef_mem` has 2^ADDR_W words of 8 bits, with 8 words by default:

* Reads are registered: `rd_data` is valid one cycle after `rd_en`.
* It has a write port.
* At power-up, word `a` holds `a + 1`. This table reproduces the coefficients
  seen in the design's reference runs: address 0 holds 1, address 1 holds 2,
  and addresses 1 to 4 hold 2 to 5.
* The contents are set by an `initial` loop, as on an FPGA. Reset does not
  change them.

`main_multiplier` computes `P = X * Y` from three parts:

* `M0`: input register that captures `b`, and drives output `x`;
* `M1`: the coefficient memory, read at `add0`, which drives output `y`;
* the shift-and-add unit, which produces `p`.

Its sequence is idle, then fetch, then multiply. While `read` is high, it
repeats this with the current `b` and `add0`:

* from acceptance to `p_valid` takes `2 + max(1, min(popcount(y), prec))`
  cycles;
* consecutive results are one cycle further apart than that.

## Neurons and the accelerator (`ann_neuron`, `nn_accelerator`)

`ann_neuron` computes a neuron `g = f(sum_i x_i * w_i + w0)`. It is a
multiply-accumulate unit built on `main_multiplier`:

* `x_i` is the fuzzy weight input, and `w_i` is the coefficient at `addr`.
* While `en` is high, each finished product is added into `ann_out`, and
  `out_valid` is high for that cycle.
* `clr` starts a new sum by loading the bias `w0` from the `bias` input.
  Reset clears the sum to zero.
* The accumulator is 16 bits, read as two's complement, and wraps on
  overflow.
* `act` is the sign activation `f`: 1 (for +1) while `ann_out >= 0`, and
  0 (for -1) while the sum is negative.

`nn_accelerator` places four neurons next to each other:

* Each neuron has its own weight, address and output.
* Each neuron has its own bias, and its own activation bit in `act`.
* All neurons share `en`, `clr` and `prec`.
* A coefficient write goes to every neuron whose bit is set in `wr_en`.

Example: hold weights 1, 2, 3 and 4 at addresses 1, 2, 3 and 4.

* The outputs step by 2, 6, 12 and 20.
* After ten results they read 20, 60, 120 and 200.

The neurons work independently, so a neuron whose coefficient has fewer set
bits produces its results faster.

## FIR filter (`fir4`)

`fir4` is a direct-form filter:

* A delay line holds `x[n] .. x[n-3]`. It is zero after reset.
* The coefficients `h[0..3]` sit in a register file. They reset to
  1, 2, 3, 4 and are written through `coef_we`, `coef_addr` and `coef_data`.
* An accepted sample (`in_valid && in_ready`) shifts the delay line and
  starts all four tap multipliers together.
* When the slowest tap is done, the four products are summed into the 18-bit
  `y_out`, and `out_valid` pulses.
* From acceptance to `out_valid` takes `1 + max_k max(1, min(popcount(h[k]), prec))`
  cycles.
* Only one sample is in flight: `in_ready` is low until the output appears.
* `max_terms` reports the iteration count of the slowest tap.

## Top level (`simul_top`)

The accelerator's ports carry the prefix `nn_`, and the filter's ports carry
`fir_`. The two parts share only `clk` and the active-high asynchronous `rst`.
All ports are plain vectors or unpacked arrays.

| parameter | default | meaning |
|---|---|---|
| `N_NEURONS` | 4 | neurons |
| `TAPS` | 4 | filter taps |
| `DATA_W_P` | 8 | operand and coefficient width |
| `ADDR_W_P` | 3 | coefficient memory address width |
| `ACC_W_P` | 16 | neuron accumulator width |

`prec` inputs are `$clog2(DATA_W_P+1)` bits wide. A value of `DATA_W_P` or
more gives exact products.

## How much of this comes from the source design

These parts follow the design:

* the block set of the multiplier (register, shift register, adder
  sequencer, shifter, adder, feedback register, counter);
* most-significant-first iteration with run-time precision control;
* the coefficient memory;
* the operand, coefficient and product names `B`/`X`, `Y` and `P`;
* four neurons that multiply a fuzzy weight by a stored coefficient and
  accumulate, with a bias and a sign activation;
* 8-bit operands, four taps, a 16-bit accumulator, and an active-high reset.

These parts are this implementation's own choices:

* skipping zero bits, one partial product per cycle, and the `prec`
  encoding;
* the read latency and write port of the memory, and its power-up table.
  The table was chosen to reproduce the reference values;
* every handshake, loading the bias through `clr`, the two's complement
  reading of the sum, and wrap-around on overflow;
* the whole structure of the FIR filter. The source names a four-tap filter
  with 8-bit multipliers, but does not describe its structure;

Known differences from the source:

* The source mentions storing "one 20-bit entry per coefficient" but gives
  no layout. Its simulations show 8-bit coefficient words, and this design
  stores those.
* In the source's simulations, results appear every clock cycle. Here a
  product takes 1 to 8 cycles plus a fixed overhead. The values match the
  reference runs, but the timing does not.
* The source draws each neuron with a weight buffer, an input buffer, an
  output buffer and a controller, but gives none of their sizes. Here they
  shrink to single registers (the multiplier's input register and
  `ann_out`) and the multiplier's small sequencer.
* A global fuzzy weight store above the neurons is named but not described.
  The weights therefore enter as ports.
* The source gives FPGA results (a Spartan-3 device). They cannot be compared
  directly with a generic synthesis of this RTL.

## Verification

Each module has a self-checking testbench in `tb/` that compares results with
a reference model written in the testbench itself:

* `simul_mult_tb`: every one of the 65 536 pairs of 8-bit operands at full
  precision, plus random reduced-precision cases. Checks latency and term
  count, back-to-back starts, and reset during a multiply.
* `coef_mem_tb`: power-up table, read latency, hold, writes, and a read
  during a write.
* `main_multiplier_tb`: the reference values (2×1 = 2 and 7×2 = 14), then
  random operations with coefficient rewrites. Checks the cycle count
  between results.
* `ann_neuron_tb`, `nn_accelerator_tb`: the reference accumulation sequences,
  random segments, bias loads, the sign activation, masked writes and
  wrap-around.
* `fir4_tb`: impulse response, a random stream with coefficient writes and
  reduced precision, full-scale output, latency and `in_ready`.
* `simul_top_tb`: the whole design at its default parameters, with both
  parts running at the same time. It counts these mechanisms and fails if
  any of them never happens:
  * a zero bit skipped;
  * a precision-truncated product;
  * a coefficient write in each unit;
  * an accumulator clear that loads a bias;
  * an accumulator wrap;
  * a negative activation;
  * filter back-pressure;
  * both units busy at once.

Every testbench prints one line, `TB_RESULT checks=N failures=M`. A watchdog
stops a testbench that hangs.

Simulation with Verilator 5, for example for the top:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/simul_pkg.sv tb/simul_top_tb.sv --top-module simul_top_tb
./obj_dir/Vsimul_top_tb
```

Each testbench finishes in well under a second. Lint:
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/simul_pkg.sv rtl/simul_top.sv`.
The RTL lints with one kind of warning, `SYNCASYNCNET`: the assertions use
the asynchronous reset in `disable iff`. The testbenches pass narrow signals
to 32-bit check functions, which Verilator reports as width warnings. For
this reason the build command carries `-Wno-fatal`.

## Changing it

* Operand width: `DATA_W_P` (or `A_W`/`C_W` on `simul_mult`). Latency grows
  with the number of set coefficient bits, at most the width.
* Memory depth: `ADDR_W_P`.
* Neuron and tap counts: `N_NEURONS`, `TAPS`. The filter's `coef_addr` is
  `$clog2(TAPS)` bits, so keep `TAPS` a power of two.
* For signed data, a sign-magnitude wrapper around `simul_mult` is the least
  intrusive change. The sequencer relies on unsigned coefficients.
