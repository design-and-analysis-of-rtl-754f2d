# Eight-tap linear-phase FIR filter from full-adder, array-multiplier and latch cells

This is a small direct-form FIR (finite impulse response) filter,

    y[n] = h[0]*x[n] + h[1]*x[n-1] + ... + h[7]*x[n-7],

built bottom-up from the same handful of cells a transistor-level designer
would draw: a one-bit full adder, a 4x4 array multiplier made of AND gates and
half/full adders, a transparent D latch, and an 8-bit carry-ripple adder. The
filter has eight taps, takes unsigned 4-bit samples and uses unsigned 4-bit
coefficients. Because it is meant for linear-phase responses, the coefficients
are symmetric (h[i] = h[7-i]): only four of them are stored and each is used
by two taps.

The RTL keeps the cell hierarchy on purpose. Every adder in the filter is a
chain of `full_adder` instances, every multiplier is the AND/HA/FA array, and
every sample register is a pair of latches per bit. It is therefore a good
model for studying or re-implementing the cells in a custom logic style (the
original target was Gate Diffusion Input, GDI, cells) while keeping a
bit-exact, simulatable reference of the whole filter.

## Structure

```
 x_in ──┬───────────────► [D] ──┬─────► [D] ──┬─ ... ─► [D] ──┐
        │                       │             │               │
  h0 ─►[×]                h1 ─►[×]      h2 ─►[×]        h7 ─►[×]
        │                       │             │               │
        └──────────────────────[+]───────────[+]─── ... ─────[+]──► y_out
                                                                   ovf
        tap 0               tap 1         tap 2           tap 7
```

| module | role |
|---|---|
| `fir8_top` | the filter: tap 0, seven `fir_tap`s, `coef_memory`, wrap flag |
| `fir_tap` | one tap: `unit_delay` → `array_multiplier` → `ripple_adder` |
| `coef_memory` | four 4-bit coefficient registers, mirrored onto eight taps |
| `unit_delay` | 4-bit z^-1 register, master-slave pair of `d_latch` per bit |
| `d_latch` | one-bit level-sensitive latch with Q and Q' |
| `array_multiplier` | M x N unsigned array multiplier (default 4 x 4) |
| `ripple_adder` | W-bit carry-ripple adder of `full_adder` cells (default 8) |
| `full_adder` | one-bit adder organised as generate/propagate, look-ahead carry, sum |
| `half_adder` | one-bit half adder used at the edges of the multiplier array |
| `fir_pkg` | default sizes and the coefficient mirroring function |

Tap 0 multiplies the incoming sample directly, with no delay and no adder; its
product starts the sum. Taps 1 to 7 each delay the sample one more clock,
multiply it by their coefficient and add the product to the running sum. An
order-7 filter thus has 8 multipliers, 7 delays and 7 adders.

## Number format and the 8-bit sum

Samples and coefficients are unsigned 4-bit integers (0..15). Each product is
8 bits. The sum chain is made of 8-bit adders, so **`y_out` is the filter
output modulo 256**. The largest possible output is 8 x 15 x 15 = 1800, which
needs 11 bits. To make the wrap visible, the carry out of every adder in the
chain is ORed into `ovf`. Because all operands are non-negative, `ovf` is 1
exactly when the true output is 256 or more.

Set `ACC_W` to 11 for an exact output at the default sizes (`ovf` then never
rises). For general sizes, `ACC_W >= DATA_W + COEF_W` is required; an exact
output needs `ACC_W >= clog2(TAPS*(2^DATA_W-1)*(2^COEF_W-1) + 1)`.

## Clocking and timing

There is a single clock, `clk`. Only two things hold state.

* **The delay line.** `unit_delay` is built from latches, not flip-flops.
  For each bit, a master latch is transparent while `clk` is low and a slave
  latch is transparent while `clk` is high. The result updates only on the
  rising edge: q takes the value d had just before the edge. Synthesis
  therefore reports 2 latch bits per delay bit (56 latch bits in the filter).
  These latches are intentional. If your flow prefers flip-flops, replace the
  body of `unit_delay` with an `always_ff @(posedge clk)` register; nothing
  else changes.
* **The coefficient store.** `coef_memory` holds four 4-bit registers,
  written one word per rising edge when `coef_we` is 1.

The filter output is combinational: `y_out` and `ovf` depend on `x_in` and
on the delay-line contents. Drive a new sample after a rising edge. Read
`y_out` once it has settled, before the next rising edge. That edge shifts the
sample into the delay line. One sample is processed per clock, and y[n] is
available in the same cycle as x[n]. An impulse applied in cycle 0 shows h[0]
in cycle 0, h[1] in cycle 1, and so on up to h[7] in cycle 7.

The critical path runs through one multiplier and then all seven 8-bit
adders of the chain. Add pipeline registers between the taps if you need a
higher clock rate; this changes the latency.

There is no reset. Load the coefficients first. Then clear the delay line by
shifting in 7 zero samples; the output is meaningful after that.

## Loading coefficients

| port | width | meaning |
|---|---|---|
| `coef_we` | 1 | write strobe, sampled on the rising edge |
| `coef_addr` | 2 | stored word 0..3 |
| `coef_wdata` | 4 | coefficient value |

Word k is used by taps k and 7-k, so word 0 is h[0] = h[7], word 3 is
h[3] = h[4]. A write takes effect at the edge, and the output of the next
cycle uses it. Coefficients can be rewritten while samples stream. An
assertion in `coef_memory` flags a write address beyond the stored words; it
can only fire when `TAPS/2` is not a power of two.

## The arithmetic cells

**Full adder.** The cell is split the way a fast full-adder cell is drawn:

* M1 forms the generate g = a&b, the propagate p = a|b and x = a^b.
* M2 is a one-stage carry look-ahead, cout = g | p&cin.
* M3 forms sum = x ^ cin.

Using a|b as the propagate term gives the same carry as the usual a^b.

**Array multiplier.** The M x N array uses M*N AND gates for the partial
products x[k]&y[j]. Row 0 is the partial product of y[0]. Each following row
adds the partial product of y[j] to the previous row shifted right by one
bit, with a carry rippling from the low end. The low cell of every row is a
half adder. So is the top cell of the first adder row, which has no carry
from above. The low bit of each row is a product bit, and the last row and
its carry give the top bits. For 4 x 4 this is 16 ANDs, 4 half adders and 8
full adders, with P0 = x0y0, P1..P3 from the low cells of rows 1..3,
P4..P6 from the rest of row 3, and P7 its carry. The longest path is about
((M-1)+(N-2)) carry delays + (N-1) sum delays + one AND delay.

**Ripple adder.** W full adders with the carry passed from bit k to bit
k+1. The carry in is a port, tied to 0 in the filter. The carry out feeds
`ovf`.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| `fir8_top` | `TAPS` | 8 | must be even (linear-phase storage) |
| | `DATA_W` | 4 | sample width |
| | `COEF_W` | 4 | coefficient width |
| | `ACC_W` | 8 | sum width; 11 gives an exact output at the defaults |
| `array_multiplier` | `M`, `N` | 4, 4 | both at least 2 |
| `ripple_adder`, `unit_delay` | `W` | 8, 4 | |

The width of `coef_addr` follows from `TAPS` (clog2 of `TAPS/2`).

## Where this RTL makes its own choices

* **Output width.** The design calls for 8-bit adders. They are kept, which
  makes the output wrap (see above). The `ovf` flag is an addition.
* **Delay register.** The sample delay is described both as a D latch and as
  a register that updates only on the 0-to-1 clock transition. It is built as
  a master-slave latch pair, which satisfies both.
* **Coefficient store.** Four 4-bit coefficients are kept (16 bits of
  storage). The description also mentions "an 8-bit register", which does not
  match four 4-bit values. The write port is an addition, since no loading
  mechanism is described.
* **Separate stores.** Samples and coefficients are kept separately, in the
  delay line and the coefficient store, as the block diagram shows.
* **No pipeline.** The taps have no pipeline registers, the output has no
  register, and nothing has a reset.
* **Logic only.** The GDI transistor circuits, their output buffers, and all
  delay, power and area figures have no RTL counterpart. The cells are
  described by their logic functions.

## Verification

Every module has a self-checking testbench in `tb/`, named `<module>_tb`:

* `full_adder_tb`: all 8 input combinations.
* `ripple_adder_tb`: corner cases and 3000 random additions at 8 bits, plus
  an exhaustive 3-bit instance.
* `array_multiplier_tb`: all 256 operand pairs for 4 x 4 and for 5 x 3.
* `d_latch_tb`: transparency while enabled, hold while disabled.
* `unit_delay_tb`: one clock of latency. Changes of d in either clock phase
  must not reach q.
* `coef_memory_tb`: random writes. Checks the mirroring onto all eight taps
  and that a write shows only after the edge.
* `fir_tap_tb`: the delay, and sum = sum_in + delayed sample * coefficient,
  checked before and after each edge.
* `fir8_top_tb`: the whole filter at its default sizes against a reference
  model. It loads coefficients, clears the delay line, checks the impulse
  response h[0..7] cycle by cycle, streams 3000 random samples with
  coefficient rewrites, and forces the sum to wrap. It counts coefficient
  writes, mirrored taps, shifts, wrapped and unwrapped outputs, and fails if
  any of them never happened.
* `fir8_top_wide_tb`: the filter with `ACC_W = 11`. Checks exact outputs up
  to the full-scale 1800.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/fir_pkg.sv \
          tb/fir8_top_tb.sv --top-module fir8_top_tb -o sim
./obj_dir/sim
```

Replace `fir8_top_tb` with any other testbench name. The testbenches set
every signal they read, so a two-state simulator with random initial values
works. For lint, run `verilator --lint-only -Wall -y rtl rtl/fir_pkg.sv
rtl/fir8_top.sv`. The remaining warnings are harmless:

* an unused constant-zero input of the first multiplier row;
* the unconnected Q' outputs of the latches;
* a note that Verilator models the clock-enabled latches of `unit_delay`
  without a latch of its own.
