# Five 64-bit shift-register sequence generators, side by side

A linear feedback shift register (LFSR) is the cheapest way to make a long
pseudo-random bit sequence in hardware: a row of flip-flops that shifts once per
clock, plus a little XOR logic that computes the bit shifted in. How that
feedback is arranged decides the speed, the size and the quality of the
sequence. This RTL puts five arrangements of the same 64-bit register next to
each other so that they can be compared on one device:

| generator        | module           | shift toward | feedback                                                    |
|------------------|------------------|--------------|-------------------------------------------------------------|
| Fibonacci        | `fibonacci_lfsr` | bit 0        | XOR tree over tap bits 0, 1, 3, 4 → bit 63                 |
| Galois           | `galois_lfsr`    | bit 0        | bit 0 → bit 63, and XORed into bits 62, 60, 59             |
| non-linear       | `nlfsr`          | bit 0        | s[0] ^ (s[2] & s[7]) ^ (s[13] & s[41]) → bit 63             |
| modular          | `modular_lfsr`   | bit 63       | f = (s[63] + s[62]) mod 2 → bit 0, XORed into bits 16, 59  |
| masked           | `masked_lfsr`    | bit 0        | Fibonacci taps on a register that holds state ^ MASK       |

`lfsr_compare_top` instantiates all five with a shared clock, reset, start and
seed and brings every output out on its own port.

## Common behaviour

Every generator has the same interface and the same timing:

| port           | dir | width | meaning                                                      |
|----------------|-----|-------|--------------------------------------------------------------|
| `clk`          | in  | 1     | rising-edge clock                                            |
| `reset`        | in  | 1     | synchronous, active high: load `initial_seed`                |
| `start`        | in  | 1     | high: one step per clock; low: load `initial_seed`           |
| `initial_seed` | in  | 64    | starting state                                               |
| `lfsr_output`  | out | 64    | the register (masked for `masked_lfsr`)                      |

Each register bit has a two-way multiplexer in front of it: seed or next
state. `start` low selects the seed, so a generator that is not running sits on
its seed. There is no "hold" state. `reset` does the same as `start` low, so
that a running generator can be restarted from its seed without dropping
`start`. After the first rising edge with `start` high and `reset` low, the
output is the first new word. From then on there is one new 64-bit word per
clock, with no other latency. The serial bit stream is bit 0 of the word (bit
63 for the modular generator, whose bits move the other way).

The all-zero seed is a fixed point of every generator except the masked one
(whose fixed point is all-zero *true* state, i.e. output equal to the mask).
Load a nonzero seed.

## The feedback polynomial

The linear generators are built on x^64 + x^63 + x^61 + x^60 + 1, which is
primitive: from any nonzero seed the state runs through all 2^64 − 1 nonzero
values before it repeats.

* **Fibonacci** computes the new bit as the XOR of four state bits (0, 1, 3, 4)
  and shifts it in at bit 63. The four-input XOR sits on the critical path.
* **Galois** shifts bit 0 back in at bit 63 and also XORs it into the next
  value of bits 62, 60 and 59. Each of those bits sees only one two-input XOR,
  so this is the fastest form.
* **Masked** runs the Fibonacci recurrence, so its true state sequence is the
  Fibonacci one; see below.

The tap positions are parameters (`TAPS`, one bit per register bit), and so is
the register length (`WIDTH`). If you change `WIDTH`, give `TAPS` a primitive
polynomial of that degree. The period test bench uses 8-bit versions
(`8'h1D` Fibonacci, `8'h0E` Galois, `8'h0A` with `MOD_A = 7, MOD_B = 6`
modular).

## Modular generator

The modular generator keeps its feedback in a separate unit, `mod_2bit`. That
unit adds two one-bit operands and returns the sum modulo 2. This is the same
function as an XOR, but written as the arithmetic it stands for. Its result `f`
is shifted into bit 0 and XORed into bits 16 and 59. Changing the feedback
means changing or replacing `mod_2bit` and its operand parameters (`MOD_A`,
`MOD_B`). The shift register itself stays the same.

This configuration is linear, and its minimal polynomial is primitive of
degree 64, so it is also maximal-length. Of its structure, the unit with two
single-bit inputs, the shift toward bit 63 and the XOR in front of bit 59 follow
the reference design. The operands (bits 63 and 62) and the second XOR at bit
16 were chosen here so that the period is maximal. The reference design does
not state the unit's arithmetic. Modulo 2 is the simplest reading of a
"2-bit modular" unit that feeds a binary feedback path.

## Masked generator

The register never holds the true state *s*. It holds *m = s ^ MASK*, with
`MASK` a constant parameter (default `64'hA5C3_5A3C_96E1_69F0`). The feedback
XOR runs on masked bits, and the mask's contribution is removed with one
constant parity bit:

    fb      = ^(m & TAPS) ^ ^(MASK & TAPS)
    m_next  = {fb, m[63:1] ^ MASK[63:1]} ^ MASK

`initial_seed` is the true starting state. The register loads `seed ^ MASK`.
`lfsr_output` is `m`, so the output word is the Fibonacci sequence XOR the
mask.

A constant mask only keeps the true state off the wires of the output word. It
does not protect against power analysis by itself: that would need a mask
refreshed from a random source on every run, and the reference design
describes none. Synthesis folds a constant mask into inverters, so the masked
generator costs about as much as the Fibonacci one.

## Non-linear generator (NLFSR)

The new bit is `s[LIN_TAP] ^ (s[X1_A] & s[X1_B]) ^ (s[X2_A] & s[X2_B])`: two
AND gates and a three-input XOR, as in the reference design. The bits feeding
them are parameters. The defaults (0; 2, 7; 13, 41) were picked from a few
candidates because their bit streams passed frequency, runs and
autocorrelation screens for several seeds.

The AND terms make the recurrence non-linear. The measured linear complexity
of 512 output bits is 256, the value expected of a random sequence, against 64
for every linear generator. In other words, no 64-stage LFSR can reproduce it.
Two caveats are worth knowing before relying on it:

* the period is not known and depends on the seed; the all-zero state is a
  fixed point;
* the only linear term is a single bit, so whenever the two AND terms are
  equal (about 10 times in 16) the new bit equals the bit leaving the
  register. As a result, bits 64 places apart agree about 62% of the time
  instead of 50%. Adding further linear taps would remove that, but
  would depart from the three-input feedback this generator follows.

## Galois serial register

`galois_lfsr` has one extra flip-flop, `fb_out`. On every step it captures the
bit shifted out of bit 0, and it is cleared while the generator is loading. It
is the serial output taken through a dedicated register, one clock behind
`lfsr_output[0]`. The top brings it out as `galois_serial`. The reference
schematic shows this flip-flop with a clock enable, a clear and an inverter on
`start`. Its exact wiring is not documented, so the enable and clear used here
are a reading of it.

## Top level

`lfsr_compare_top` has no parameters. Inputs: `clk`, `reset`, `start`,
`initial_seed[63:0]`. Outputs: `fib_output`, `galois_output`,
`galois_serial`, `nlfsr_output`, `modular_output`, `masked_output`. The
reference design synthesises each generator on its own. The shared wrapper is
this RTL's own, so that all five can be driven with one stimulus. Synthesised,
the top is 321 flip-flops and a few dozen gates. It has no memories.

Shared constants (register length, default taps, default mask, the
load/step decode) live in `lfsr_pkg`. Each generator carries assertions:
a load leaves the seed in the register, and a linear generator never steps
from a nonzero state into zero. The Galois assertions also check the serial
register.

## Verification

Every testbench checks its unit against a reference model written
independently of the RTL, and prints `TB_RESULT checks=N failures=M`.

| testbench                 | what it shows                                                                 |
|---------------------------|-------------------------------------------------------------------------------|
| `tb_mod_2bit`             | all operand pairs of the modular unit                                         |
| `tb_fibonacci_lfsr` etc.  | 4 seeds × 1000 steps word by word; load, start-low, reset mid-run, latency    |
| `tb_lfsr_compare_top`     | all five generators, 3 seeds, ~12,000 steps, default parameters; counts loads, resets, serial ones, NLFSR AND terms, modular carry cases and masked words, and fails if any never occurs |
| `tb_period_workload`      | 8-bit versions of the four linear generators reach period 255, every word once |
| `tb_randomness_workload`  | 100,000 bits per generator: frequency, runs, autocorrelation (lags 1, 2, 8) at significance 0.001, and linear complexity (64 for linear, >64 for NLFSR) |

The statistical tests follow the definitions of NIST SP 800-22 but are not
the full suite, and the 64-bit period itself cannot be simulated. It rests on
the primitivity of the feedback polynomials and on the 8-bit period test.

Running a testbench with Verilator:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/lfsr_pkg.sv tb/tb_lfsr_compare_top.sv --top-module tb_lfsr_compare_top
    ./obj_dir/Vtb_lfsr_compare_top

Every testbench finishes in well under a second.

## Where this RTL departs from, or fills in, the reference design

* The reference design's schematics show only `initial_seed`, `start` and
  `clk` inputs. Its description adds a `reset` that reloads the seed, so a
  synchronous `reset` was added to every generator. The flip-flops in the
  schematics have an asynchronous clear whose source is not shown. This RTL
  has no asynchronous clear, because clearing the register would lock a
  linear generator at zero.
* The Fibonacci feedback in the reference schematic is an eight-input XOR
  whose source bits are not given. Four taps of a known primitive polynomial
  are used instead. An eight-tap primitive polynomial can be set through
  `TAPS`.
* The Galois XOR positions 62 and 60 are taken from the reference schematic,
  which shows further XOR gates below them. Placing the third at bit 59
  completes the primitive polynomial.
* The modular unit's arithmetic and operands, the NLFSR's tap bits, the mask
  value and the masking scheme are not specified by the reference design.
  They are choices of this RTL, described above.
* Nothing here models the board (LEDs, logic analyser) used to watch the
  outputs. All outputs are plain ports.
* Area, power, timing and throughput figures depend on the FPGA tool flow and
  are not part of this RTL.
