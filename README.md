# Third-order CIC decimator: 5-bit input, decimation by 8, 14-bit datapath

A cascaded integrator-comb (CIC) filter lowers a signal's sample rate and filters out what
would alias, using no multipliers and no coefficient memory: only adders and registers. This
design takes a 5-bit sample on every edge of a 10 MHz clock and gives a 14-bit output at
1.25 MHz, one eighth of the rate. Three integrators run at the input rate. A hold latch takes
every eighth value of the last integrator. Three differentiators ("combs") run at the output
rate and take successive differences of the held values.

```
x_in ─► I ─► I ─► I ─► L ─► D ─► D ─► D ─► y_out
        10 MHz         │    1.25 MHz
                     pulse (50 ns every 800 ns)

I : y(n) = x(n) + y(n-1)          (adder + feedback register)
L : transparent while pulse high  (14-bit D latch)
D : y(m) = x(m) - x(m-1)          (delay register, inverter, adder with carry-in 1, output register)
```

Everything below the level of these stages is built explicitly, as in the original
gate-level design: the adders are ripple chains of one-bit full adders, and subtraction is
done by an inverter plus a carry-in of 1.

## What the filter computes

At the input rate, three integrators followed by three differentiators over the 8-sample
decimation span are equal to three cascaded 8-sample moving sums. The impulse response is
their triple convolution: 22 taps, symmetric, summing to 8³ = 512.

```
h = 1, 3, 6, 10, 15, 21, 28, 36, 42, 46, 48, 48, 46, 42, 36, 28, 21, 15, 10, 6, 3, 1
```

The decimated output is this convolution sampled once every 8 inputs. Each output therefore
sees only every eighth tap of `h`. Which taps depends on where an impulse falls against the
divide-by-8 counter. One alignment gives the outputs 3, 46, 15, 0 (taps 1, 9, 17, 25).
Whatever the alignment, the outputs of one impulse sum to 64. A constant input `c` settles at
`512·c`.

## Why 14 bits are enough even though the integrators overflow

A CIC filter grows its word by N·log2(R) bits, where N is the number of stages and R the
decimation ratio: 3·3 = 9 bits here. So 5 + 9 = 14. The largest output, 31·512 = 15872, fits
in 14 bits (limit 16383).

The integrators do not fit. After a single impulse the third integrator counts
1, 3, 6, 10, … and passes 2¹⁴ after about 180 clocks. With ordinary input it wraps all the
time. This is harmless and is in fact required. All arithmetic is modulo 2¹⁴. The
differentiators subtract values that wrapped the same number of times, so the wraps cancel,
and the output is exact whenever the true result fits in 14 bits.

For this to work, nothing may saturate or flag overflow. The carry out of every adder is left
unconnected. Tying it to 0 or 1 (for example, grounding it in the differentiator) corrupts the
count as soon as a value reaches 2¹⁴−1.

The worked impulse shows stage by stage how the latched values keep growing while the output
settles. Each row is one decimated period:

| period | latch (3rd integrator) | differentiator 1 | differentiator 2 | differentiator 3 = y_out |
|-------:|-----------------------:|-----------------:|-----------------:|-------------------------:|
| 1      | 3                      | 3                | 0                | 0                        |
| 2      | 55                     | 52               | 3                | 0                        |
| 3      | 171                    | 116              | 49               | 3                        |
| 4      | 351                    | 180              | 64               | 46                       |
| 5      | 595                    | 244              | 64               | 15                       |
| 6      | 903                    | 308              | 64               | 0                        |

Each differentiator has an output register, so each stage adds one decimated period of delay.
That is why the first differentiator's 3 reaches the output two periods later.

## Clocking: one clock, an enable, and a half-cycle latch pulse

Everything runs on the rising edge of a single clock `clk` (10 MHz, 100 ns period). The
decimated rate is produced by the clock block (`cic_clocks`):

* A free-running 4-bit counter. Its bit 2 is `dec_clk`: four cycles low, four high, an 800 ns
  period (1.25 MHz).
* A pulse sequencer. It registers `dec_clk` and detects its rising edge. `dec_en` is high for
  the first `clk` cycle in which `dec_clk` is high: one cycle in eight. `pulse` is `dec_en`
  ANDed with the *low half* of `clk`, so it is 50 ns wide every 800 ns (6.25 % duty).

```
clk      _/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_
count     2 | 3 | 4 | 5 | 6 | 7 | 8 ...
dec_clk  _________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾ ...
dec_en   _________/‾‾‾\____________
pulse    ___________/‾\____________
                      ▲ latch closes, comb stages load (same rising edge)
```

Why the latch pulse uses the low half of `clk`:

* The integrators change only at rising edges, so by the low half their output has settled.
  The latch is transparent then and closes at the next rising edge, before the integrators
  move on.
* `dec_en` changes only just after a rising edge, while `clk` is high. So the AND cannot
  glitch.

At that same rising edge the three comb stages load, with `dec_en` as their clock enable. The
first stage takes the latch output, which holds that value for the next 8 clocks.

The gating of `clk` into `pulse` is deliberate. It is the one place where the clock is used as
data.

### Latency and output timing

* `y_out` changes at the rising edge that ends each pulse. `y_valid` is high for the clock
  cycle after that edge.
* Number the rising edges of `clk`, and let `x(n)` be the sample taken at edge n. The value
  `y_out` takes at edge E is

  `y_out(E) = Σ_{k=0..21} h[k] · x(E − 19 − k)   (mod 2¹⁴)`

  So the newest sample that reaches an output was taken 19 clocks before it.
* The 19 clocks come from two sources. The register chain up to the first comb stage
  accounts for 3 of them. The second and third comb stages add 8 each.

## Modules

| module | what it is |
|---|---|
| `cic_filter` | top: the stage chain, the clock block, `y_valid` |
| `cic_clocks` | 4-bit counter and pulse sequencer: `dec_clk`, `dec_en`, `pulse` and complements |
| `cic_counter` | free-running up counter (the divider) |
| `cic_pulse_seq` | rising-edge detect of `dec_clk`, half-cycle latch pulse |
| `cic_integrator` | ripple adder + register with feedback |
| `cic_differentiator` | delay register, inverter, ripple adder (carry-in 1), output register; all registers enabled by `dec_en` |
| `cic_dlatch` | 14-bit level-sensitive latch with clear |
| `cic_dff` | 14-bit register with enable and asynchronous clear |
| `cic_ripple_adder` | N one-bit full adders in series |
| `cic_full_adder` | s = cin ⊕ a ⊕ b, co = ab + cin(a + b) |
| `cic_inverter` | bitwise NOT |
| `cic_pkg` | default sizes: input 5, word 14, stages 3, counter 4 bits, divided-clock bit 2 |

Top-level ports of `cic_filter`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | sampling clock |
| `rst_n` | in | 1 | asynchronous reset, active low; clears every register, the latch and the counter |
| `x_in` | in | 5 | unsigned input sample, zero-extended to 14 bits |
| `y_out` | out | 14 | filter output, unsigned (always ≤ 15872) |
| `y_valid` | out | 1 | high the cycle after `y_out` changes |
| `dec_clk` | out | 1 | the 1.25 MHz decimated clock |
| `pulse` | out | 1 | the latch pulse |

Parameters (`IN_W_P`, `WORD_W_P`, `N_STAGES_P`, `CNT_W_P`, `DEC_BIT_P`) default to the
sizes above. If you change them, keep `WORD_W_P ≥ IN_W_P + N_STAGES_P·(DEC_BIT_P+1)`, or
the output will wrap. `DEC_BIT_P` sets the decimation ratio to 2^(DEC_BIT_P+1) and must be
below `CNT_W_P`.

## Where this RTL departs from the original circuit

The original is a transistor-level design. Where it relies on circuit techniques, this RTL
substitutes the usual synchronous equivalent:

* **Single-phase clock.** The original registers are master-slave flip-flops driven by two
  non-overlapping phases (phi1, phi2 and their complements). Two-phase clock generators make
  those phases, one at 10 MHz and one at the divided rate. Here every register is an ordinary
  rising-edge flip-flop on `clk`, and the two-phase generators are omitted.
* **Enable instead of a divided clock.** The original clocks the differentiators with the
  divided clock. Here they run on `clk` with the clock enable `dec_en`. They load at the edge
  where `dec_clk` rises.
* **Latch pulse width.** The original is described both as opening the latch for one full 10 MHz
  cycle and as a 50 ns pulse every 800 ns with 6.25 % duty. This RTL uses the 50 ns
  (half-cycle) form. It also chooses the low half of the cycle, for the reasons given above.
* **Reset.** The original requires its flip-flops to be reset before use but does not fix a
  polarity. Here `rst_n` is active low and asynchronous. It also clears the latch and the
  counter, which the original does not reset.
* **Input format.** The input is treated as unsigned and zero-extended. A signed input would
  need sign extension into bits 5–13. The arithmetic itself would be unchanged.
* **Complement signals.** The latch has only its true gate input. The clock block still
  provides `npulse` and `dec_nclk`.
* **Added.** The `dec_en` clock enable and the `y_valid` output exist only in this RTL.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each prints one line
`TB_RESULT checks=N failures=M` and stops itself after a fixed number of cycles if something
hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/cic_pkg.sv tb/tb_cic_filter.sv \
          --top-module tb_cic_filter -Mdir obj_tb -o sim
./obj_tb/sim
```

Substitute any other testbench name. Verilator finds the submodules in `rtl/` by name through
`-Irtl`.

What they check:

* **`tb_cic_filter`** (full default size, about 4,000 clocks).
  * An aligned impulse reproduces the table above, stage by stage, and the output then stays
    0 while the integrators wrap.
  * 400 decimated periods of random input match the convolution with `h`, sampled every
    eighth input, with outputs exactly 8 clocks apart.
  * A full-scale input settles at 31·512.
  * A reset in the middle of a run clears the filter.
  * It counts latch pulses, latch holds, integrator wraps and negative (wrapped) differences,
    and fails if any of them never occurs.
* **`tb_cic_impulse_phases`**: an impulse of 1 and of 31 at each of the 8 phases against the
  decimation counter. The outputs must be the right taps of `h` and sum to 64 times the
  amplitude.
* **The block testbenches** check each module against a model kept in the testbench:
  * the integrator counts through a full wrap;
  * the differentiator gives 1 then 0 for a step;
  * the clock block delivers an 800 ns divided clock and a 50 ns pulse at a 100 ns clock;
  * the adders, registers, latch and inverter are checked at corner cases and with random values.

Synthesis of the top gives 132 flip-flop bits, 14 latch bits and six 14-bit ripple
adders. The latch is intentional.
