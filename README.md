# Parallel scrambler: a 16-bit, 40 Gb/s pseudorandom generator with one XOR per register

Line scramblers XOR the transmitted data with a maximal-length pseudorandom
sequence. The textbook form is a serial linear-feedback shift register: for the
10-Gb/s Ethernet frame scrambler, P(x) = x^7 + x^6 + 1, seven registers and
one two-input XOR, clocked at the line bit rate. At 10 or 40 Gb/s that clock is
out of reach, so the sequence has to be produced M bits at a time at 1/M of
the bit rate.

The usual parallel forms compute some of the M bits with XORs of three or more
inputs, which lengthens the critical path. This design avoids that. Every
register in the generator is loaded with the XOR of exactly S register outputs
from the previous cycle. S is the number of feedback taps: S = 2 for a
trinomial such as x^7 + x^6 + 1. So the critical path is one register plus one
XOR2, whatever M is. On top of that, the registers are double-edge triggered:
each clock edge produces one word. With M = 16 ports and a 1.25 GHz clock this
gives 16 × 2.5 Gb/s = 40 Gb/s.

The RTL follows the parallel scrambler architecture published by C.-H. Lin,
C.-N. Chen, Y.-J. Wang, J.-Y. Hsiao and S.-J. Jou ("Parallel Scrambler for
High-Speed Applications"). It contains:
- the parametrised generator (`prbs_par_gen`);
- its register cells;
- the measurement test chip around two copies of the generator (`scrambler_testchip`);
- a parallel data scrambler.

Where the RTL makes its own choices, this README says so.

## The sequence and the word

The serial generator produces b(0), b(1), … with

    b(i) = XOR over q = 1..N of c_q · b(i − q)        (P(x) = Σ c_q x^q, c_0 = c_N = 1)

The seed x_{N-1} … x_0 gives the first N bits: b(0) = x_{N-1}, …,
b(N−1) = x_0. This is the output order of the serial shift register, whose
oldest stage x_{N-1} is the output.

The parallel generator outputs word j = [b(Mj), b(Mj+1), …, b(Mj+M−1)].
`out[0]` is the earliest bit. Sending `out[0]` first, then `out[1]`, and so
on, gives exactly the serial stream, starting from the seed. The default seed
is all ones (1111111), the value the serial Ethernet scrambler is reset to.

## Port equations: how one XOR2 per port is possible (the core idea)

Over GF(2), squaring a polynomial only spreads its exponents: P(x)^2 = P(x^2).
More generally, P(x)^R = P(x^R) for every R that is a power of two. So the
sequence obeys the stretched recurrences

    b(i) = XOR over q of c_q · b(i − R·q),    R = 1, 2, 4, 8, …

Each of these still has only S terms. Take new bit p of a word, at serial
index i = M(j+1) + p. We need an R for which all of b(i − R·q) already sit in
registers, i.e. belong to the words already produced. The newest of them is
b(i − R·T), where T is the lowest tap, so it must be older than the current
word: R·T ≥ p + 1. The oldest is b(i − R·N), so it must still be held:
R·N ≤ L + p, where L is the number of bits kept.

The generator keeps a window of the last L bits, one per register, w[0]
oldest. It chooses:
- **L**, the smallest window (never below M) for which every port p has such
  an R;
- **per port, the smallest usable R** (`RSEL = R_MIN`, default) **or the
  largest** (`RSEL = R_MAX`).

Both choices give the same sequence. They differ only in wiring and fan-out.
All of this is computed at elaboration by functions in `scr_pkg`, so the
generated netlist is just registers and XOR2s.

For the default generator (x^7 + x^6 + 1, N = 7, T = 6, M = 16), L = 16: one
register per port. With `R_MIN` the equations are as follows. Indices are
serial positions of the previous word, 0 … 15.

| ports | R | new bit = | example |
|---|---|---|---|
| 0–5   | 1 | b(p+9)  ^ b(p+10) | b16 = b9 ^ b10 |
| 6–11  | 2 | b(p+2)  ^ b(p+4)  | b22 = b8 ^ b10 |
| 12–15 | 4 | b(p−12) ^ b(p−8)  | b28 = b0 ^ b4  |

`R_MAX` uses R = 2 for ports 0–11: b16 = b2 ^ b4, …, b27 = b13 ^ b15. Ports
12–15 are the same as above. This spreads the loads more evenly.

### When a port runs out of history

If a port cannot reach far enough back within one word, the window grows
beyond M. Example: x^7 + x^4 + 1 with M = 5. Port 4 needs R = 2 and so a bit
10 positions old, which gives L = 10, two registers per port.

The registers outside the newest M are plain shift copies: w[k] takes
w[k+M]. The outputs are always the M *oldest* window registers. So right after
set the first word is b(0 … M−1), and the window is preloaded with
b(0 … L−1), grown from the seed.

With M < N, the window is N registers long (for example 7 for x^7 + x^6 + 1
with M = 5). M = 1 turns the generator back into the serial scrambler.

Register counts this rule gives:

| polynomial, M | registers | XOR2 |
|---|---|---|
| x^7+x^6+1, 16 | 16 | 16 |
| x^11+x^9+1, 16 | 16 | 16 |
| x^7+x^6+1, 8 | 8 | 8 |
| x^7+x^4+1, 5 | 10 | 5 |
| x^7+x^6+1, 5 | 7 | 5 |
| x^7+x^6+1, 1 | 7 | 1 |

These agree with the published circuits. For x^7 + x^6 + 1 the rule gives
one register per port exactly for M = 8–12, 16–24 and 32–48 (largest R = 2,
4 and 8). These are the published ranges M_min = (N+D)·R/2 to
M_max = (N−D)·R, with D = N − T. For large M (the regime where
R ≥ 8 is needed) the published register formula W = R'·N is conservative; this
RTL uses the smaller window that still works, for example 32 instead of 56
registers for M = 30.

Polynomials with more taps work unchanged: each port then XORs S inputs
(S − 1 XOR2).

## Double-edge registers and the cell styles

A word appears after every rising **and** every falling clock edge. This
halves the clock frequency compared with single-edge registers and saves
clock-buffer power. Three cell styles are selected with the `CELL` parameter:

- `CELL_XOR_DET` (scrambler I, default) uses `xor_det_reg`. The XOR is folded
  into the input stage of a double-edge register. In the transistor circuit
  this merges the XOR delay with the register's set-up time.
- `CELL_XOR_THEN_DET` (scrambler II) uses `xor2_cell` followed by `det_reg`,
  a separate gate in front of a plain double-edge register.
- `CELL_SET` uses ordinary rising-edge flip-flops: one word per clock.

The original cells are clocked-CMOS (C2MOS) transistor circuits. The RTL keeps
only their logic function, as a standard synthesizable double-edge register:
- a rising-edge flop r loads d ^ f;
- a falling-edge flop f loads d ^ r;
- q = r ^ f.

After either edge q equals the sampled d, and q never depends on the clock
through logic. The speed advantage of the merged XOR cell is a circuit
property: it does not show up in RTL. Scrambler I and scrambler II are
logically identical.

`set` is asynchronous and active high. It forces each register to its start
value: r to the value, f to 0.

## The test chip (`scrambler_testchip`)

The sequence repeats every 127 bits. Since 127 is prime and does not divide
16, the 16-bit words repeat every 127 words, and all 127 words of a period are
different. The test chip uses this to measure speed with a slow instrument:

```
clk_probe ─┐
           ├─ clk_mux2 ─ clk_div2 ─┬─ prbs_par_gen (I)  ─ out_i  ─ decision_ckt ─ tff ─ tff_i
clk_osc  ──┘   (sel_probe)         └─ prbs_par_gen (II) ─ out_ii ─ decision_ckt ─ tff ─ tff_ii
```

- **Clock selection** (`clk_mux2`): a probe-pad clock or an on-chip oscillator
  (the oscillator itself is analog and is an input port here). The selection
  is static: there is no glitch-free switching.
- **Divide-by-2** (`clk_div2`): gives a 50 % duty cycle, which double-edge
  registers need so that both half-periods carry one word. A 2.5 GHz input
  therefore gives 1.25 GHz, i.e. one word per input clock period and
  2.5 Gb/s per port.
- **Decision circuit** (`decision_ckt`): compares each word with a fixed
  pattern and registers the result in a double-edge register. The pattern is
  the first word after set, computed at elaboration. It fires once per 127
  words. The comparator and the choice of pattern are this design's own; only
  the circuit's purpose is given.
- **T flip-flop** (`tff`): toggles on each hit, so its output period is 254
  words. Its frequency is f_in / 254, and the bit rate is
  f(tff) × 254 × 16. The published measurement is 9.8448 MHz, which
  corresponds to 40.01 Gb/s.

Right after set the T flip-flops toggle at the 2nd word: the pattern is word 0,
the hit appears one word later, and the toggle one word after that. From then
on they toggle every 127 words.

The clock buffer and the pads have no logic and are not modelled. The set
input of the chip also resets the divider and clears the decision circuits and
T flip-flops. That is a choice of this design.

### Data scrambler

Next to the test circuit, with its own ports and clock, `par_scrambler` shows
the generator in its intended use. It XORs a 16-bit data word with the
generator word of the same serial positions, `data_out = data_in ^ out`. This
is combinational from `data_in`, and the word advances at each clock edge.

The same module descrambles when both ends restart (`set`) at the same frame
position. Restarting the generator at every frame boundary makes it a
frame-synchronous scrambler.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 7 | polynomial degree |
| `TAPS` | `TAPS_X7_X6` | bit q set means c_q = 1 (bit N must be set); `TAPS_X7_X4` and `TAPS_X11_X9` are also in `scr_pkg` |
| `M` | 16 | parallel outputs (bits per word) |
| `SEED` | all ones | x_{N-1} … x_0 in `SEED[N-1:0]` |
| `CELL` | `CELL_XOR_DET` | register cell style (generator only; the chip uses both double-edge styles) |
| `RSEL` | `R_MIN` | port equations: smallest or largest usable R |

Supported sizes: degree up to 63, window up to 512 registers (`MAX_N`,
`MAX_L` in `scr_pkg`).

## Files

| file | contents |
|---|---|
| `rtl/scr_pkg.sv` | cell and equation enums, polynomial constants, elaboration functions (window length, R per port, source positions, start window) |
| `rtl/prbs_par_gen.sv` | parallel generator |
| `rtl/xor_det_reg.sv`, `rtl/det_reg.sv`, `rtl/xor2_cell.sv` | register cells |
| `rtl/par_scrambler.sv` | data scrambler / descrambler |
| `rtl/clk_mux2.sv`, `rtl/clk_div2.sv`, `rtl/decision_ckt.sv`, `rtl/tff.sv` | test-chip blocks |
| `rtl/scrambler_testchip.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/gen_checker.sv` | helper for `tb_prbs_par_gen` |

## Simulation

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/scr_pkg.sv \
          tb/tb_scrambler_testchip.sv --top-module tb_scrambler_testchip
./obj_dir/Vtb_scrambler_testchip
```

Replace the testbench name to run any other test. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. All of them run in
well under a second.

What the tests check:

- **`tb_prbs_par_gen`** compares every word, after every clock edge, with a
  bit-serial model of the shift register. It covers nine configurations:
  - x^7+x^6+1 with M = 16, both `RSEL`s, both double-edge cell styles and a
    non-default seed;
  - x^11+x^9+1 with M = 16;
  - x^7+x^4+1 with M = 5;
  - x^7+x^6+1 with M = 8;
  - x^7+x^6+1 with M = 5 on single-edge flip-flops;
  - M = 1;
  - M = 30, where the window (32 registers) is longer than the word.

  It also checks each register count and the source positions of the
  published port equations, and restarts the generators mid-sequence.
- **`tb_scrambler_testchip`** runs the full-size chip (default parameters)
  from the probe clock and then, after a restart, from the oscillator clock,
  for three sequence periods each. It checks every word of scrambler I
  against the reference and scrambler II against scrambler I. It checks that
  the T flip-flop toggle interval is exactly 127 input clock periods, and that
  the data scrambler's output equals data XOR the reference. It also counts
  that each mechanism actually happened.
- The cell and test-chip block testbenches check sampling on both edges,
  asynchronous set, hit timing, toggling, the divider phase and the clock
  selection.

## Departures and limits

- The cells are functional RTL, not the transistor circuits. Speed, power and
  area figures of the original chip (for example 2.5 Gb/s per port for the
  merged-XOR cell against 1.72 Gb/s for the separate XOR) cannot be reproduced
  in RTL. Fan-out and wire length also depend on placement, not on this code.
- The published text gives maximum fan-outs of 5 and 3 for the two 16-port
  equation sets. Counting loads of the equations as written gives at most 3
  XOR inputs (4 with the output) for either set. The equations were followed.
- The decision circuit's pattern and structure, the T flip-flop's clocking,
  the reset of divider and detectors, the static clock multiplexer and the data
  path of the data scrambler are this design's choices.
- The register window for large M can be smaller than the published
  worst-case count (see above). For every published example it is equal.
- Double-edge registers use the clock as a data-path timing reference on both
  edges. A synthesis flow must time both clock phases, and the clock must keep
  a 50 % duty cycle (hence the divider).
