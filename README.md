# Low-power 32-bit LFSR pattern generator for built-in self-test

A linear feedback shift register (LFSR) is the usual source of pseudo-random
test patterns in built-in self-test (BIST). It is cheap, but it is noisy: about
half of its bits flip on every clock, so the circuit under test toggles far more
in test mode than in normal use. The added current can cause voltage drop and
ground bounce, and with them false failures.

This RTL builds a 32-bit maximal-length LFSR with the characteristic polynomial

    P(x) = x^32 + x^22 + x^2 + x + 1

and a low-power version of it. Between every two successive LFSR states T1 and
T2, the low-power version inserts three intermediate vectors Ta, Tb and Tc. Over
the five vectors T1, Ta, Tb, Tc, T2 the total number of bit transitions equals
the transitions between T1 and T2 alone. Each applied vector therefore switches
about a quarter as many bits as the plain LFSR does. The generator sits in a
small BIST wrapper with four other parts:

- an input multiplexer in front of the circuit under test (CUT);
- a multiple-input signature register (MISR);
- a response analyzer;
- a controller that gives a Go/No-go verdict.

## The 32-bit LFSR (`lfsr`)

The LFSR is a chain of 32 flip-flops on one clock. Each enabled clock it shifts
one place towards the MSB. The new bit 0 is the XOR of bits 31, 21, 1 and 0.
These are the terms x^32, x^22, x^2 and x^1 of P(x): bit k-1 holds the term
x^k. The polynomial is stored as a tap mask, `lfsr_pkg::LFSR32_TAPS = 32'h8020_0003`.

P(x) is primitive. The testbench proves this by computing that x has order
exactly 2^32 - 1 modulo P(x). As a result, any non-zero seed runs through all
4,294,967,295 non-zero states before it repeats, at one state per clock. With a
20 ns clock a full period takes 85.9 s.

- `WIDTH`, `TAPS` and `SEED` are parameters. `default_taps()` supplies standard
  maximal-length masks for the 8- and 16-bit comparison sizes:
  x^8+x^6+x^5+x^4+1 and x^16+x^15+x^13+x^4+1.
- `load` copies the `seed` input into the register and has priority over `en`.
  The asynchronous active-low reset loads `SEED`, which is 1 by default.
- In this Fibonacci arrangement the bit stream obeys the reciprocal
  polynomial x^32 + x^31 + x^30 + x^10 + 1. That polynomial is primitive
  whenever P(x) is, so the period is the same. A Galois arrangement would
  realise P(x) itself.
- An all-zero state is a fixed point of any XOR LFSR, and nothing guards against
  it. Never load a zero seed.
- Besides `state`, the module outputs `next_state`, the state the next enabled
  clock will produce. The low-power generator needs both.

## Intermediate vectors: how the low-power generator works (`lp_lfsr`)

This is the part that needs some thought. The generator has two levels:

1. **Present/next select.** The 32 bits are split into four interleaved groups,
   g = i mod 4. A 2-bit phase counter p counts 0, 1, 2, 3. In phase p, the bits
   whose group satisfies g < p take their flip-flop's *next* state. All other
   bits keep the *present* state.
2. **Multiplexer.** Each bit has a 2:1 multiplexer that chooses between
   `state[i]` and `next_state[i]` of the LFSR, as the select level directs.

The LFSR advances only at the end of phase 3. The output sequence is then:

| phase | vector shown | bits taken from T2 |
|------:|--------------|--------------------|
| 0 | T1 | none |
| 1 | Ta | group 0 (bits 0, 4, 8, ...) |
| 2 | Tb | groups 0, 1 |
| 3 | Tc | groups 0, 1, 2 |
| 0 | T2 (the LFSR has stepped) | all |

Each bit that differs between T1 and T2 flips exactly once across the four
steps, in the step where its group is switched over. No bit flips twice. So the
transitions from T1 to T2 are spread over four clocks instead of one. The LFSR's
own flip-flops also clock a quarter as often.

The cost is that each LFSR state takes four clocks. A test of a given length
therefore applies 4x as many vectors, of which only one in four is a true LFSR
state. The sequence still repeats only after 4 x (2^32 - 1) vectors.

Over 20,000 vectors of the 32-bit generator, the testbench counts 3.94 output
bit transitions per vector. A plain LFSR over the same states gives 15.8. The
design's power target is a saving of about a quarter, measured on an FPGA power
analyzer. That figure is a silicon and tool result and is not reproduced here.
Only the switching activity is measured.

Outputs:

- `pattern` is combinational from the LFSR and phase registers.
- `phase` says which vector is shown: 0 for a true LFSR state, 1 to 3 for Ta to Tc.
- `lfsr_step` is high in the cycle whose clock edge advances the LFSR.
- `load` restarts at phase 0 with T1 = seed. `en` low holds the vector.

## BIST wrapper (`lfsr_bist_top`)

```
 normal_pi ──►┌──────────┐ cut_pi        ┌─────┐        cut_po
              │ test_mux ├──────────────►│ CUT ├───────────────┐
   ┌─────────►└──────────┘   (outside)   └─────┘               ▼
   │ pattern       ▲ test_mode                          ┌────────────┐
┌──┴──────┐        │                                    │    misr    │
│ lp_lfsr │◄───────┤ load/en        clear/en            └─────┬──────┘
└─────────┘     ┌──┴───┐◄─────────────────────────────        │ signature
   test ───────►│ bcu  │  compare / valid, pass        ┌──────▼─────┐
   done, go ◄───┤      │◄─────────────────────────────►│    tra     │◄── expected
                └──────┘                               └────────────┘
```

- **test_mux**: routes the functional inputs `normal_pi` to the CUT in normal
  mode, and the generated patterns in test mode.
- **misr**: a 32-bit LFSR with the same P(x). Each stage also XORs in one bit of
  the CUT response word: `sig' = {sig[30:0], ^(sig & TAPS)} ^ data`. Different
  response streams collide with a probability of about 2^-32. It clears to 0.
- **tra**: on a one-cycle `compare` pulse it registers
  `pass = (signature == expected)` and the `mismatch` bits. It holds them until
  it is cleared.
- **bcu**: a controller with the states NORMAL, SEED, RUN, FLUSH, COMPARE and
  DONE. Raising the Normal/Test input `test` moves it out of NORMAL:
  - SEED, one clock: loads `seed` into the generator and clears the MISR and
    the analyzer.
  - RUN, `N_PATTERNS` clocks: applies one vector per clock.
  - FLUSH, `CUT_LATENCY` clocks: lets the last responses of a pipelined CUT
    arrive. The MISR enable is the generator enable delayed by `CUT_LATENCY`.
  - COMPARE, one clock: the analyzer checks the signature.
  - DONE: `done` is high and `go` carries the verdict, until `test` falls again.

The CUT itself is not part of the RTL. Its inputs leave on `cut_pi` and its
outputs return on `cut_po`. The expected signature comes in on `expected`. It is
normally obtained by simulating the fault-free CUT with the same seed and
pattern count.

**Timing.** `done` rises N_PATTERNS + CUT_LATENCY + 2 clock edges after the edge
that first samples `test` high. With the defaults (4096 vectors, combinational
CUT) that is 4098 clocks. The patterns are 1024 LFSR states, each followed by
its three intermediate vectors.

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 32 | generator, CUT input and signature width |
| `TAPS` | `32'h8020_0003` | P(x) = x^32+x^22+x^2+x+1, used by the generator and the MISR |
| `N_PATTERNS` | 4096 | vectors applied per self-test (own choice) |
| `CUT_LATENCY` | 0 | clock cycles from `cut_pi` to `cut_po` |

`lfsr_pkg` holds the tap masks, the number of intermediate vectors and the
controller's state type `bcu_state_e`.

## Where this RTL departs from, or adds to, the described design

Taken from the design:

- the 32-bit width and the polynomial P(x);
- XOR feedback and one state per clock;
- three intermediate vectors with the equal-transition property;
- the select-then-multiplex structure of the generator;
- the BIST structure: TPG, MISR, analyzer, controller with Normal/Test and
  Go/No-go, and an input multiplexer.

Choices made in this RTL:

- **Intermediate vectors.** The exact way Ta, Tb and Tc are built is not
  specified. The interleaved quarter groups are one construction that has the
  required property.
- **Polynomial.** A second tap set (32, 30, 11, 5) is mentioned in passing for
  the 32-bit LFSR. The RTL uses x^32+x^22+x^2+x+1, the polynomial stated for
  the design.
- **Fibonacci form.** Taps XOR into bit 0. This choice is not specified.
- **Controls.** Reset value 1, asynchronous reset, `load`/`en`, and no
  zero-lock guard.
- **MISR.** Its polynomial (the same P(x)), its form and its width are own
  choices. So is comparing an externally supplied expected signature.
- **Controller.** Its states, the 4096-pattern default, `CUT_LATENCY` and the
  flush phase are own choices. So is holding the verdict until `test` falls.
- **8- and 16-bit sizes.** Their polynomials are standard maximal-length ones.
  They serve only as comparison sizes.
- **Not modelled.** FPGA-specific results: slice counts, the 12.8 ns clock,
  and power figures.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line. The reference models in
`tb/lfsr_ref_pkg.sv` are written from the tap positions, not from the RTL's
masks. `tb/cut_model.sv` is a behavioural 32-bit CUT: an adder and a rotated
XOR, with optional pipeline stages and a fault-injection input.

| testbench | what it shows |
|---|---|
| `tb_lfsr` | P(x) primitive (order of x is 2^32-1); 200,000 states of the 32-bit LFSR against the model, with enable gaps and reloads; full periods of the 8-bit (255 clocks, 5100 ns) and 16-bit (65,535 clocks, 1,310,700 ns) sizes at 20 ns per clock |
| `tb_lp_lfsr` | every vector of 5000 T1..T2 windows against the model; transitions per window equal the Hamming distance of T1 and T2; no bit toggles twice; step once per four clocks; full 8-bit period of 4 x 255 clocks |
| `tb_misr` | signature against the model for 20,000 random words, clear and hold; a single flipped response bit changes the signature |
| `tb_tra` | pass, valid and mismatch for equal and unequal pairs; verdict held; clear |
| `tb_bcu` | state sequence, pulse counts, pattern and capture-enable counts, latency delay, `done` timing and Go/No-go, for latency 0 and 3 |
| `tb_test_mux` | both modes with random data |
| `tb_lfsr_bist_top` | the whole wrapper at its default parameters (see below) |
| `tb_lfsr_bist_top_pipe` | the wrapper with a 3-stage CUT and 1000 patterns: flush phase, timing, Go, and No-go for a defect on the last pattern |

`tb_lfsr_bist_top` runs the whole wrapper at its default parameters:

- normal mode;
- two passing self-tests with different seeds;
- a self-test with a one-cycle CUT defect;
- a self-test with a wrong expected signature.

It checks every applied vector against the model and the done time of 4098
clocks. It also counts the mechanisms: normal mode, seed load, intermediate
vectors, LFSR steps, compaction, Go and No-go.

Not verified: a full 2^32-1 period of the 32-bit LFSR in simulation. That would
take 4.3 x 10^9 clocks, so the period rests on the primitivity proof together
with the clock-by-clock comparison.

## Simulating

All files are in `rtl/` and `tb/`, one module or package per file. List the
packages first. The testbenches rely on a 1 ns time unit, which
`tb_lfsr`'s 5100 ns and 1,310,700 ns period checks depend on. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/lfsr_pkg.sv tb/lfsr_ref_pkg.sv tb/tb_lfsr_bist_top.sv --top-module tb_lfsr_bist_top
./obj_dir/Vtb_lfsr_bist_top
```

Swap in any other testbench name. For synthesis, `lfsr_bist_top` is the top
(`rtl/lfsr_pkg.sv` first). To use the plain 32-bit LFSR on its own, instantiate
`lfsr` with its defaults.
