# Pseudonoise sequence generator and cycle-length detector

A feedback shift register is a cheap way to make long binary sequences, but
only the right feedback gives a useful one. An r-stage register with linear
feedback produces a maximal-length (pseudonoise, PN) sequence of period
2^r − 1 exactly when its feedback polynomial is primitive. This design is a
laboratory tool for finding out which feedback does what. Set up a register
of any length from 1 to 35 stages, any initial state and any feedback, press
start, and the hardware clocks the register until it returns to its initial
state. It then reports how many clock pulses that took. That count is the
length of the cycle containing the initial state. It answers questions about
the feedback polynomial: is it primitive, what is its period, does it divide
another polynomial, how do the cycles split up? The same register also works
as a plain sequence generator.

The design has a controller, a counter and a "word detector" that
remembers the starting word and recognises it when it comes back.

## Blocks

| module | role |
|---|---|
| `pnfsr_pkg` | constants (35 stages, 6 taps, 36-bit count) and the enum types |
| `fsr_register` | the 35 flip-flops, parallel load of the initial state, output stage mux |
| `feedback_logic` | modulo-2 sum of up to six taps, optional complement, nonlinear AND-gate term |
| `word_detector` | stores the initial word and compares its inputs against it |
| `sequence_control` | state machine: load → sample → run → done |
| `cycle_counter` | counts the clock pulses given to the register |
| `pn_gen_detector` | top level, wires the above together |

The stage indicator lamps of a bench instrument are represented by the
`stage_q` output. A power driver for large fan-out would be `seq_out`. The
clock oscillator is outside the design: `clk` is an input, and the register
is started and stopped by a clock enable. The original instrument used a
1 MHz clock.

## Stage numbering and effective length

Stages are numbered 1 to 35. Stage 1 receives the feedback bit, and on every
pulse stage k passes its content to stage k+1. In every vector port, stage k
is bit k−1.

`length` (r) sets the effective length. Stage r counts as the last stage.
It is always one of the feedback taps, and the word detector looks only at
stages 1..r. All 35 flip-flops shift all the time, so stages above r just
carry delayed copies of stage r. They affect nothing unless you tap them
or take the output from them. In PN work r is normally 20 or more. The
15 stages beyond 20 let longer registers be "annexed".

## Feedback

The bit shifted into stage 1 is

    fb = s[r] ⊕ s[taps[0]] ⊕ … ⊕ s[taps[4]] ⊕ complement ⊕ nl_hit

- **Taps.** Stage r plus up to five more taps, which makes six in all. That
  covers feedback polynomials of up to seven terms. A tap value of 0 means
  "unused". A tap must be 1..r to be meaningful. Setting a tap equal to r
  cancels the fixed last-stage tap, because the sum is modulo 2.
- **Polynomial convention.** Taps {t1, …, r} give the recurrence
  a(n) = a(n−t1) ⊕ … ⊕ a(n−r). Its feedback polynomial is
  1 + x^t1 + … + x^r, and this polynomial and its reciprocal have the same
  period. For example, `length=5, taps[0]=2` realises x^5 + x^2 + 1 and runs
  through all 31 non-zero states.
- **Complement.** Feeds back the complement of the sum (XNOR). The register
  then cycles through different state sets. For example, with all zeros and
  only stage 35 tapped, the cycle is 35 ones followed by 35 zeros, which
  gives 70.
- **Three taps on r+1 stages.** Some degrees, such as 8, 12, 13, 16, 19 and
  24, have no primitive trinomial. For those, two taps on r stages cannot
  give a 2^r − 1 sequence. Instead, use taps i, j and r+1 on r+1 stages,
  where 1 + x^i + x^j + x^(r+1) = (1 + x)·p(x) and p is primitive of degree
  r. Every state except all-zeros and all-ones then lies on a cycle of
  length 2^r − 1. Two such settings are verified in simulation:
  - r = 8: `length=9`, taps 2 and 6, cycle 255.
  - r = 24: `length=25`, taps 2 and 14, cycle 16 777 215.
- **Nonlinear term.** `nl_en` turns on an AND gate. It fires when every
  stage selected by `nl_mask` equals the corresponding bit of `nl_pattern`.
  Its output is added modulo 2 to the feedback. The recognised state
  therefore jumps to a successor other than its normal one, and this is how
  a maximal-length cycle is cut short to a chosen length. Keep stage r out
  of `nl_mask`. Then the feedback stays of the form s[r] ⊕ f(s[1..r−1]),
  the state map stays invertible, and every initial state still lies on a
  cycle. If stage r is in the mask, the start state may never come back,
  and the run then continues until `stop`.

## A measurement, clock by clock

`start` is accepted while the controller is idle or done. Let E0 be the
clock edge that takes `start`.

| after edge | state | what happens |
|---|---|---|
| E0 | LOAD | `init_state` is loaded into the register at the next edge |
| E1 | SAMPLE | the word detector stores the register contents and the counter is cleared |
| E2 | RUN | each clock shifts the register once and adds one to the count |
| E2+P | RUN | the register is back at the initial word and the detector matches |
| E3+P | DONE | shifting stops; `cycle_count` = P and `done` = 1 |

So `done` rises P + 3 clocks after E0. The detector matches straight after
sampling, because the register still holds the word. This early match is
ignored until the first pulse has been applied (the detector is "primed").
That is why a cycle of length 1, such as all-zeros under XOR feedback,
correctly reads 1 and not 0. `stop` returns the controller to idle from any
state and blocks the shift on that same clock.

The counter is 36 bits wide. That holds the longest cycle a 35-stage
register can have, 2^35 states, which takes about 9.5 hours at 1 MHz.

## Word detector

The detector is an r-input AND gate. For each stage it uses either the
stage's value or its complement, chosen by the stored initial word. It
therefore outputs 1 exactly when every connected input equals the stored
bit. A stage is connected when its `det_mask` bit is set and its number is
≤ r.

- Using only part of the stages measures the return time of that part of
  the state.
- With `det_src = DET_SRC_EXT` the gate compares `ext_in` against the
  stored word instead of the register. This is meant for an external
  circuit under test. The word is still sampled from the register at
  SAMPLE. The run then stops by itself when the circuit under test shows
  that word, and `cycle_count` gives the number of pulses it took.
- With no input connected the gate is always 1, so a measurement stops
  after one pulse.

## Generator mode

With `mode = MODE_GENERATE` at start, the controller loads and samples as
usual. It then shifts on every clock and ignores the detector, until `stop`.
`seq_out` is the stage selected by `out_sel`: normally r, but any stage
1..35 can be used. `cycle_count` keeps counting pulses.

## Top-level ports (`pn_gen_detector`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset (clears register, word, count, controller) |
| `start`, `stop` | in | 1 | begin a run / abort it |
| `mode` | in | `run_mode_e` | `MODE_MEASURE` or `MODE_GENERATE` |
| `length` | in | 6 | effective length r, 1..35 |
| `init_state` | in | 35 | initial state |
| `taps` | in | 5 × 6 | extra tap stage numbers, 0 = unused |
| `complement` | in | 1 | XNOR feedback |
| `nl_en`, `nl_mask`, `nl_pattern` | in | 1, 35, 35 | nonlinear AND-gate term |
| `out_sel` | in | 6 | output stage |
| `det_src`, `det_mask`, `ext_in` | in | enum, 35, 35 | detector source, connections, external inputs |
| `stage_q` | out | 35 | register contents |
| `seq_out` | out | 1 | sequence output |
| `cycle_count` | out | 36 | pulses counted |
| `busy`, `done` | out | 1 | run in progress / cycle measured |
| `det_match`, `nl_hit`, `det_word`, `ctrl_state` | out | | detector output, AND-gate output, stored word, controller state |

All settings are treated as static switches. Change them only while the
controller is idle or done. The parameters `N` (stages, default 35), `NTAPS`
(default 6) and `CW` (count width, default N+1) can be changed. `N` must be
at least 2.

## Where this departs from the original instrument

- On the bench instrument, the detector's per-stage choice between a
  stage's value and its complement was made with switches. Here it is set
  automatically from the sampled initial word. The per-stage connect switch
  remains as `det_mask`.
- The original starts and stops the clock itself. Here the register uses a
  clock enable on a free-running clock.
- The following are choices made for this design, not features of the
  original:
  - the `stop` input;
  - generator mode as a separate controller mode;
  - the 36-bit counter width;
  - the binary tap encoding;
  - the mask/pattern form of the AND-gate term;
  - synchronous reset.
- Nothing is modelled for lamps, drivers or the oscillator.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `fsr_register_tb`, `feedback_logic_tb`, `word_detector_tb`,
  `cycle_counter_tb`: random stimulus, compared with models written
  separately inside the testbench.
- `sequence_control_tb`: the testbench stands in for the detector. It
  checks the load/sample/run order, that the unprimed match is ignored, the
  number of pulses, the P+3 latency, `stop`, and generator mode.
- `pn_gen_detector_tb`: end to end at the default size of 35 stages and
  6 taps. It compares cycle counts with a separate model of the register
  and with known primitive polynomials (x^5+x^2+1 → 31,
  x^8+x^6+x^5+x^4+1 → 255, x^20+x^3+1 → 1 048 575). It covers:
  - rotation (35) and XNOR (70);
  - six-tap feedback;
  - nonlinear truncation;
  - partial detector connection;
  - detector on external inputs;
  - generator output from the last stage and from another stage;
  - `stop`;
  - 60 random configurations.

  It counts each of these mechanisms and fails if one never happened. It
  runs in a few seconds.
- `pn_workload_tb`: maximal-length cycles in the PN range:
  - x^r + x^t + 1 for r = 20, 21, 22, 23;
  - the three-tap r+1-stage settings for r = 8 and r = 24.

  It takes about 35 million clocks, roughly half a minute.

Cycles of 2^35 − 1 pulses are far beyond simulation; the 36-bit counter
width is the only thing that longer registers add.

Simulating with Verilator (the package must come first):

    verilator --binary --timing --assert -Irtl rtl/pnfsr_pkg.sv \
      rtl/fsr_register.sv rtl/feedback_logic.sv rtl/word_detector.sv \
      rtl/sequence_control.sv rtl/cycle_counter.sv rtl/pn_gen_detector.sv \
      tb/pn_gen_detector_tb.sv --top-module pn_gen_detector_tb
    ./obj_dir/Vpn_gen_detector_tb

For a unit testbench, list the package, the module and its testbench.
