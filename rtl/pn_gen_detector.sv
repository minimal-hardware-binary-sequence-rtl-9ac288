// pn_gen_detector: binary sequence (pseudonoise) generator and cycle-length
// detector.
//
// A 35-stage feedback shift register whose effective length, initial
// state, feedback taps, feedback complement and an optional nonlinear
// term are all set from inputs. A run inserts the initial state, lets the
// word detector remember it, then clocks the register and counts the
// pulses until the detector sees the initial state again: the count is
// the length of the cycle containing that state, which tells e.g. whether
// a feedback polynomial is primitive (cycle 2^r-1) or what its period is.
// In generator mode the register simply runs and `seq_out` carries the
// sequence from the chosen stage.
//
// Blocks: fsr_register (the flip-flops), feedback_logic (modulo-2 sum of
// the taps, complement, AND-gate nonlinear term), word_detector (sampled
// initial word and its recogniser), sequence_control (the controller) and
// cycle_counter. `stage_q` is the register content that drives the stage
// indicator lamps of the original; `seq_out` is the sequence output.
//
// Interface: every setting input is static during a run. `start` begins a
// run (accepted when not busy), `stop` aborts it. Timing: for a cycle of
// length P, `done` rises P+3 clocks after the clock edge that takes
// `start`, and `cycle_count` then holds P. Generator mode stays busy until
// `stop`. The clock is an input; the controller gates the register with a
// clock enable rather than starting and stopping the clock itself.
module pn_gen_detector
  import pnfsr_pkg::*;
#(
  parameter int unsigned N     = N_STAGES,
  parameter int unsigned NTAPS = N_TAPS,
  parameter int unsigned CW    = N + 1
) (
  input  logic                               clk,
  input  logic                               rst,
  // run control
  input  logic                               start,
  input  logic                               stop,
  input  run_mode_e                          mode,
  // register settings
  input  logic [$clog2(N+1)-1:0]             length,      // effective length r, 1..N
  input  logic [N-1:0]                       init_state,  // stage k at bit k-1
  input  logic [NTAPS-2:0][$clog2(N+1)-1:0]  taps,        // extra taps, 0 = off
  input  logic                               complement,
  input  logic                               nl_en,
  input  logic [N-1:0]                       nl_mask,
  input  logic [N-1:0]                       nl_pattern,
  input  logic [$clog2(N+1)-1:0]             out_sel,     // output stage
  // word detector settings
  input  det_src_e                           det_src,
  input  logic [N-1:0]                       det_mask,
  input  logic [N-1:0]                       ext_in,
  // results
  output logic [N-1:0]                       stage_q,
  output logic                               seq_out,
  output logic [CW-1:0]                      cycle_count,
  output logic                               busy,
  output logic                               done,
  output logic                               det_match,
  output logic                               nl_hit,
  output logic [N-1:0]                       det_word,    // remembered initial state
  output ctrl_state_e                        ctrl_state
);

  logic        load, sample, shift, cnt_clear, cnt_inc;
  logic        fb;

  fsr_register #(.N(N)) u_fsr (
    .clk, .rst,
    .load, .init_state, .shift, .fb_in(fb), .out_sel,
    .state(stage_q), .seq_out
  );

  feedback_logic #(.N(N), .NTAPS(NTAPS)) u_fb (
    .state(stage_q), .length, .taps, .complement,
    .nl_en, .nl_mask, .nl_pattern, .nl_hit, .fb
  );

  word_detector #(.N(N)) u_det (
    .clk, .rst, .sample, .fsr_state(stage_q), .ext_in,
    .src(det_src), .conn_mask(det_mask), .length,
    .word(det_word), .match(det_match)
  );

  sequence_control u_ctrl (
    .clk, .rst, .start, .stop, .mode, .match(det_match),
    .load, .sample, .shift, .cnt_clear, .cnt_inc,
    .busy, .done, .state(ctrl_state)
  );

  cycle_counter #(.W(CW)) u_cnt (
    .clk, .rst, .clear(cnt_clear), .inc(cnt_inc), .count(cycle_count)
  );

endmodule
