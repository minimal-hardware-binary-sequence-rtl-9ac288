// fsr_register: the field shift register itself.
//
// N flip-flops connected as a shift register. Stage 1 (bit 0) receives the
// feedback bit and each stage k passes its content to stage k+1 on every
// enabled clock. Any initial state can be inserted in parallel with `load`,
// which has priority over `shift`. All N stages shift; the effective
// length of the register is set by which stage the feedback logic treats as
// the last one, and stages above it only carry delayed copies. The sequence
// output is the content of the stage chosen by `out_sel` (1..N); an
// out_sel of 0 or above N gives 0.
//
// Timing: state and seq_out change one clock after load/shift; seq_out is a
// combinational mux of the registered state.
//
// From the original hardware: 35 stages, insertable initial state, output
// from the last or any other stage. Own choices: synchronous active-high
// reset to all zeros, and the bit ordering (bit k-1 = stage k).
module fsr_register
  import pnfsr_pkg::*;
#(
  parameter int unsigned N = N_STAGES
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         load,      // insert init_state
  input  logic [N-1:0]                 init_state,
  input  logic                         shift,     // one clock pulse to the FSR
  input  logic                         fb_in,     // feedback into stage 1
  input  logic [$clog2(N+1)-1:0]       out_sel,   // stage taken as output
  output logic [N-1:0]                 state,     // stage k at bit k-1
  output logic                         seq_out
);

  always_ff @(posedge clk) begin
    if (rst)        state <= '0;
    else if (load)  state <= init_state;
    else if (shift) state <= {state[N-2:0], fb_in};
  end

  always_comb begin
    seq_out = 1'b0;
    for (int k = 1; k <= N; k++)
      if (out_sel == ($clog2(N+1))'(k)) seq_out = state[k-1];
  end

endmodule
