// word_detector: remembers the initial state and recognises its return.
//
// On `sample` the detector stores the register's current contents. That
// stored word decides, stage by stage, whether the stage's assertion or
// its negation output feeds the detector's AND gate, so the gate is 1
// exactly when every connected input equals the stored bit. A stage is
// connected when its bit in `conn_mask` is set and it lies within the
// effective length (stages 1..length). After sampling, the gate's inputs
// can be switched (`src`) from the register's own stages to `ext_in`, the
// outputs of a logic circuit under test, so a test stops by itself when
// that circuit shows the sampled word. With no input connected the gate
// output is 1.
//
// Timing: `word` is updated one clock after `sample`; `match` is
// combinational from `word`, the selected inputs and the settings.
// From the original hardware: per-stage assertion/negation choice, an
// r-input gate, sampling of the initial state, switching to external
// inputs. Own choices: the stored word sets the polarities (instead of
// hand-set switches), and the connect mask as a per-stage enable.
module word_detector
  import pnfsr_pkg::*;
#(
  parameter int unsigned N = N_STAGES
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     sample,     // remember fsr_state
  input  logic [N-1:0]             fsr_state,
  input  logic [N-1:0]             ext_in,     // logic under test
  input  det_src_e                 src,
  input  logic [N-1:0]             conn_mask,  // stage connected to the gate
  input  logic [$clog2(N+1)-1:0]   length,
  output logic [N-1:0]             word,       // remembered initial state
  output logic                     match
);

  logic [N-1:0] in_sel;
  logic [N-1:0] active;

  always_ff @(posedge clk) begin
    if (rst)         word <= '0;
    else if (sample) word <= fsr_state;
  end

  always_comb begin
    in_sel = (src == DET_SRC_EXT) ? ext_in : fsr_state;
    for (int k = 0; k < N; k++)
      active[k] = conn_mask[k] && (k < int'(length));
    match = ((in_sel ~^ word) | ~active) == '1;
  end

endmodule
