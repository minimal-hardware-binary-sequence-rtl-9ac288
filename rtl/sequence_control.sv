// sequence_control: the sequential control network.
//
// A run starts with `start` (from idle or after a finished run). The
// controller first inserts the initial state into the register (ST_LOAD,
// `load`), then has the word detector sample it and clears the pulse
// counter (ST_SAMPLE, `sample`, `cnt_clear`). In ST_RUN it enables the
// clock to the register (`shift`) and counts each pulse (`cnt_inc`).
// The detector's match is ignored until at least one pulse has been
// applied (the detector is "primed" by the first pulse), since the
// register starts in the word it is looking for. In MODE_MEASURE the first
// match after that stops the clock and ST_DONE holds the count, which is
// then the cycle length. In MODE_GENERATE matches are ignored and the
// register runs as a free sequence generator. `stop` returns to ST_IDLE
// from any state, aborting a run.
//
// Timing: a cycle of length P ends with done rising P+3 clocks after the
// clock edge that samples `start`: one clock each for LOAD and SAMPLE,
// P shifting clocks, and one clock to see the match. Outputs are decoded
// from the state register.
// From the original hardware: insert, prime, clock until the initial state
// returns. Own choices: the state encoding, the stop input, the
// generator mode, synchronous reset.
module sequence_control
  import pnfsr_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        stop,
  input  run_mode_e   mode,
  input  logic        match,
  output logic        load,
  output logic        sample,
  output logic        shift,
  output logic        cnt_clear,
  output logic        cnt_inc,
  output logic        busy,
  output logic        done,
  output ctrl_state_e state
);

  logic      primed;
  run_mode_e mode_q;
  logic      hit;

  assign hit = (state == ST_RUN) && (mode_q == MODE_MEASURE) && primed && match;

  always_ff @(posedge clk) begin
    if (rst || stop) begin
      state  <= ST_IDLE;
      primed <= 1'b0;
      mode_q <= MODE_MEASURE;
    end else begin
      unique case (state)
        ST_IDLE, ST_DONE:
          if (start) begin
            state  <= ST_LOAD;
            mode_q <= mode;
          end
        ST_LOAD:   state <= ST_SAMPLE;
        ST_SAMPLE: begin
          state  <= ST_RUN;
          primed <= 1'b0;
        end
        ST_RUN: begin
          if (hit) state <= ST_DONE;
          else     primed <= 1'b1;
        end
        default:   state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    load      = (state == ST_LOAD);
    sample    = (state == ST_SAMPLE);
    cnt_clear = (state == ST_SAMPLE);
    shift     = (state == ST_RUN) && !hit && !stop;
    cnt_inc   = shift;
    busy      = (state == ST_LOAD) || (state == ST_SAMPLE) || (state == ST_RUN);
    done      = (state == ST_DONE);
  end

endmodule
