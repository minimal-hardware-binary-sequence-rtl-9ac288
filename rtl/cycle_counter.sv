// cycle_counter: counts the clock pulses applied to the shift register.
//
// `clear` zeroes the count; `inc` adds one per clock. At the end of a
// measurement the count equals the number of pulses the register needed to
// come back to its initial state, i.e. the length of the cycle that
// contains that state. The count wraps after 2^W-1; the default width of
// N_STAGES+1 bits holds the longest cycle a 35-stage register can have
// (2^35 states) without wrapping.
//
// Timing: count changes one clock after clear/inc; clear has priority.
// From the original hardware: a count of pulses. Own choices: the width,
// synchronous reset and clear.
module cycle_counter
  import pnfsr_pkg::*;
#(
  parameter int unsigned W = CNT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         inc,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst || clear) count <= '0;
    else if (inc)     count <= count + 1'b1;
  end

endmodule
