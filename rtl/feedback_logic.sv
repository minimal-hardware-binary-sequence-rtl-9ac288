// feedback_logic: the feedback network of the field shift register.
//
// The bit fed back to stage 1 is the modulo-2 sum of the tapped stages,
// or its complement when `complement` is set. The highest stage of the
// effective length (`length`, 1..N) is always tapped; up to N_TAPS-1 more
// taps are given as stage numbers in `taps`, 0 meaning unused, so that
// feedback polynomials with up to N_TAPS+1 terms can be set. The usual
// three-tap case uses taps i < j and the last stage r = length.
//
// An optional nonlinear term (`nl_en`) is an AND gate that recognises one
// register state: it is 1 when every stage selected by `nl_mask` equals
// the matching bit of `nl_pattern`. Its output is added modulo 2 to the
// other feedback terms, so the recognised state jumps to a successor other
// than its normal one; this is how a maximal-length cycle is truncated.
//
// Purely combinational. From the original hardware: six taps, XOR or XNOR
// sum, a tap always on the last stage, the AND-gate nonlinear term. Own
// choices: tap numbers as binary stage numbers, a tap on a stage outside
// 1..N contributes nothing, and the AND gate's state given as mask/pattern.
module feedback_logic
  import pnfsr_pkg::*;
#(
  parameter int unsigned N     = N_STAGES,
  parameter int unsigned NTAPS = N_TAPS
) (
  input  logic [N-1:0]                       state,
  input  logic [$clog2(N+1)-1:0]             length,      // last stage r
  input  logic [NTAPS-2:0][$clog2(N+1)-1:0]  taps,        // extra taps, 0 = off
  input  logic                               complement,  // XNOR instead of XOR
  input  logic                               nl_en,       // nonlinear term on
  input  logic [N-1:0]                       nl_mask,     // stages the AND gate sees
  input  logic [N-1:0]                       nl_pattern,  // state it recognises
  output logic                               nl_hit,      // AND gate output
  output logic                               fb
);

  localparam int unsigned PW = $clog2(N + 1);

  // Content of the stage with the given number, 0 for stage 0 or > N.
  function automatic logic stage_bit(input logic [N-1:0] s, input logic [PW-1:0] num);
    logic b;
    b = 1'b0;
    for (int k = 1; k <= N; k++)
      if (num == PW'(k)) b = s[k-1];
    return b;
  endfunction

  logic lin_sum;

  always_comb begin
    lin_sum = stage_bit(state, length);
    for (int t = 0; t < NTAPS - 1; t++)
      lin_sum ^= stage_bit(state, taps[t]);
    nl_hit = nl_en && (((state ~^ nl_pattern) | ~nl_mask) == '1);
    fb     = lin_sum ^ complement ^ nl_hit;
  end

endmodule
