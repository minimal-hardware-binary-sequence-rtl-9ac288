// feedback_logic_tb: self-checking test of the feedback network.
//
// Applies random register states, lengths, tap sets, complement and
// nonlinear-term settings. The expected feedback bit is formed by counting
// the ones among the tapped stages (parity of the count), optionally
// inverted, and the expected AND-gate output by walking the masked stages
// one at a time. A few directed cases check known trinomial feedback.
module feedback_logic_tb;
  import pnfsr_pkg::*;

  localparam int N = N_STAGES;
  localparam int NT = N_TAPS;
  localparam int PW = $clog2(N + 1);

  logic [N-1:0] state, nl_mask, nl_pattern;
  logic [PW-1:0] length;
  logic [NT-2:0][PW-1:0] taps;
  logic complement, nl_en, nl_hit, fb;
  int checks = 0, failures = 0;

  feedback_logic #(.N(N), .NTAPS(NT)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    int ones;
    bit exp_hit, exp_fb;
    ones = 0;
    if (length >= 1 && length <= N && state[length-1]) ones++;
    for (int t = 0; t < NT - 1; t++)
      if (taps[t] >= 1 && taps[t] <= N && state[taps[t]-1]) ones++;
    exp_hit = nl_en;
    for (int k = 0; k < N; k++)
      if (nl_mask[k] && state[k] != nl_pattern[k]) exp_hit = 0;
    exp_fb = ((ones % 2) == 1) ^ complement ^ exp_hit;
    checks += 2;
    if (nl_hit !== exp_hit || fb !== exp_fb) begin
      failures++;
      if (failures < 10)
        $display("state %h len %0d taps %p comp %b nl %b: fb %b exp %b hit %b exp %b",
                 state, length, taps, complement, nl_en, fb, exp_fb, nl_hit, exp_hit);
    end
  endtask

  initial begin
    // directed: taps 2 and r=5, state with stage 2 = 1 and stage 5 = 0
    state = '0; state[1] = 1; length = 5; taps = '0; taps[0] = 2;
    complement = 0; nl_en = 0; nl_mask = '0; nl_pattern = '0;
    #1 check_now();
    checks++; if (fb !== 1'b1) failures++;
    complement = 1;
    #1 check_now();
    checks++; if (fb !== 1'b0) failures++;
    // nonlinear term: recognise state exactly, inverts the feedback
    complement = 0; nl_en = 1; nl_mask = '1; nl_pattern = state;
    #1 check_now();
    checks++; if (fb !== 1'b0 || nl_hit !== 1'b1) failures++;
    for (int i = 0; i < 20000; i++) begin
      state = {$urandom, $urandom};
      length = PW'($urandom_range(1, N));
      for (int t = 0; t < NT - 1; t++)
        taps[t] = ($urandom_range(0, 2) == 0) ? '0 : PW'($urandom_range(1, N + 3));
      complement = $urandom_range(0, 1);
      nl_en = $urandom_range(0, 1);
      nl_mask = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      // make the AND gate fire often: pattern mostly equal to state
      nl_pattern = ($urandom_range(0, 1)) ? state : state ^ (N'(1) << $urandom_range(0, N - 1));
      #1 check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
