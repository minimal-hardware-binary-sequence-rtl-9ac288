// pn_gen_detector_tb: end-to-end test of the generator / detector at its
// default size (35 stages, 6 taps).
//
// Each measurement sets the register up, pulses start and waits for done;
// the cycle count is compared with a period worked out here, by stepping
// a separate model of the register (an unpacked bit array, feedback from
// the parity of the tapped stages) until the connected stages return to
// the initial state, and, for polynomials known to be primitive, with
// 2^r-1. Each run also checks that done comes P+3 clocks after start and
// that the register is back in its initial word.
//
// Mechanisms exercised and counted: change of length, insertion of an
// initial state, XOR and complemented (XNOR) feedback, a six-tap
// feedback, the nonlinear AND-gate term (truncated cycle), a partial word
// detector connection, the detector switched to external inputs,
// generator mode with the output taken from the last and from another
// stage, and a stop that aborts a run. A final run measures the maximal
// cycle of x^20+x^3+1, 2^20-1 = 1048575 pulses.
module pn_gen_detector_tb;
  import pnfsr_pkg::*;

  localparam int N  = N_STAGES;
  localparam int NT = N_TAPS;
  localparam int PW = $clog2(N + 1);
  localparam int CW = N + 1;

  logic clk = 0, rst, start, stop, complement, nl_en, seq_out, busy, done;
  logic det_match, nl_hit;
  run_mode_e mode;
  det_src_e det_src;
  logic [PW-1:0] length, out_sel;
  logic [N-1:0] init_state, nl_mask, nl_pattern, det_mask, ext_in, stage_q, det_word;
  logic [NT-2:0][PW-1:0] taps;
  logic [CW-1:0] cycle_count;
  ctrl_state_e ctrl_state;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_len_change = 0, n_init = 0, n_xor = 0, n_xnor = 0, n_six_tap = 0;
  int n_nl_trunc = 0, n_partial_mask = 0, n_ext_stop = 0, n_gen_last = 0;
  int n_gen_other = 0, n_stop = 0, n_maximal = 0;
  int last_len = -1;
  longint nl_hits_in_run;

  pn_gen_detector dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (nl_hit && dut.shift) nl_hits_in_run++;

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- reference model ----------------
  typedef bit stages_t [1:N];

  function automatic bit model_fb(input stages_t s);
    int ones = 0;
    bit hit;
    if (s[int'(length)]) ones++;
    for (int t = 0; t < NT - 1; t++)
      if (taps[t] != 0 && s[int'(taps[t])]) ones++;
    hit = nl_en;
    for (int k = 1; k <= N; k++)
      if (nl_mask[k-1] && s[k] != nl_pattern[k-1]) hit = 0;
    return bit'(ones & 1) ^ complement ^ hit;
  endfunction

  function automatic void model_step(ref stages_t s);
    bit f;
    f = model_fb(s);
    for (int k = N; k >= 2; k--) s[k] = s[k-1];
    s[1] = f;
  endfunction

  function automatic bit model_seen(input stages_t s);
    for (int k = 1; k <= int'(length); k++)
      if (det_mask[k-1] && s[k] != init_state[k-1]) return 0;
    return 1;
  endfunction

  // Pulses until the connected stages show the initial word again; -1 if
  // not within `limit`.
  function automatic longint model_period(input longint limit);
    stages_t s;
    for (int k = 1; k <= N; k++) s[k] = init_state[k-1];
    for (longint p = 1; p <= limit; p++) begin
      model_step(s);
      if (model_seen(s)) return p;
    end
    return -1;
  endfunction

  // ---------------- stimulus helpers ----------------
  task automatic defaults();
    mode = MODE_MEASURE; det_src = DET_SRC_FSR; det_mask = '1; ext_in = '0;
    complement = 0; nl_en = 0; nl_mask = '0; nl_pattern = '0; taps = '0;
    out_sel = PW'(N);
  endtask

  task automatic note_settings();
    if (int'(length) != last_len && last_len != -1) n_len_change++;
    last_len = int'(length);
    if (init_state != '0 && init_state != N'(1)) n_init++;
    if (complement) n_xnor++; else n_xor++;
  endtask

  // One measurement; returns the measured count.
  task automatic measure(input longint exp_p, input string name);
    longint clocks;
    nl_hits_in_run = 0;
    note_settings();
    @(negedge clk) start = 1;
    @(posedge clk);
    @(negedge clk) start = 0;
    clocks = 0;
    while (!done && clocks < exp_p + 20) begin
      @(posedge clk); clocks++;
      @(negedge clk);
    end
    expect_(done, {name, ": done"});
    expect_(cycle_count == CW'(exp_p),
            $sformatf("%s: count %0d exp %0d", name, cycle_count, exp_p));
    expect_(clocks == exp_p + 3, $sformatf("%s: latency %0d exp %0d", name, clocks, exp_p + 3));
    for (int k = 0; k < int'(length); k++)
      if (det_mask[k] && det_src == DET_SRC_FSR)
        expect_(stage_q[k] == init_state[k], {name, ": back at initial word"});
    expect_(det_word == init_state, {name, ": detector word"});
  endtask

  task automatic measure_model(input string name);
    longint p;
    p = model_period(64'd1 << (int'(length) + 1));
    expect_(p > 0, {name, ": model finds a cycle"});
    if (p > 0) measure(p, name);
  endtask

  initial begin
    rst = 1; start = 0; stop = 0; length = PW'(5); init_state = '0;
    defaults();
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // x^5+x^2+1 is primitive: maximal cycle 31
    defaults(); length = 5; taps[0] = 2; init_state = 35'b10110;
    measure(31, "L5 trinomial");
    expect_(model_period(100) == 31, "model agrees on 31");
    n_maximal++;

    // pure rotation of 35 stages, one 1: cycle 35
    defaults(); length = 35; init_state = 35'd1;
    measure(35, "L35 rotation");
    // complemented feedback from stage 35 only: 35 ones then 35 zeros
    defaults(); length = 35; complement = 1; init_state = '0;
    measure(70, "L35 xnor");

    // x^8+x^6+x^5+x^4+1 primitive: 255, five-term feedback
    defaults(); length = 8; taps[0] = 6; taps[1] = 5; taps[2] = 4; init_state = 35'h5a;
    measure(255, "L8 pentanomial"); n_maximal++;

    // six taps (the most the network takes): period from the model
    defaults(); length = 12; taps = {6'd11, 6'd9, 6'd7, 6'd4, 6'd1}; init_state = 35'h9c3;
    measure_model("L12 six taps"); n_six_tap++;
    // six taps, complemented
    complement = 1; measure_model("L12 six taps xnor"); n_six_tap++;

    // nonlinear term truncates the L5 maximal cycle: the AND gate sees
    // stages 1..4 of one state of the cycle (stage 5 free: stays invertible)
    defaults(); length = 5; taps[0] = 2; init_state = 35'b00001;
    nl_en = 1; nl_mask = 35'b01111; nl_pattern = 35'b00100;
    begin
      longint p;
      p = model_period(64);
      expect_(p > 0 && p < 31, $sformatf("truncated model cycle %0d", p));
      measure(p, "L5 nonlinear");
      if (nl_hits_in_run > 0 && p < 31) n_nl_trunc++;
    end

    // partial detector connection: only stages 1..3 watched on L5
    defaults(); length = 5; taps[0] = 2; init_state = 35'b10110; det_mask = 35'b00111;
    measure_model("L5 partial detector");
    if (cycle_count < 31) n_partial_mask++;

    // random configurations
    for (int r = 0; r < 60; r++) begin
      defaults();
      length = PW'($urandom_range(2, 12));
      for (int t = 0; t < NT - 1; t++)
        taps[t] = ($urandom_range(0, 1)) ? PW'($urandom_range(1, int'(length) - 1)) : '0;
      complement = $urandom_range(0, 1);
      init_state = N'({$urandom, $urandom}) & ((N'(1) << length) - 1);
      if ($urandom_range(0, 2) == 0) begin
        nl_en = 1;
        nl_mask = N'($urandom) & ((N'(1) << (length - 1)) - 1);
        nl_pattern = N'($urandom);
      end
      if ($urandom_range(0, 3) == 0) det_mask = N'({$urandom, $urandom}) | N'(1);
      if (taps != '0 && taps[0] != 0 && taps[1] != 0 && taps[2] != 0 && taps[3] != 0 && taps[4] != 0)
        n_six_tap++;
      measure_model($sformatf("random %0d", r));
    end

    // detector switched to a logic circuit under test: the testbench plays
    // that circuit and shows the sampled word 57 pulses into the run
    defaults(); length = 5; taps[0] = 2; init_state = 35'b10011; det_src = DET_SRC_EXT;
    ext_in = ~init_state;
    fork
      begin
        wait (ctrl_state == ST_RUN);
        repeat (57) @(posedge clk);
        @(negedge clk) ext_in = init_state;
      end
      measure(57, "external stop");
    join
    n_ext_stop++;
    ext_in = '0;

    // generator mode: compare seq_out with the model, from stage 5 (last)
    // and from stage 3
    for (int sel = 0; sel < 2; sel++) begin
      stages_t s;
      defaults(); length = 5; taps[0] = 2; init_state = 35'b01101; mode = MODE_GENERATE;
      out_sel = (sel == 0) ? PW'(5) : PW'(3);
      for (int k = 1; k <= N; k++) s[k] = init_state[k-1];
      @(negedge clk) start = 1;
      @(posedge clk);
      @(negedge clk) start = 0;
      wait (ctrl_state == ST_RUN);
      @(negedge clk);
      for (int i = 0; i < 200; i++) begin
        expect_(busy, "generator busy");
        expect_(seq_out == s[int'(out_sel)], $sformatf("gen out sel %0d step %0d", out_sel, i));
        @(posedge clk); model_step(s);
        @(negedge clk);
      end
      if (sel == 0) n_gen_last++; else n_gen_other++;
      stop = 1; @(posedge clk); @(negedge clk) stop = 0;
      expect_(!busy && !done, "generator stopped");
    end

    // stop aborts a measurement
    defaults(); length = 20; taps[0] = 3; init_state = 35'd1;
    @(negedge clk) start = 1; @(posedge clk); @(negedge clk) start = 0;
    repeat (100) @(posedge clk);
    @(negedge clk) stop = 1; @(posedge clk); @(negedge clk) stop = 0;
    expect_(!busy && !done && ctrl_state == ST_IDLE, "measurement aborted");
    n_stop++;

    // x^20+x^3+1 is primitive: maximal cycle 2^20-1
    defaults(); length = 20; taps[0] = 3; init_state = 35'h80001;
    measure((64'd1 << 20) - 1, "L20 maximal"); n_maximal++;

    // every mechanism must have happened
    expect_(n_len_change > 0, "length changed");
    expect_(n_init > 0, "initial state inserted");
    expect_(n_xor > 0, "xor feedback");
    expect_(n_xnor > 0, "xnor feedback");
    expect_(n_six_tap > 0, "six taps");
    expect_(n_nl_trunc > 0, "nonlinear truncation");
    expect_(n_partial_mask > 0, "partial detector");
    expect_(n_ext_stop > 0, "external detector stop");
    expect_(n_gen_last > 0 && n_gen_other > 0, "generator outputs");
    expect_(n_stop > 0, "stop");
    expect_(n_maximal > 0, "maximal cycles");
    $display("mechanisms: len_change=%0d init=%0d xor=%0d xnor=%0d six_tap=%0d nl_trunc=%0d partial=%0d ext=%0d gen=%0d/%0d stop=%0d maximal=%0d",
             n_len_change, n_init, n_xor, n_xnor, n_six_tap, n_nl_trunc, n_partial_mask,
             n_ext_stop, n_gen_last, n_gen_other, n_stop, n_maximal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
