// sequence_control_tb: self-checking test of the control network.
//
// Plays the word detector by hand: after the controller enters its run
// state the testbench asserts `match` on the clock where a pretend cycle of
// length P has completed (P counted from the shift enables it sees), and
// also asserts it before the first pulse to check that the unprimed match
// is ignored. Checks the order load -> sample -> run, the number of shift
// pulses, the P+3 clock latency from start to done, stop, and generator
// mode, where matches must not end the run.
module sequence_control_tb;
  import pnfsr_pkg::*;

  logic clk = 0, rst, start, stop, match;
  run_mode_e mode;
  logic load, sample, shift, cnt_clear, cnt_inc, busy, done;
  ctrl_state_e state;
  int checks = 0, failures = 0;

  sequence_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Measure run of pretend cycle length p.
  task automatic measure(input int p);
    int shifts, clocks;
    start = 1; mode = MODE_MEASURE;
    @(posedge clk); #1 start = 0;
    clocks = 1;
    expect_(load && busy && !shift, "load after start");
    @(posedge clk); #1 clocks++;
    expect_(sample && cnt_clear && !shift, "sample after load");
    @(posedge clk); #1 clocks++;
    shifts = 0;
    // in run: detector sees initial state before first pulse
    match = 1;
    #1 expect_(shift && cnt_inc, "unprimed match ignored");
    while (!done && clocks < p + 100) begin
      match = (shifts == p);
      #1;
      if (shift) shifts++;
      expect_(shift == cnt_inc, "inc follows shift");
      @(posedge clk); #1 clocks++;
    end
    match = 0;
    expect_(done && !busy, "done reached");
    expect_(shifts == p, $sformatf("shift pulses %0d exp %0d", shifts, p));
    expect_(clocks - 1 == p + 3, $sformatf("latency %0d exp %0d", clocks - 1, p + 3));
    repeat (3) begin
      @(posedge clk); #1 expect_(done && !shift, "done holds");
    end
  endtask

  initial begin
    rst = 1; start = 0; stop = 0; match = 0; mode = MODE_MEASURE;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    expect_(state == ST_IDLE && !busy && !done, "idle after reset");
    for (int i = 0; i < 30; i++) measure(1 + $urandom_range(0, 200));
    measure(1);
    // stop aborts a run
    start = 1; @(posedge clk); #1 start = 0;
    repeat (10) @(posedge clk);
    #1 expect_(busy && shift, "running before stop");
    stop = 1; #1 expect_(!shift, "stop gates shift");
    @(posedge clk); #1 stop = 0;
    expect_(state == ST_IDLE && !busy, "idle after stop");
    // generator mode ignores matches
    mode = MODE_GENERATE; start = 1; @(posedge clk); #1 start = 0; mode = MODE_MEASURE;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 100; i++) begin
      match = $urandom_range(0, 1);
      #1 expect_(shift && busy, "generator keeps running");
      @(posedge clk); #1;
    end
    stop = 1; @(posedge clk); #1 stop = 0; match = 0;
    expect_(state == ST_IDLE, "generator stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
