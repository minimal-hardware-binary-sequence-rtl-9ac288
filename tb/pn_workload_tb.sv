// pn_workload_tb: measures maximal-length pseudonoise cycles on the full
// 35-stage design, in the 20-stage-and-up range used for PN work.
//
// Cases (r = degree, L = register length used, taps besides stage L):
//   * primitive trinomials x^L + x^t + 1 for L = 20, 21, 22, 23
//     (t = 3, 2, 1, 5): expected cycle 2^L - 1;
//   * three-tap feedback on r+1 stages for degrees that have no primitive
//     trinomial: 1 + x^i + x^j + x^(r+1) = (1 + x) p(x) with p primitive of
//     degree r. Every initial state other than all-zeros and all-ones then
//     lies on a cycle of length 2^r - 1. Used: r = 8 on 9 stages with taps
//     2, 6, 9, and r = 24 on 25 stages with taps 2, 14, 25. The
//     factorisation and primitivity were checked by polynomial arithmetic
//     over GF(2): p(x) must divide x^(2^r-1) - 1 and no x^((2^r-1)/q) - 1
//     for a prime q dividing 2^r - 1.
// Each count and the start-to-done latency (count + 3 clocks) are checked.
module pn_workload_tb;
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

  pn_gen_detector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int len, input int t1, input int t2, input longint exp_p);
    longint clocks;
    length = PW'(len); taps = '0; taps[0] = PW'(t1); taps[1] = PW'(t2);
    init_state = N'(35'h2_5a5a_1234) & ((N'(1) << len) - 1);
    @(negedge clk) start = 1;
    @(posedge clk);
    @(negedge clk) start = 0;
    clocks = 0;
    while (!done && clocks < exp_p + 20) begin
      @(posedge clk); clocks++;
      @(negedge clk);
    end
    checks += 3;
    if (!done) failures++;
    if (cycle_count != CW'(exp_p)) failures++;
    if (clocks != exp_p + 3) failures++;
    $display("L=%0d taps %0d,%0d,%0d: cycle %0d expected %0d, %0d clocks", len, t1, t2, len,
             cycle_count, exp_p, clocks);
  endtask

  initial begin
    rst = 1; start = 0; stop = 0; mode = MODE_MEASURE; det_src = DET_SRC_FSR;
    det_mask = '1; ext_in = '0; complement = 0; nl_en = 0; nl_mask = '0; nl_pattern = '0;
    out_sel = PW'(N); length = PW'(N); init_state = '0; taps = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run(9, 2, 6, (64'd1 << 8) - 1);
    run(20, 3, 0, (64'd1 << 20) - 1);
    run(21, 2, 0, (64'd1 << 21) - 1);
    run(22, 1, 0, (64'd1 << 22) - 1);
    run(23, 5, 0, (64'd1 << 23) - 1);
    run(25, 2, 14, (64'd1 << 24) - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
