// fsr_register_tb: self-checking test of the shift register.
//
// Drives random load / shift / feedback / output-select patterns into a
// 35-stage register and compares its state and selected output every
// clock with a model that keeps the stages as an unpacked bit array
// (stage 1 at index 1) and moves them one by one.
module fsr_register_tb;
  import pnfsr_pkg::*;

  localparam int N = N_STAGES;
  localparam int PW = $clog2(N + 1);

  logic clk = 0, rst, load, shift, fb_in, seq_out;
  logic [N-1:0] init_state, state;
  logic [PW-1:0] out_sel;
  bit   model [1:N];
  int   checks = 0, failures = 0;

  fsr_register #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    bit exp_out;
    for (int k = 1; k <= N; k++) begin
      checks++;
      if (state[k-1] !== model[k]) begin
        failures++;
        if (failures < 10) $display("stage %0d: got %b exp %b", k, state[k-1], model[k]);
      end
    end
    exp_out = (out_sel >= 1 && out_sel <= N) ? model[out_sel] : 1'b0;
    checks++;
    if (seq_out !== exp_out) begin
      failures++;
      if (failures < 10) $display("seq_out sel %0d: got %b exp %b", out_sel, seq_out, exp_out);
    end
  endtask

  initial begin
    rst = 1; load = 0; shift = 0; fb_in = 0; init_state = '0; out_sel = '0;
    for (int k = 1; k <= N; k++) model[k] = 0;
    @(posedge clk); #1 rst = 0;
    compare();
    for (int cyc = 0; cyc < 3000; cyc++) begin
      load  = ($urandom_range(0, 15) == 0);
      shift = $urandom_range(0, 3) != 0;
      fb_in = $urandom_range(0, 1);
      init_state = {$urandom, $urandom};
      out_sel = PW'($urandom_range(0, N + 2));
      @(posedge clk);
      if (load) begin
        for (int k = 1; k <= N; k++) model[k] = init_state[k-1];
      end else if (shift) begin
        for (int k = N; k >= 2; k--) model[k] = model[k-1];
        model[1] = fb_in;
      end
      #1 compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
