// cycle_counter_tb: self-checking test of the pulse counter.
//
// Random clear / increment stimulus, compared every clock with an integer
// model; a narrow instance also checks wrap-around at 2^W-1.
module cycle_counter_tb;
  import pnfsr_pkg::*;

  localparam int W = CNT_W;
  logic clk = 0, rst, clear, inc;
  logic [W-1:0] count;
  logic [3:0] count4;
  longint unsigned model;
  int unsigned model4;
  int checks = 0, failures = 0;

  cycle_counter #(.W(W)) dut (.*);
  cycle_counter #(.W(4)) dut4 (.clk, .rst, .clear, .inc, .count(count4));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; clear = 0; inc = 0; model = 0; model4 = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 5000; i++) begin
      clear = ($urandom_range(0, 199) == 0);
      inc   = $urandom_range(0, 3) != 0;
      @(posedge clk);
      if (clear) begin model = 0; model4 = 0; end
      else if (inc) begin model++; model4 = (model4 + 1) % 16; end
      #1;
      checks += 2;
      if (count !== W'(model)) begin
        failures++;
        if (failures < 10) $display("count %0d exp %0d", count, model);
      end
      if (count4 !== 4'(model4)) begin
        failures++;
        if (failures < 10) $display("count4 %0d exp %0d", count4, model4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
