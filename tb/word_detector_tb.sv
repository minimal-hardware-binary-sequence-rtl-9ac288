// word_detector_tb: self-checking test of the word detector.
//
// Samples random register words, then presents inputs from the register
// and from the external port that either equal the remembered word or
// differ from it in one stage, with random connect masks and lengths. The
// expected match is worked out stage by stage: a difference counts only in
// a connected stage within the effective length.
module word_detector_tb;
  import pnfsr_pkg::*;

  localparam int N = N_STAGES;
  localparam int PW = $clog2(N + 1);

  logic clk = 0, rst, sample, match;
  logic [N-1:0] fsr_state, ext_in, conn_mask, word;
  logic [PW-1:0] length;
  det_src_e src;
  logic [N-1:0] remembered;
  int checks = 0, failures = 0, n_match = 0;

  word_detector #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; sample = 0; fsr_state = '0; ext_in = '0; conn_mask = '1;
    length = PW'(N); src = DET_SRC_FSR; remembered = '0;
    @(posedge clk); #1 rst = 0;
    for (int run = 0; run < 500; run++) begin
      // sample a new word
      fsr_state = {$urandom, $urandom};
      sample = 1;
      @(posedge clk); #1 sample = 0;
      remembered = fsr_state;
      checks++;
      if (word !== remembered) failures++;
      for (int i = 0; i < 20; i++) begin
        logic [N-1:0] probe;
        bit exp;
        probe = remembered;
        if ($urandom_range(0, 1)) probe[$urandom_range(0, N - 1)] ^= 1'b1;
        if ($urandom_range(0, 3) == 0) probe = {$urandom, $urandom};
        src = det_src_e'($urandom_range(0, 1));
        if (src == DET_SRC_EXT) begin ext_in = probe; fsr_state = {$urandom, $urandom}; end
        else begin fsr_state = probe; ext_in = {$urandom, $urandom}; end
        conn_mask = ($urandom_range(0, 1)) ? '1 : N'({$urandom, $urandom});
        length = PW'($urandom_range(1, N));
        #1;
        exp = 1;
        for (int k = 1; k <= N; k++)
          if (k <= length && conn_mask[k-1] && probe[k-1] != remembered[k-1]) exp = 0;
        if (exp) n_match++;
        checks++;
        if (match !== exp) begin
          failures++;
          if (failures < 10) $display("match %b exp %b", match, exp);
        end
        @(posedge clk);
        // word must not change without sample
        checks++;
        if (word !== remembered) failures++;
      end
    end
    checks++;
    if (n_match == 0) begin failures++; $display("no match case exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
