// pnfsr_pkg: constants and types shared by the pseudonoise sequence
// generator / cycle-length detector.
//
// The register has 35 stages and the feedback network accepts six taps;
// both numbers follow the original hardware. Stage numbers run from 1
// (the stage that receives the feedback) to N_STAGES (the highest); the
// value 0 of a stage number means "not connected". The 36-bit cycle count
// (enough for the longest possible cycle of 2^35 states) and the
// controller's state encoding are this design's own choices.
package pnfsr_pkg;

  parameter int unsigned N_STAGES = 35;  // flip-flops in the register
  parameter int unsigned N_TAPS   = 6;   // feedback taps, last stage included
  parameter int unsigned POS_W    = $clog2(N_STAGES + 1);  // stage number width
  parameter int unsigned CNT_W    = N_STAGES + 1;          // cycle count width

  typedef logic [POS_W-1:0] stage_num_t;

  // Operating mode chosen when a run is started.
  typedef enum logic {
    MODE_MEASURE  = 1'b0,  // run until the initial state returns, count pulses
    MODE_GENERATE = 1'b1   // free-running sequence generator, run until stopped
  } run_mode_e;

  // Word detector input source.
  typedef enum logic {
    DET_SRC_FSR = 1'b0,  // the register's own stages
    DET_SRC_EXT = 1'b1   // outputs of logic circuits under test
  } det_src_e;

  // States of the sequential control network.
  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,  // clock to the register held off
    ST_LOAD   = 3'd1,  // initial state inserted into the register
    ST_SAMPLE = 3'd2,  // word detector samples the initial state (primed)
    ST_RUN    = 3'd3,  // clock strobes the register, pulses counted
    ST_DONE   = 3'd4   // initial word seen again, count holds cycle length
  } ctrl_state_e;

endpackage
