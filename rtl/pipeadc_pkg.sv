// pipeadc_pkg: constants and types shared by the 7-stage, 9-level-per-stage
// pipelined ADC and its digital DAC / interstage-gain calibration.
//
// The converter has seven stages. Stages 1..6 resolve one of nine levels
// (code 0..8, value code-4) and pass on their residue amplified by 4; stage 7
// is a bare 9-level flash. Digital results are kept in units of the final
// LSB, Delta/4^6, so stage k carries the weight 4^(7-k). Only the stage count,
// the 9 levels, the 8 unit capacitors, the gain of 4, the 3 calibrated stages
// and the 16-bit output follow the source description; all widths not named
// there are this design's choice.
package pipeadc_pkg;

  localparam int unsigned N_STAGES_DEF = 7;   // pipeline stages
  localparam int unsigned N_CAL_DEF    = 3;   // stages that are calibrated
  localparam int unsigned N_CAPS       = 8;   // unit capacitors (1-bit DACs) per stage
  localparam int unsigned N_LEVELS     = 9;   // sub-flash levels per stage
  localparam int unsigned MID_CODE     = 4;   // code of level 0
  localparam int unsigned CODE_W       = 4;   // width of a sub-flash code 0..8
  localparam int unsigned OUT_W_DEF    = 16;  // output word
  localparam int unsigned ACC_W_DEF    = 20;  // internal recombination word
  localparam int unsigned EPS_W_DEF    = 14;  // measured capacitor error
  localparam int unsigned COMP_W_DEF   = 16;  // compensation value

  typedef logic [CODE_W-1:0] code_t;

  // Weight of stage k (1-based) in final LSBs: 4^(n_stages-k).
  function automatic int stage_weight(input int n_stages, input int k);
    return 1 << (2 * (n_stages - k));
  endfunction

endpackage
