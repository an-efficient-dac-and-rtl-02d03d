// pipeadc_cal_core: the synthesizable digital part of the calibrated
// pipelined ADC, everything between the stage codes of the analog pipeline
// and the output word.
//
// It holds the recombination with compensation (digital_correction, with
// one stage_compensator per calibrated stage), the calibration sequencer
// (cal_controller) and the adder network that turns measured capacitor errors
// into compensation values (comp_value_calc). No multiplier or divider is
// used anywhere: stage weights are shifts, the averaging is a shift, and the
// compensation is a sum of measured errors. During a calibration run the
// compensation is forced on even when cal_bypass is high, so that each stage
// is measured through its already calibrated backend (own choice).
//
// Interface: codes[k] is stage k+1's sub-flash code (0..8), stage k+1 one
// clock behind stage k; fe_cal_* put the analog pipeline into the measuring
// configuration (stage fe_cal_stage+1 input grounded, capacitor
// Cs(fe_cal_cap+1) to +Vref). dout is valid N_STAGES clocks after stage 1
// took its sample; results taken while cal_busy is high are not samples of
// the input.
module pipeadc_cal_core
  import pipeadc_pkg::*;
#(
  parameter int unsigned N_STAGES = N_STAGES_DEF,
  parameter int unsigned N_CAL    = N_CAL_DEF,
  parameter int unsigned OUT_W    = OUT_W_DEF,
  parameter int unsigned AVG_LOG2 = 4,
  parameter int unsigned SETTLE   = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  code_t                   codes [N_STAGES],
  input  logic                    cal_start,
  input  logic                    cal_bypass,
  output logic                    fe_cal_en,
  output logic [2:0]              fe_cal_stage,
  output logic [2:0]              fe_cal_cap,
  output logic                    cal_busy,
  output logic                    cal_done,
  output logic signed [OUT_W-1:0] dout,
  output logic                    dout_valid
);

  logic signed [EPS_W_DEF-1:0]  eps     [N_CAPS];
  logic signed [COMP_W_DEF-1:0] ccs     [N_LEVELS];
  logic [N_CAL-1:0]             comp_load;
  logic signed [ACC_W_DEF-1:0]  backend [N_CAL];

  digital_correction #(.N_STAGES(N_STAGES), .N_CAL(N_CAL), .OUT_W(OUT_W)) u_dc (
    .clk        (clk),
    .rst_n      (rst_n),
    .codes      (codes),
    .bypass     (cal_bypass && !cal_busy),
    .comp_load  (comp_load),
    .ccs_in     (ccs),
    .dout       (dout),
    .dout_valid (dout_valid),
    .backend    (backend)
  );

  cal_controller #(.N_STAGES(N_STAGES), .N_CAL(N_CAL), .AVG_LOG2(AVG_LOG2),
                   .SETTLE(SETTLE)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (cal_start),
    .backend      (backend),
    .fe_cal_en    (fe_cal_en),
    .fe_cal_stage (fe_cal_stage),
    .fe_cal_cap   (fe_cal_cap),
    .eps          (eps),
    .comp_load    (comp_load),
    .busy         (cal_busy),
    .done         (cal_done)
  );

  comp_value_calc u_calc (
    .eps (eps),
    .ccs (ccs)
  );

endmodule
