// pipeadc_top: 7-stage, 9-level-per-stage pipelined ADC with digital
// calibration of sub-DAC (capacitor mismatch) and interstage gain errors in
// its first three stages.
//
// The analog pipeline (pipeadc_frontend_model, behavioural) converts vin,
// each stage resolving one of nine levels and passing on four times its
// residue; the synthesizable pipeadc_cal_core does the rest. Inside it,
// digital_correction recombines the stage codes with weights
// 4^(7-k), adding to the backend code of each calibrated stage the
// compensation value its compensator picks by the stage's code. A calibration
// run (cal_start) lets cal_controller measure every unit capacitor of stages
// 3, 2 and 1 through the stages behind it, comp_value_calc turns the eight
// errors of a stage into its nine compensation values with adders only, and
// the values are loaded into the stage's compensator. After calibration
// capacitor mismatch and the interstage gain error no longer cause missing
// codes or jumps; what is left is an overall gain error equal to that of
// stage 1. Conversion results taken while cal_busy is high are not valid
// samples of vin. During a calibration run the compensation is forced on even
// when cal_bypass is high, so that each stage is measured through its
// already calibrated backend.
//
// Interface: vin in Delta units (-4.5..+4.5); dout is a signed 16-bit code
// with 1 LSB = Delta/4096, valid N_STAGES clocks after the edge on which
// stage 1 sampled vin; cal_bypass = 1 switches the compensation off.
module pipeadc_top
  import pipeadc_pkg::*;
#(
  parameter int unsigned N_STAGES      = N_STAGES_DEF,
  parameter int unsigned N_CAL         = N_CAL_DEF,
  parameter int unsigned OUT_W         = OUT_W_DEF,
  parameter int unsigned AVG_LOG2      = 4,
  parameter int unsigned SETTLE        = 16,
  parameter real         CAP_SIGMA     = 0.003,
  parameter real         OPAMP_GAIN_DB = 50.0,
  parameter real         THR_SIGMA     = 0.16,
  parameter real         NOISE_RMS     = 5.3e-8,
  parameter int unsigned SEED          = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  real                     vin,
  input  logic                    cal_start,
  input  logic                    cal_bypass,
  output logic                    cal_busy,
  output logic                    cal_done,
  output logic signed [OUT_W-1:0] dout,
  output logic                    dout_valid
);

  code_t      codes [N_STAGES];
  logic       fe_cal_en;
  logic [2:0] fe_cal_stage, fe_cal_cap;

  pipeadc_frontend_model #(
    .N_STAGES(N_STAGES), .CAP_SIGMA(CAP_SIGMA), .OPAMP_GAIN_DB(OPAMP_GAIN_DB),
    .THR_SIGMA(THR_SIGMA), .NOISE_RMS(NOISE_RMS), .SEED(SEED)
  ) u_fe (
    .clk       (clk),
    .vin       (vin),
    .cal_en    (fe_cal_en),
    .cal_stage (fe_cal_stage),
    .cal_cap   (fe_cal_cap),
    .codes     (codes)
  );

  pipeadc_cal_core #(
    .N_STAGES(N_STAGES), .N_CAL(N_CAL), .OUT_W(OUT_W), .AVG_LOG2(AVG_LOG2), .SETTLE(SETTLE)
  ) u_core (
    .clk          (clk),
    .rst_n        (rst_n),
    .codes        (codes),
    .cal_start    (cal_start),
    .cal_bypass   (cal_bypass),
    .fe_cal_en    (fe_cal_en),
    .fe_cal_stage (fe_cal_stage),
    .fe_cal_cap   (fe_cal_cap),
    .cal_busy     (cal_busy),
    .cal_done     (cal_done),
    .dout         (dout),
    .dout_valid   (dout_valid)
  );

endmodule
