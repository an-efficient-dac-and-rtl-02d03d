// digital_correction: digital back end of the pipelined ADC. It lines the
// stage codes up in time, adds the calibration compensation of the first
// N_CAL stages and recombines everything into one output word.
//
// How it works. Stage k (1-based) of the analog pipeline delivers its code k-1
// clocks after stage 1, so a shift register of N_STAGES-k flip-flops per
// stage brings all codes of one sample together. The recombination follows
// the stage chain from the back: P_N = D_N, and for k = N-1 .. 1
//     P_k = (D_k - 4) * 4^(N-k) + P_(k+1) + C_k[D_k]
// where the division by 4 between stages of the source description is
// realised by weighting stage k with 4^(N-k) (shifts only) and C_k[D_k] is the
// compensation value picked by the stage's compensator (only k <= N_CAL, and
// only while bypass is low). P_(k+1) is the "backend" code of stage k: the
// calibration controller reads it to measure the stage's capacitors. The
// alignment registers and the output saturation are this design's choices;
// the weighting and the compensation adders follow the source description.
//
// Interface: codes[i] is stage i+1's code (0..8); dout is P_1 in units of
// Delta/4^(N-1), saturated to OUT_W bits; backend[i] is P_(i+2), unsaturated.
// Timing: one register stage after alignment, so a sample taken by stage 1
// at edge n appears on dout after edge n+N_STAGES. dout_valid rises once the
// alignment registers are filled after reset. comp_load[i] writes ccs_in into
// stage i+1's compensator.
module digital_correction
  import pipeadc_pkg::*;
#(
  parameter int unsigned N_STAGES = N_STAGES_DEF,
  parameter int unsigned N_CAL    = N_CAL_DEF,
  parameter int unsigned OUT_W    = OUT_W_DEF,
  parameter int unsigned ACC_W    = ACC_W_DEF,
  parameter int unsigned COMP_W   = COMP_W_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  code_t                    codes     [N_STAGES],
  input  logic                     bypass,
  input  logic [N_CAL-1:0]         comp_load,
  input  logic signed [COMP_W-1:0] ccs_in    [N_LEVELS],
  output logic signed [OUT_W-1:0]  dout,
  output logic                     dout_valid,
  output logic signed [ACC_W-1:0]  backend   [N_CAL]
);

  localparam int unsigned MAXD = N_STAGES - 1;

  // ---- time alignment ------------------------------------------------
  code_t aligned [N_STAGES];

  for (genvar i = 0; i < N_STAGES; i++) begin : g_align
    localparam int unsigned DLY = MAXD - i;
    if (DLY == 0) begin : g_none
      assign aligned[i] = codes[i];
    end else begin : g_sr
      code_t sr [DLY];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int t = 0; t < DLY; t++) sr[t] <= code_t'(MID_CODE);
        end else begin
          sr[0] <= codes[i];
          for (int t = 1; t < DLY; t++) sr[t] <= sr[t-1];
        end
      end
      assign aligned[i] = sr[DLY-1];
    end
  end

  // ---- compensators (calibrated stages only) -------------------------
  logic signed [COMP_W-1:0] comp [N_CAL];

  for (genvar i = 0; i < N_CAL; i++) begin : g_comp
    stage_compensator #(.COMP_W(COMP_W)) u_comp (
      .clk    (clk),
      .rst_n  (rst_n),
      .load   (comp_load[i]),
      .ccs_in (ccs_in),
      .code   (aligned[i]),
      .comp   (comp[i])
    );
  end

  // ---- recombination --------------------------------------------------
  logic signed [ACC_W-1:0] p [N_STAGES];

  always_comb begin
    logic signed [ACC_W-1:0] lvl;
    lvl         = ACC_W'(signed'({1'b0, aligned[MAXD]})) - ACC_W'(MID_CODE);
    p[MAXD]     = lvl;
    for (int i = int'(MAXD) - 1; i >= 0; i--) begin
      lvl  = ACC_W'(signed'({1'b0, aligned[i]})) - ACC_W'(MID_CODE);
      p[i] = (lvl <<< (2 * (int'(MAXD) - i))) + p[i+1];
      if (i < int'(N_CAL) && !bypass)
        p[i] = p[i] + ACC_W'(comp[i]);
    end
  end

  localparam logic signed [ACC_W-1:0] OUT_MAX = ACC_W'((2 ** (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] OUT_MIN = -ACC_W'(2 ** (OUT_W - 1));

  logic [$clog2(N_STAGES+1)-1:0] fill_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout       <= '0;
      dout_valid <= 1'b0;
      fill_q     <= '0;
      for (int i = 0; i < N_CAL; i++) backend[i] <= '0;
    end else begin
      if (p[0] > OUT_MAX)      dout <= OUT_MAX[OUT_W-1:0];
      else if (p[0] < OUT_MIN) dout <= OUT_MIN[OUT_W-1:0];
      else                     dout <= p[0][OUT_W-1:0];
      for (int i = 0; i < N_CAL; i++) backend[i] <= p[i+1];
      if (32'(fill_q) < MAXD) fill_q <= fill_q + 1'b1;
      dout_valid <= (32'(fill_q) >= MAXD);
    end
  end

endmodule
