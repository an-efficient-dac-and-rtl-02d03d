// pipeadc_frontend_model: behavioural model of the analog part of the
// pipelined ADC (not synthesizable).
//
// Stages 1..N_STAGES-1 each consist of a 9-level sub-flash ADC, the
// capacitor decoder (dac_decoder, synthesizable) and a unit-capacitor MDAC
// with a nominal gain of 4; the last stage is a bare 9-level sub-flash. Each
// stage registers its code and its amplified residue on the rising clock
// edge, and the next stage works on that residue during the following clock,
// so stage k's code for a sample appears k-1 clocks after stage 1's. Thermal
// noise of NOISE_RMS Delta is added to every registered residue.
//
// Calibration configuration: while cal_en is high, stage cal_stage+1 has its
// input grounded and its decoder overridden so that only capacitor
// Cs(cal_cap+1) is switched to +Vref; the stages behind it digitise the
// result as usual and the earlier stages keep converting vin.
//
// The stage structure and the calibration configuration follow the source
// description. The single clock per stage (sampling and amplification
// phases merged) and the expression of comparator offset and noise in Delta
// units (30 mV and 10 nV rms over an assumed Delta of 187.5 mV) are this
// model's choices. Every stage draws its own mismatch from SEED.
//
// Interface: vin in Delta units (-4.5..+4.5 is the input range); codes[k]
// is the registered code of stage k+1.
module pipeadc_frontend_model
  import pipeadc_pkg::*;
  import model_rand_pkg::*;
#(
  parameter int unsigned N_STAGES      = N_STAGES_DEF,
  parameter real         CAP_SIGMA     = 0.003,
  parameter real         OPAMP_GAIN_DB = 50.0,
  parameter real         THR_SIGMA     = 0.16,
  parameter real         NOISE_RMS     = 5.3e-8,
  parameter int unsigned SEED          = 1
) (
  input  logic       clk,
  input  real        vin,
  input  logic       cal_en,
  input  logic [2:0] cal_stage,
  input  logic [2:0] cal_cap,
  output code_t      codes [N_STAGES]
);

  real res_q [N_STAGES-1];   // registered residue of each MDAC stage

  for (genvar k = 0; k < N_STAGES - 1; k++) begin : g_stage
    real               v_in;
    real               v_out;
    code_t             code_c;
    logic [N_CAPS-1:0] dec_p, dec_n, dac_p, dac_n;
    logic              measuring;
    int unsigned       nst;

    assign measuring = cal_en && (cal_stage == 3'(k));

    if (k == 0) begin : g_first
      assign v_in = measuring ? 0.0 : vin;
    end else begin : g_next
      assign v_in = measuring ? 0.0 : res_q[k-1];
    end

    subflash_adc_model #(.THR_SIGMA(THR_SIGMA), .SEED(SEED * 31 + k)) u_flash (
      .vin  (v_in),
      .code (code_c)
    );

    dac_decoder u_dec (
      .code  (code_c),
      .dac_p (dec_p),
      .dac_n (dec_n)
    );

    assign dac_p = measuring ? (N_CAPS'(1) << cal_cap) : dec_p;
    assign dac_n = measuring ? '0 : dec_n;

    mdac_model #(.CAP_SIGMA(CAP_SIGMA), .OPAMP_GAIN_DB(OPAMP_GAIN_DB),
                 .SEED(SEED * 17 + k)) u_mdac (
      .vin   (v_in),
      .dac_p (dac_p),
      .dac_n (dac_n),
      .vout  (v_out)
    );

    initial nst = SEED * 32'd40503 + 32'(k);

    // Plain always: the noise generator state is also seeded by the initial
    // block above.
    always @(posedge clk) begin
      res_q[k] <= v_out + NOISE_RMS * gauss(nst);
      codes[k] <= code_c;
    end
  end

  // Last stage: sub-flash only.
  code_t last_c;

  subflash_adc_model #(.THR_SIGMA(THR_SIGMA), .SEED(SEED * 31 + N_STAGES - 1)) u_last (
    .vin  (res_q[N_STAGES-2]),
    .code (last_c)
  );

  always_ff @(posedge clk) codes[N_STAGES-1] <= last_c;

endmodule
