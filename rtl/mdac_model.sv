// mdac_model: behavioural model of the unit-capacitor multiplying DAC of one
// pipeline stage (switched-capacitor circuit with an opamp; not
// synthesizable).
//
// Eight sampling capacitors Cs1..Cs8 (nominal 1 each, Gaussian mismatch of
// CAP_SIGMA) and a feedback capacitor Cf = 8/3 set the nominal gain
// 1/beta = (Cf + sum Cs)/Cf = 4. With an opamp of open-loop gain A the
// closed-loop gain is G(1+a) = A/(1 + A*beta). Capacitor j contributes the
// step dCs_j = Vref*Cs_j/(Cf + sum Cs), with Vref = 32/3 Delta so that a
// nominal step is exactly 1 Delta. The output is
//     vout = G(1+a) * (vin - sum_j (dac_p[j] - dac_n[j]) * dCs_j)
// so enabling Cs_i alone to +Vref with a grounded input gives
// -G(1+a)*dCs_i, ideally -4 Delta. The gain and step formulas and the error
// sources follow the source description; the capacitor ratio Cf = 3*Cs_sum/8
// derived from the gain of 4, the Delta scaling and a mismatch-free Cf are
// this model's choices.
//
// Interface: vin and vout in Delta units; dac_p/dac_n from dac_decoder;
// vout follows the inputs without delay (the stage register is outside).
module mdac_model
  import pipeadc_pkg::*;
  import model_rand_pkg::*;
#(
  parameter real         CAP_SIGMA     = 0.003,
  parameter real         OPAMP_GAIN_DB = 50.0,
  parameter int unsigned SEED          = 1
) (
  input  real               vin,
  input  logic [N_CAPS-1:0] dac_p,
  input  logic [N_CAPS-1:0] dac_n,
  output real               vout
);

  real dcs [N_CAPS];
  real gain;

  initial begin
    int unsigned st;
    real c [N_CAPS];
    real cf, csum, beta, a_ol;
    st   = SEED * 32'd2246822519 + 32'd777;
    cf   = real'(N_CAPS) / 3.0;
    csum = 0.0;
    for (int j = 0; j < int'(N_CAPS); j++) begin
      c[j] = 1.0 + CAP_SIGMA * gauss(st);
      csum += c[j];
    end
    for (int j = 0; j < int'(N_CAPS); j++)
      dcs[j] = (32.0 / 3.0) * c[j] / (cf + csum);
    beta = cf / (cf + csum);
    a_ol = 10.0 ** (OPAMP_GAIN_DB / 20.0);
    gain = a_ol / (1.0 + a_ol * beta);
  end

  always_comb begin
    real s;
    s = vin;
    for (int j = 0; j < int'(N_CAPS); j++) begin
      if (dac_p[j]) s -= dcs[j];
      if (dac_n[j]) s += dcs[j];
    end
    vout = gain * s;
  end

endmodule
