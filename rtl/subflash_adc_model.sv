// subflash_adc_model: behavioural model of a 9-level sub-flash ADC (an
// analog comparator bank; not synthesizable).
//
// Eight comparators with nominal thresholds -3.5 .. +3.5 Delta quantise the
// input into one of nine levels; the output code is the number of thresholds
// below the input (0..8, level = code-4), so an input between -4.5 and -3.5
// Delta gives code 0 (level -4). Each threshold gets a random Gaussian offset
// of THR_SIGMA Delta, drawn once from SEED and clipped to +-0.6 Delta so that
// the stage's over-range margin is never exceeded. The nine levels and the
// level mapping follow the source description; the offset size in Delta
// units and the clipping are this model's choices.
//
// Interface: vin in Delta units; code follows vin without delay.
module subflash_adc_model
  import pipeadc_pkg::*;
  import model_rand_pkg::*;
#(
  parameter real         THR_SIGMA = 0.16,
  parameter int unsigned SEED      = 1
) (
  input  real   vin,
  output code_t code
);

  real thr [N_LEVELS-1];

  initial begin
    int unsigned st;
    real off;
    st = SEED * 32'd2654435761 + 32'd12345;
    for (int t = 0; t < int'(N_LEVELS) - 1; t++) begin
      off = THR_SIGMA * gauss(st);
      if (off > 0.6)  off = 0.6;
      if (off < -0.6) off = -0.6;
      thr[t] = real'(t) - 3.5 + off;
    end
  end

  always_comb begin
    code = '0;
    for (int t = 0; t < int'(N_LEVELS) - 1; t++)
      if (vin > thr[t]) code = code + 1'b1;
  end

endmodule
