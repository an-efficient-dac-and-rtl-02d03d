// dac_decoder: sets the eight unit-capacitor 1-bit DACs of one MDAC stage
// from the stage's 9-level sub-flash code.
//
// Code D (0..8) stands for the level D-4. Capacitors Cs1..Cs4 serve the
// negative levels and Cs5..Cs8 the positive ones: for D < 4 the capacitors
// Cs(D+1)..Cs4 are switched to -Vref, for D > 4 the capacitors Cs5..Cs(D) are
// switched to +Vref, and D = 4 leaves all of them at ground. This is the DAC
// configuration matrix of the source description, row for row. Codes above
// 8 cannot come from the flash; they are treated as 8 here (own choice).
//
// Interface: code in; dac_p[j] / dac_n[j] drive capacitor Cs(j+1) to
// +Vref / -Vref. Purely combinational, no clock.
module dac_decoder
  import pipeadc_pkg::*;
(
  input  code_t             code,
  output logic [N_CAPS-1:0] dac_p,
  output logic [N_CAPS-1:0] dac_n
);

  always_comb begin
    int unsigned d;
    d     = (code > code_t'(N_LEVELS - 1)) ? (N_LEVELS - 1) : int'(code);
    dac_p = '0;
    dac_n = '0;
    for (int unsigned j = 0; j < N_CAPS / 2; j++) begin
      // negative half: Cs(j+1) active when d <= j
      if (d <= j) dac_n[j] = 1'b1;
      // positive half: Cs(j+5) active when d >= j+5
      if (d >= j + MID_CODE + 1) dac_p[j + N_CAPS / 2] = 1'b1;
    end
  end

endmodule
