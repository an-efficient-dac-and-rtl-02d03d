// tb_mdac_model: an ideal instance (no mismatch, 300 dB opamp) must give
// vout = 4*(vin - level) for every DAC row; an instance with the default
// 0.3 % mismatch and 50 dB opamp must show the closed-loop gain
// A/(1 + A/4) = 3.9500 on the input, single-capacitor outputs of about
// -3.95 Delta that sum to -8 gain, and the DAC rows as sums of those steps.
module tb_mdac_model;
  import pipeadc_pkg::*;

  real        vin;
  logic [7:0] dac_p, dac_n;
  real        v_ideal, v_real;
  int checks = 0, failures = 0;

  mdac_model #(.CAP_SIGMA(0.0), .OPAMP_GAIN_DB(300.0)) u_ideal (
    .vin(vin), .dac_p(dac_p), .dac_n(dac_n), .vout(v_ideal));
  mdac_model u_real (.vin(vin), .dac_p(dac_p), .dac_n(dac_n), .vout(v_real));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real absr(real x);
    return (x < 0) ? -x : x;
  endfunction

  initial begin
    real a, g, step [8], s, expect_v;
    a = 10.0 ** 2.5;
    g = a / (1.0 + a / 4.0);
    // ideal rows
    for (int lvl = -4; lvl <= 4; lvl++) begin
      dac_p = '0; dac_n = '0;
      for (int j = 0; j < 4; j++) if (lvl <= j - 4) dac_n[j] = 1;
      for (int j = 4; j < 8; j++) if (lvl >= j - 3) dac_p[j] = 1;
      for (int i = -10; i <= 10; i++) begin
        vin = real'(lvl) + real'(i) * 0.05;
        #1;
        chk(absr(v_ideal - 4.0 * (vin - real'(lvl))) < 1e-6,
            $sformatf("ideal level %0d vin %f vout %f", lvl, vin, v_ideal));
      end
    end
    // real: input gain
    dac_p = '0; dac_n = '0;
    vin = 1.0; #1;
    chk(absr(v_real - g) < 0.01 * g, $sformatf("gain %f expected about %f", v_real, g));
    // real: single-capacitor measurements
    s = 0.0;
    vin = 0.0;
    for (int j = 0; j < 8; j++) begin
      dac_p = 8'(1) << j; #1;
      step[j] = v_real;
      chk(absr(v_real + g) < 0.015 * g, $sformatf("Cs%0d step %f expected about %f", j + 1, v_real, -g));
      s += v_real;
    end
    chk(absr(s + 8.0 * g) < 0.02 * g, $sformatf("sum of steps %f expected about %f", s, -8.0 * g));
    // real: each row equals the sum of its steps (linear superposition)
    for (int lvl = -4; lvl <= 4; lvl++) begin
      dac_p = '0; dac_n = '0;
      expect_v = 0.0;
      for (int j = 0; j < 4; j++) if (lvl <= j - 4) begin dac_n[j] = 1; expect_v -= step[j]; end
      for (int j = 4; j < 8; j++) if (lvl >= j - 3) begin dac_p[j] = 1; expect_v += step[j]; end
      vin = 0.0; #1;
      chk(absr(v_real - expect_v) < 1e-9, $sformatf("row %0d vout %f expected %f", lvl, v_real, expect_v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
