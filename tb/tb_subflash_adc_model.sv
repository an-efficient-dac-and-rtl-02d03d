// tb_subflash_adc_model: an offset-free instance must give
// code = clamp(floor(vin + 4.5), 0, 8) over a fine sweep of -5..+5 Delta;
// an instance with default offsets must be monotonic, reach all nine codes
// and agree with the ideal code wherever vin is more than 0.6 Delta away
// from every nominal threshold.
module tb_subflash_adc_model;
  import pipeadc_pkg::*;

  real   vin;
  code_t code_ideal, code_real;
  int checks = 0, failures = 0;

  subflash_adc_model #(.THR_SIGMA(0.0)) u_ideal (.vin(vin), .code(code_ideal));
  subflash_adc_model u_real (.vin(vin), .code(code_real));

  initial begin
    int  e, prev, near;
    bit  seen [9];
    real d;
    prev = 0;
    for (int i = 0; i < 9; i++) seen[i] = 0;
    for (int i = -5000; i <= 5000; i += 3) begin
      vin = real'(i) / 1000.0 + 0.0001;
      #1;
      e = int'($floor(vin + 4.5));
      if (e < 0) e = 0;
      if (e > 8) e = 8;
      checks++;
      if (int'(code_ideal) != e) begin
        failures++;
        if (failures < 10) $display("FAIL: vin %f ideal code %0d expected %0d", vin, code_ideal, e);
      end
      checks++;
      if (int'(code_real) < prev) begin
        failures++;
        $display("FAIL: non-monotonic at vin %f", vin);
      end
      prev = int'(code_real);
      seen[code_real] = 1;
      near = 0;
      for (int t = 0; t < 8; t++) begin
        d = vin - (real'(t) - 3.5);
        if (d < 0) d = -d;
        if (d <= 0.6) near = 1;
      end
      if (!near) begin
        checks++;
        if (int'(code_real) != e) begin
          failures++;
          $display("FAIL: vin %f code %0d expected %0d (far from thresholds)", vin, code_real, e);
        end
      end
    end
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (!seen[i]) begin failures++; $display("FAIL: code %0d never produced", i); end
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
