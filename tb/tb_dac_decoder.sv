// tb_dac_decoder: checks every code 0..15 against the DAC configuration
// matrix written out row by row (entry +1 = to +Vref, -1 = to -Vref).
module tb_dac_decoder;
  import pipeadc_pkg::*;

  code_t       code;
  logic [7:0]  dac_p, dac_n;
  int checks = 0, failures = 0;

  dac_decoder dut (.code(code), .dac_p(dac_p), .dac_n(dac_n));

  // rows for codes 0..8, columns Cs1..Cs8
  int m [9][8] = '{
    '{-1, -1, -1, -1, 0, 0, 0, 0},
    '{ 0, -1, -1, -1, 0, 0, 0, 0},
    '{ 0,  0, -1, -1, 0, 0, 0, 0},
    '{ 0,  0,  0, -1, 0, 0, 0, 0},
    '{ 0,  0,  0,  0, 0, 0, 0, 0},
    '{ 0,  0,  0,  0, 1, 0, 0, 0},
    '{ 0,  0,  0,  0, 1, 1, 0, 0},
    '{ 0,  0,  0,  0, 1, 1, 1, 0},
    '{ 0,  0,  0,  0, 1, 1, 1, 1}};

  initial begin
    for (int c = 0; c < 16; c++) begin
      int r;
      r = (c > 8) ? 8 : c;
      code = code_t'(c);
      #1;
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (dac_p[j] != (m[r][j] == 1) || dac_n[j] != (m[r][j] == -1)) begin
          failures++;
          $display("FAIL: code %0d Cs%0d p=%b n=%b expected %0d", c, j + 1, dac_p[j], dac_n[j], m[r][j]);
        end
      end
      checks++;
      if ((dac_p & dac_n) != 0) begin
        failures++;
        $display("FAIL: code %0d drives a capacitor both ways", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
