// tb_comp_value_calc: random capacitor errors; every compensation value is
// compared with the matrix product C = M * eps done in full in the testbench.
module tb_comp_value_calc;
  import pipeadc_pkg::*;

  logic signed [13:0] eps [8];
  logic signed [15:0] ccs [9];
  int checks = 0, failures = 0;

  comp_value_calc dut (.eps(eps), .ccs(ccs));

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
    for (int t = 0; t < 200; t++) begin
      for (int j = 0; j < 8; j++) begin
        // small errors most of the time, full-range ones now and then
        if (t % 10 == 0) eps[j] = 14'($urandom);
        else             eps[j] = 14'(int'($urandom_range(400)) - 200);
      end
      #1;
      for (int d = 0; d < 9; d++) begin
        int exp_c;
        exp_c = 0;
        for (int j = 0; j < 8; j++) exp_c += m[d][j] * int'(eps[j]);
        checks++;
        if (int'(ccs[d]) != exp_c) begin
          failures++;
          $display("FAIL: t %0d code %0d got %0d expected %0d", t, d, ccs[d], exp_c);
        end
      end
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
