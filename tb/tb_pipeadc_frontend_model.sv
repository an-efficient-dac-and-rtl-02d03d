// tb_pipeadc_frontend_model: an ideal front end (no offsets, no mismatch,
// 300 dB opamps, no noise) must convert a sweep so that
// sum_k (D_k - 4) * 4^(7-k), taken with the one-clock stagger per stage,
// is within half an LSB of 4096*vin; stage k's code for a sample must appear
// k-1 clocks after stage 1's; and in the calibration configuration the stages
// behind stage s must read exactly -4 Delta, i.e. -4^(7-s) LSB. A front end
// with the default non-idealities must stay within 2 % of 4096*vin.
module tb_pipeadc_frontend_model;
  import pipeadc_pkg::*;

  localparam int N = 7;

  logic       clk = 0;
  real        vin = 0.0;
  logic       cal_en = 0;
  logic [2:0] cal_stage = 0, cal_cap = 0;
  code_t      c_ideal [N];
  code_t      c_real [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pipeadc_frontend_model #(.CAP_SIGMA(0.0), .OPAMP_GAIN_DB(300.0), .THR_SIGMA(0.0),
                           .NOISE_RMS(0.0)) u_ideal (
    .clk(clk), .vin(vin), .cal_en(cal_en), .cal_stage(cal_stage), .cal_cap(cal_cap),
    .codes(c_ideal));
  pipeadc_frontend_model u_real (
    .clk(clk), .vin(vin), .cal_en(cal_en), .cal_stage(cal_stage), .cal_cap(cal_cap),
    .codes(c_real));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  // code history: hist[t][k] = stage k code after edge t
  int hi [4000][N];
  int hr [4000][N];
  real vh [4000];
  int  t = 0;

  always @(posedge clk) begin
    #1;
    for (int k = 0; k < N; k++) begin
      hi[t][k] = int'(c_ideal[k]);
      hr[t][k] = int'(c_real[k]);
    end
    t++;
  end

  initial begin
    int t0, ri, rr;
    real e;
    // sweep: vin changes after each edge; sample taken at edge t is vh[t]
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      vin = -4.45 + 8.9 * real'(n) / 2999.0;
      vh[t] = vin;
      @(negedge clk);
    end
    repeat (N + 1) @(negedge clk);
    for (int s0 = 0; s0 < 3000 - N; s0++) begin
      if (s0 == 0) continue;
      ri = 0; rr = 0;
      for (int k = 0; k < N; k++) begin
        ri += (hi[s0 + k][k] - 4) * (1 << (2 * (N - 1 - k)));
        rr += (hr[s0 + k][k] - 4) * (1 << (2 * (N - 1 - k)));
      end
      e = real'(ri) - 4096.0 * vh[s0];
      chk(e <= 0.5001 && e >= -0.5001, $sformatf("ideal sample %0d vin %f recon %0d", s0, vh[s0], ri));
      e = real'(rr) - 4096.0 * vh[s0];
      chk(e <= 0.02 * 4096.0 * 4.5 && e >= -0.02 * 4096.0 * 4.5,
          $sformatf("real sample %0d vin %f recon %0d", s0, vh[s0], rr));
    end
    // calibration configuration
    for (int s = 0; s < N - 1; s++) begin
      for (int c = 0; c < 8; c++) begin
        cal_en = 1; cal_stage = 3'(s); cal_cap = 3'(c);
        repeat (N + 1) @(negedge clk);
        t0 = t - 1;
        ri = 0;
        for (int k = s + 1; k < N; k++)
          ri += (hi[t0 - (N - 1 - k)][k] - 4) * (1 << (2 * (N - 1 - k)));
        chk(ri == -(1 << (2 * (N - 1 - s))),
            $sformatf("cal stage %0d cap %0d backend %0d expected %0d", s + 1, c + 1, ri, -(1 << (2 * (N - 1 - s)))));
      end
    end
    cal_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3900) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
