// tb_pipeadc_cal_core: the digital core driven by a front-end model with
// a larger capacitor mismatch than the default (1 % instead of 0.3 %).
// Checks: the stage-3 capacitor errors the core measures agree within 3 LSB
// with those computed from the model's own gain and capacitor steps
// (eps_j = 64*(G*dCs_j - 4); the uncalibrated stages behind stage 3 add up
// to a few LSB of their own);
// after calibration a ramp over -4.4..+4.4 Delta has no missing 14-bit code
// and |INL| <= 2 LSB14; a second calibration run gives the same linearity;
// with bypass on, the ramp shows missing codes.
module tb_pipeadc_cal_core;
  import pipeadc_pkg::*;

  localparam int NPTS = 20000, LAT = 8;

  logic               clk = 0, rst_n = 0, cal_start = 0, cal_bypass = 1;
  real                vin = 0.0;
  code_t              codes [7];
  logic               fe_cal_en;
  logic [2:0]         fe_cal_stage, fe_cal_cap;
  logic               cal_busy, cal_done, dout_valid;
  logic signed [15:0] dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pipeadc_frontend_model #(.CAP_SIGMA(0.01), .SEED(5)) u_fe (
    .clk(clk), .vin(vin), .cal_en(fe_cal_en), .cal_stage(fe_cal_stage),
    .cal_cap(fe_cal_cap), .codes(codes));

  pipeadc_cal_core dut (
    .clk(clk), .rst_n(rst_n), .codes(codes), .cal_start(cal_start),
    .cal_bypass(cal_bypass), .fe_cal_en(fe_cal_en), .fe_cal_stage(fe_cal_stage),
    .fe_cal_cap(fe_cal_cap), .cal_busy(cal_busy), .cal_done(cal_done),
    .dout(dout), .dout_valid(dout_valid));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  real xs [NPTS];
  real ys [NPTS];
  bit  hit [16384];

  task automatic ramp(output int missing, output real inl_max);
    real sx, sy, sxx, sxy, a, b, e;
    int  lo, hi, c14;
    for (int n = 0; n < NPTS + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        xs[n-LAT] = -4.4 + 8.8 * real'(n - LAT) / real'(NPTS - 1);
        ys[n-LAT] = real'(dout);
      end
      if (n < NPTS) vin = -4.4 + 8.8 * real'(n) / real'(NPTS - 1);
    end
    for (int i = 0; i < 16384; i++) hit[i] = 1'b0;
    lo = 16383; hi = 0; sx = 0; sy = 0; sxx = 0; sxy = 0;
    for (int i = 0; i < NPTS; i++) begin
      c14 = (int'(ys[i]) >>> 2) + 8192;
      hit[c14] = 1'b1;
      if (c14 < lo) lo = c14;
      if (c14 > hi) hi = c14;
      sx += xs[i]; sy += ys[i]; sxx += xs[i] * xs[i]; sxy += xs[i] * ys[i];
    end
    missing = 0;
    for (int i = lo; i <= hi; i++) if (!hit[i]) missing++;
    a = (real'(NPTS) * sxy - sx * sy) / (real'(NPTS) * sxx - sx * sx);
    b = (sy - a * sx) / real'(NPTS);
    inl_max = 0.0;
    for (int i = 0; i < NPTS; i++) begin
      e = (ys[i] - (a * xs[i] + b)) / 4.0;
      if (e < 0) e = -e;
      if (e > inl_max) inl_max = e;
    end
  endtask

  task automatic calibrate();
    @(negedge clk); cal_start = 1;
    @(negedge clk); cal_start = 0;
    wait (!cal_busy);
    @(negedge clk);
    chk(cal_done, "calibration done");
  endtask

  int  missing;
  real inl;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    ramp(missing, inl);
    $display("bypass: missing %0d, INL %0.2f", missing, inl);
    chk(missing > 0, "missing codes before calibration");

    calibrate();
    // stage 3 errors against the model (eps is final after the run)
    for (int j = 0; j < 8; j++) begin
      real ex;
      ex = 64.0 * (u_fe.g_stage[2].u_mdac.gain * u_fe.g_stage[2].u_mdac.dcs[j] - 4.0);
      $display("stage 3 Cs%0d: model %0.2f", j + 1, ex);
    end
    cal_bypass = 0;
    ramp(missing, inl);
    $display("calibrated: missing %0d, INL %0.2f", missing, inl);
    chk(missing == 0, "no missing codes after calibration");
    chk(inl <= 2.0, "INL within 2 LSB14 after calibration");

    cal_bypass = 1;   // recalibrate with bypass requested: still converges
    calibrate();
    cal_bypass = 0;
    ramp(missing, inl);
    chk(missing == 0 && inl <= 2.0, "second calibration run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // capture stage 3 errors at their load
  always @(posedge clk) begin
    if (dut.comp_load[2]) begin
      for (int j = 0; j < 8; j++) begin
        real ex, d;
        ex = 64.0 * (u_fe.g_stage[2].u_mdac.gain * u_fe.g_stage[2].u_mdac.dcs[j] - 4.0);
        d  = real'(dut.eps[j]) - ex;
        chk(d <= 3.0 && d >= -3.0, $sformatf("stage 3 eps[%0d] = %0d, model %0.2f", j, dut.eps[j], ex));
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
