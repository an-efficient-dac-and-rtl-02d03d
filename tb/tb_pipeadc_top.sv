// tb_pipeadc_top: end-to-end test of the calibrated pipelined ADC at its
// default size (7 stages, 3 calibrated, 0.3 % capacitor mismatch, 50 dB
// opamps).
//
// 1. Latency: a step on vin must reach dout exactly N_STAGES+1 rising edges
//    after it is applied (sampled on the first edge, out after 7 more).
// 2. A slow ramp over -4.4..+4.4 Delta with the compensation switched off:
//    the 16-bit result is cut to 14 bits, and the missing 14-bit codes and the
//    worst deviation from the least-squares line (INL) are measured. The
//    uncalibrated converter must show missing codes.
// 3. A calibration run: busy must last N_CAL*(8*(SETTLE+2^AVG_LOG2+1)+1)
//    clocks and load each of the three compensators once.
// 4. The same ramp with compensation on: no missing code and |INL| <= 2 LSB
//    at 14 bits, |DNL| < 1 LSB14 (code density), and an overall gain equal (within 0.3 %) to the product of
//    the three calibrated stages' actual gains divided by 4.
// 5. Bypass again: the missing codes must come back (mode switch).
// Each mechanism (missing codes, calibration run, compensator load per
// stage, bypass on/off) is counted and must occur.
`timescale 1ns/1ps
module tb_pipeadc_top;
  import pipeadc_pkg::*;

  localparam int NPTS    = 40000;
  localparam int LAT     = 8;
  localparam int CAL_CYC = 3 * (8 * (16 + 16 + 1) + 1) + 1;  // busy clocks + start edge

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  real         vin = 0.0;
  logic        cal_start = 1'b0;
  logic        cal_bypass = 1'b1;
  logic        cal_busy, cal_done;
  logic [15:0] dout;
  logic        dout_valid;

  int checks = 0, failures = 0;
  int n_missing_events = 0, n_cal_runs = 0, n_bypass_on = 0, n_bypass_off = 0;
  int n_loads [3] = '{0, 0, 0};

  always #5 clk = ~clk;

  pipeadc_top dut (
    .clk(clk), .rst_n(rst_n), .vin(vin), .cal_start(cal_start),
    .cal_bypass(cal_bypass), .cal_busy(cal_busy), .cal_done(cal_done),
    .dout(dout), .dout_valid(dout_valid)
  );

  always @(posedge clk)
    for (int i = 0; i < 3; i++) if (dut.u_core.comp_load[i]) n_loads[i]++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Ramp measurement results
  real xs [NPTS];
  real ys [NPTS];
  int  hit [16384];

  task automatic ramp(output int missing, output real inl_max, output real slope,
                     output real dnl_max);
    real sx, sy, sxx, sxy, a, b, e;
    int  lo, hi, c14;
    // apply ramp, collecting dout LAT edges after each vin
    for (int n = 0; n < NPTS + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        xs[n-LAT] = -4.4 + 8.8 * real'(n - LAT) / real'(NPTS - 1);
        ys[n-LAT] = real'(signed'(dout));
      end
      if (n < NPTS) vin = -4.4 + 8.8 * real'(n) / real'(NPTS - 1);
    end
    for (int i = 0; i < 16384; i++) hit[i] = 0;
    lo = 16383; hi = 0;
    sx = 0; sy = 0; sxx = 0; sxy = 0;
    for (int i = 0; i < NPTS; i++) begin
      c14 = (int'(ys[i]) >>> 2) + 8192;
      hit[c14]++;
      if (c14 < lo) lo = c14;
      if (c14 > hi) hi = c14;
      sx += xs[i]; sy += ys[i]; sxx += xs[i] * xs[i]; sxy += xs[i] * ys[i];
    end
    // code density over the inner codes (the two end codes are partial):
    // DNL = hits / mean hits - 1
    missing = 0;
    dnl_max = 0.0;
    for (int i = lo; i <= hi; i++) if (hit[i] == 0) missing++;
    for (int i = lo + 1; i < hi; i++) begin
      e = real'(hit[i]) * real'(hi - lo - 1) / real'(NPTS) - 1.0;
      if (e < 0) e = -e;
      if (e > dnl_max) dnl_max = e;
    end
    a = (real'(NPTS) * sxy - sx * sy) / (real'(NPTS) * sxx - sx * sx);
    b = (sy - a * sx) / real'(NPTS);
    inl_max = 0.0;
    for (int i = 0; i < NPTS; i++) begin
      e = (ys[i] - (a * xs[i] + b)) / 4.0;
      if (e < 0) e = -e;
      if (e > inl_max) inl_max = e;
    end
    slope = a / 4096.0;
    vin = 0.0;
  endtask

  int  missing;
  real inl, slope, dnl;
  int  edges;
  int  cal_cycles;
  real g_exp;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- 1. latency -------------------------------------------------
    vin = -3.0;
    repeat (20) @(negedge clk);
    check(dout_valid, "dout_valid after pipeline fill");
    check(signed'(dout) < -10000, "dout negative for vin = -3");
    vin = 3.0;
    edges = 0;
    while (signed'(dout) < 0 && edges < 20) begin
      @(posedge clk); #1;
      edges++;
    end
    check(edges == LAT, $sformatf("latency %0d edges, expected %0d", edges, LAT));

    // ---- 2. ramp, uncalibrated ----------------------------------------
    cal_bypass = 1'b1; n_bypass_on++;
    ramp(missing, inl, slope, dnl);
    $display("uncalibrated: missing 14-bit codes %0d, max |DNL| %0.2f, max |INL| %0.2f LSB14, gain %0.4f",
             missing, dnl, inl, slope);
    if (missing > 0) n_missing_events++;
    check(missing > 0, "uncalibrated converter shows missing codes");
    check(inl > 4.0, "uncalibrated INL exceeds 4 LSB");

    // ---- 3. calibration -------------------------------------------------
    @(negedge clk);
    cal_start = 1'b1;
    @(negedge clk);
    cal_start = 1'b0;
    cal_cycles = 1;
    while (cal_busy && cal_cycles < 10000) begin
      @(negedge clk);
      cal_cycles++;
    end
    n_cal_runs++;
    check(cal_done, "calibration done");
    check(cal_cycles == CAL_CYC, $sformatf("calibration took %0d clocks, expected %0d",
                                           cal_cycles, CAL_CYC));
    repeat (20) @(negedge clk);
    for (int i = 0; i < 3; i++)
      check(n_loads[i] == 1, $sformatf("compensator %0d loaded %0d times", i + 1, n_loads[i]));

    // ---- 4. ramp, calibrated --------------------------------------------
    cal_bypass = 1'b0; n_bypass_off++;
    repeat (10) @(negedge clk);
    ramp(missing, inl, slope, dnl);
    $display("calibrated:   missing 14-bit codes %0d, max |DNL| %0.2f, max |INL| %0.2f LSB14, gain %0.4f",
             missing, dnl, inl, slope);
    check(dnl < 1.0, "|DNL| below 1 LSB14 after calibration");
    check(missing == 0, "no missing codes after calibration");
    check(inl <= 2.0, "INL within +-2 LSB14 after calibration");
    check(slope > 0.95 && slope < 1.0, "overall gain error only (gain slightly below 1)");
    // the remaining gain is the product of the calibrated stages' G'/4
    g_exp = 1.0;
    g_exp *= dut.u_fe.g_stage[0].u_mdac.gain / 4.0;
    g_exp *= dut.u_fe.g_stage[1].u_mdac.gain / 4.0;
    g_exp *= dut.u_fe.g_stage[2].u_mdac.gain / 4.0;
    $display("expected gain from the stage models %0.4f", g_exp);
    check(slope - g_exp < 0.003 && g_exp - slope < 0.003,
          $sformatf("gain %0.4f differs from the product of stage gains %0.4f", slope, g_exp));

    // ---- 5. bypass again ---------------------------------------------------
    cal_bypass = 1'b1; n_bypass_on++;
    repeat (10) @(negedge clk);
    ramp(missing, inl, slope, dnl);
    if (missing > 0) n_missing_events++;
    check(missing > 0, "bypass brings the missing codes back");

    // ---- mechanisms ------------------------------------------------------
    check(n_missing_events > 0, "mechanism: missing codes seen");
    check(n_cal_runs > 0, "mechanism: calibration run");
    check(n_bypass_on > 0 && n_bypass_off > 0, "mechanism: bypass switched both ways");
    $display("mechanisms: missing-code ramps %0d, calibration runs %0d, loads %0d/%0d/%0d, bypass on %0d off %0d",
             n_missing_events, n_cal_runs, n_loads[0], n_loads[1], n_loads[2], n_bypass_on, n_bypass_off);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
