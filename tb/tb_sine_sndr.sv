// tb_sine_sndr: dynamic test of the complete converter at its default size.
// A coherently sampled sine (127 cycles in 4096 samples, amplitude 4.3 Delta)
// is converted with the compensation off, then the converter is calibrated
// and the same sine is converted again. Because the sampling is coherent the
// sine, its phase and the offset are found by projection on the known
// frequency; everything left over is noise and distortion, which gives the
// SNDR. Checks: the uncalibrated SNDR stays below 60 dB, the calibrated one
// is above 75 dB and at least 25 dB better.
module tb_sine_sndr;
  import pipeadc_pkg::*;

  localparam int  N   = 4096;
  localparam int  CYC = 127;
  localparam int  LAT = 8;
  localparam real AMP = 4.3;
  localparam real PI  = 3.14159265358979323846;

  logic               clk = 0, rst_n = 0, cal_start = 0, cal_bypass = 1;
  real                vin = 0.0;
  logic               cal_busy, cal_done, dout_valid;
  logic signed [15:0] dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pipeadc_top dut (.clk(clk), .rst_n(rst_n), .vin(vin), .cal_start(cal_start),
                   .cal_bypass(cal_bypass), .cal_busy(cal_busy), .cal_done(cal_done),
                   .dout(dout), .dout_valid(dout_valid));

  real y [N];

  function automatic real sndr_db();
    real a, b, c, r, pr, ph;
    a = 0; b = 0; c = 0;
    for (int n = 0; n < N; n++) begin
      ph = 2.0 * PI * real'(CYC) * real'(n) / real'(N);
      a += y[n] * $cos(ph);
      b += y[n] * $sin(ph);
      c += y[n];
    end
    a = 2.0 * a / real'(N); b = 2.0 * b / real'(N); c = c / real'(N);
    pr = 0;
    for (int n = 0; n < N; n++) begin
      ph = 2.0 * PI * real'(CYC) * real'(n) / real'(N);
      r  = y[n] - (a * $cos(ph) + b * $sin(ph) + c);
      pr += r * r;
    end
    pr = pr / real'(N);
    return 10.0 * $log10(((a * a + b * b) / 2.0) / pr);
  endfunction

  task automatic convert();
    for (int n = 0; n < N + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) y[n-LAT] = real'(dout);
      if (n < N) vin = AMP * $sin(2.0 * PI * real'(CYC) * real'(n) / real'(N));
    end
  endtask

  real s_before, s_after;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    convert();
    s_before = sndr_db();
    @(negedge clk); cal_start = 1;
    @(negedge clk); cal_start = 0;
    wait (!cal_busy);
    cal_bypass = 0;
    repeat (10) @(negedge clk);
    convert();
    s_after = sndr_db();
    $display("SNDR before calibration %0.1f dB, after %0.1f dB", s_before, s_after);
    checks++;
    if (!(s_before < 60.0)) begin failures++; $display("FAIL: uncalibrated SNDR too high"); end
    checks++;
    if (!(s_after > 75.0)) begin failures++; $display("FAIL: calibrated SNDR too low"); end
    checks++;
    if (!(s_after - s_before > 25.0)) begin failures++; $display("FAIL: improvement too small"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
