// tb_digital_correction: feeds random stage codes with the pipeline's
// stagger (stage k one clock later than stage k-1), loads random
// compensation values into the three compensators, and checks each output
// against the weighted sum sum_k (D_k-4)*4^(7-k) + C_k[D_k] worked out in the
// testbench, with the 16-bit saturation, in both bypass settings. It also
// checks the backend codes and a latency of N_STAGES clocks from stage 1's
// code to dout.
module tb_digital_correction;
  import pipeadc_pkg::*;

  localparam int N = 7, NC = 3, NS = 3000, LAT = 7;

  logic               clk = 0, rst_n = 0, bypass = 0;
  code_t              codes [N];
  logic [NC-1:0]      comp_load = '0;
  logic signed [15:0] ccs_in [9];
  logic signed [15:0] dout;
  logic               dout_valid;
  logic signed [19:0] backend [NC];
  int checks = 0, failures = 0;
  int n_sat = 0, n_byp = 0;

  int samp [NS][N];
  int cval [NC][9];
  bit byp [NS];

  always #5 clk = ~clk;

  digital_correction dut (.clk(clk), .rst_n(rst_n), .codes(codes), .bypass(bypass),
                          .comp_load(comp_load), .ccs_in(ccs_in), .dout(dout),
                          .dout_valid(dout_valid), .backend(backend));

  function automatic int ref_p(int n, int k, bit bp);   // P_k, k 0-based
    int p;
    p = samp[n][N-1] - 4;
    for (int i = N - 2; i >= k; i--) begin
      p += (samp[n][i] - 4) * (1 << (2 * (N - 1 - i)));
      if (i < NC && !bp) p += cval[i][samp[n][i]];
    end
    return p;
  endfunction

  initial begin
    for (int k = 0; k < N; k++) codes[k] = 4;
    for (int d = 0; d < 9; d++) ccs_in[d] = 0;
    for (int n = 0; n < NS; n++) begin
      for (int k = 0; k < N; k++) samp[n][k] = $urandom_range(8);
      // long runs of extreme codes now and then, to reach saturation
      if ((n / 200) % 5 == 4) for (int k = 0; k < N; k++) samp[n][k] = (n % 2) ? 8 : 0;
      byp[n] = ((n / 500) % 2) == 1;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load the compensators one by one
    for (int s = 0; s < NC; s++) begin
      for (int d = 0; d < 9; d++) begin
        cval[s][d] = int'($urandom_range(2000)) - 1000;
        if (d == 0) cval[s][d] = -12000;   // large end values drive the
        if (d == 8) cval[s][d] = 12000;    // all-0 / all-8 runs into saturation
        ccs_in[d]  = 16'(cval[s][d]);
      end
      comp_load = NC'(1) << s;
      @(negedge clk);
      comp_load = '0;
    end
    // stream: at cycle t stage k shows sample t-k
    for (int t = 0; t < NS + N + LAT + 2; t++) begin
      for (int k = 0; k < N; k++)
        codes[k] = (t - k >= 0 && t - k < NS) ? code_t'(samp[t-k][k]) : code_t'(4);
      bypass = (t - (N - 1) >= 0 && t - (N - 1) < NS) ? byp[t-(N-1)] : 1'b0;
      @(posedge clk); #1;
      // sample n's stage-1 code was applied in cycle n; its result is on dout
      // LAT edges after it was taken
      if (t - (LAT - 1) >= 0 && t - (LAT - 1) < NS) begin
        int n, e, es;
        n  = t - (LAT - 1);
        e  = ref_p(n, 0, byp[n]);
        es = (e > 32767) ? 32767 : (e < -32768) ? -32768 : e;
        if (es != e) n_sat++;
        if (byp[n]) n_byp++;
        checks++;
        if (int'(dout) != es || !dout_valid) begin
          failures++;
          if (failures < 10) $display("FAIL: sample %0d dout %0d expected %0d valid %b", n, dout, es, dout_valid);
        end
        for (int s = 0; s < NC; s++) begin
          checks++;
          if (int'(backend[s]) != ref_p(n, s + 1, byp[n])) begin
            failures++;
            if (failures < 10) $display("FAIL: sample %0d backend %0d = %0d expected %0d", n, s, backend[s], ref_p(n, s + 1, byp[n]));
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_sat == 0 || n_byp == 0) begin
      failures++;
      $display("FAIL: saturation %0d or bypass %0d never exercised", n_sat, n_byp);
    end
    $display("saturated samples %0d, bypassed samples %0d", n_sat, n_byp);
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
