// tb_cal_controller: the backend is modelled as a delay line of 9 clocks
// from the front-end configuration to the code. While stage s, capacitor i is
// selected it returns -4^(6-s) - delta[s][i] (that is -4 Delta of the stage's
// backend plus an error) with a half-LSB dither on every other clock; other
// backend words carry junk. At each compensator load the eight errors must
// equal delta[s][i] - 1 (mean rounded up), the stages must come in the order
// 3, 2, 1, each capacitor must be visited, and busy must last
// 3*(8*(16+16+1)+1) clocks. Two runs are made to check done and restart.
module tb_cal_controller;
  import pipeadc_pkg::*;

  localparam int NC = 3, DL = 9;
  localparam int RUN = NC * (8 * (16 + 16 + 1) + 1);

  logic               clk = 0, rst_n = 0, start = 0;
  logic signed [19:0] backend [NC];
  logic               fe_cal_en;
  logic [2:0]         fe_cal_stage, fe_cal_cap;
  logic signed [13:0] eps [8];
  logic [NC-1:0]      comp_load;
  logic               busy, done;
  int checks = 0, failures = 0;

  int delta [NC][8];
  int cfg_q [DL];          // encoded configuration history: -1 = none
  int nload, exp_stage, busy_cnt, visits;
  bit dither;

  always #5 clk = ~clk;

  cal_controller dut (.clk(clk), .rst_n(rst_n), .start(start), .backend(backend),
                      .fe_cal_en(fe_cal_en), .fe_cal_stage(fe_cal_stage),
                      .fe_cal_cap(fe_cal_cap), .eps(eps), .comp_load(comp_load),
                      .busy(busy), .done(done));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // backend model
  always @(posedge clk) begin
    int c;
    for (int t = DL - 1; t > 0; t--) cfg_q[t] <= cfg_q[t-1];
    cfg_q[0] <= fe_cal_en ? int'(fe_cal_stage) * 8 + int'(fe_cal_cap) : -1;
    dither <= ~dither;
    c = cfg_q[DL-1];
    for (int s = 0; s < NC; s++) begin
      if (c >= 0 && c / 8 == s)
        backend[s] <= 20'(-(1 << (2 * (6 - s))) - delta[s][c % 8] + (dither ? 1 : 0));
      else
        backend[s] <= 20'($urandom_range(60000));
    end
    if (busy) busy_cnt++;
    if (fe_cal_en && fe_cal_cap == 3'd7) visits++;
  end

  // check eps at every load
  always @(posedge clk) begin
    if (rst_n && comp_load != 0) begin
      nload++;
      chk(comp_load == NC'(1) << exp_stage, $sformatf("load of stage %0d expected, got %b", exp_stage + 1, comp_load));
      for (int j = 0; j < 8; j++)
        chk(int'(eps[j]) == delta[exp_stage][j] - 1,
            $sformatf("stage %0d eps[%0d] = %0d expected %0d", exp_stage + 1, j, eps[j], delta[exp_stage][j] - 1));
      exp_stage--;
    end
  end

  initial begin
    for (int t = 0; t < DL; t++) cfg_q[t] = -1;
    for (int s = 0; s < NC; s++) backend[s] = '0;
    dither = 0;
    nload = 0; busy_cnt = 0; visits = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      for (int s = 0; s < NC; s++)
        for (int j = 0; j < 8; j++) delta[s][j] = int'($urandom_range(300)) - 150;
      exp_stage = NC - 1;
      busy_cnt  = 0;
      visits    = 0;
      nload     = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      chk(busy && !done, "busy after start, done cleared");
      wait (!busy);
      repeat (3) @(negedge clk);
      chk(done, "done after run");
      chk(busy_cnt == RUN, $sformatf("busy for %0d clocks, expected %0d", busy_cnt, RUN));
      chk(nload == NC, $sformatf("%0d loads, expected %0d", nload, NC));
      chk(visits == NC * (16 + 16 + 1), $sformatf("last capacitor selected %0d clocks", visits));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
