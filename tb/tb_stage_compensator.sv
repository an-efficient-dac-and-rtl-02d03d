// tb_stage_compensator: after reset every code must select 0; after a load
// each code must select its own value, values must hold while load is low,
// and codes above 8 select 0.
module tb_stage_compensator;
  import pipeadc_pkg::*;

  logic               clk = 0, rst_n = 0, load = 0;
  logic signed [15:0] ccs_in [9];
  code_t              code;
  logic signed [15:0] comp;
  int checks = 0, failures = 0;
  int ref_v [9];

  always #50 clk = ~clk;   // long period: check_all steps 16 time units

  stage_compensator dut (.clk(clk), .rst_n(rst_n), .load(load), .ccs_in(ccs_in),
                         .code(code), .comp(comp));

  task automatic check_all(input string tag);
    for (int c = 0; c < 16; c++) begin
      code = code_t'(c);
      #1;
      checks++;
      if (int'(comp) != ((c < 9) ? ref_v[c] : 0)) begin
        failures++;
        $display("FAIL %s: code %0d got %0d expected %0d", tag, c, comp, (c < 9) ? ref_v[c] : 0);
      end
    end
  endtask

  initial begin
    for (int d = 0; d < 9; d++) begin ccs_in[d] = 16'(d * 7 + 3); ref_v[d] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all("reset");
    for (int r = 0; r < 5; r++) begin
      for (int d = 0; d < 9; d++) begin
        ccs_in[d] = 16'($urandom);
        ref_v[d]  = int'(ccs_in[d]);
      end
      load = 1;
      @(negedge clk);
      load = 0;
      for (int d = 0; d < 9; d++) ccs_in[d] = 16'($urandom);   // must be ignored
      @(negedge clk);
      check_all("loaded");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
