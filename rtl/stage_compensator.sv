// stage_compensator: the compensation register file of one calibrated stage.
//
// It stores the nine compensation values C_Cs1..C_Cs9 and, like a nine-way
// switch, presents the one belonging to the stage's current sub-flash code.
// The values are written all at once by a load strobe when the calibration of
// the stage finishes. Reset clears them to zero, so an uncalibrated stage is
// passed through unchanged (own choice).
//
// Interface: load/ccs_in write on the rising clock edge; code -> comp is
// combinational. Codes above 8 select nothing and give 0 (own choice).
module stage_compensator
  import pipeadc_pkg::*;
#(
  parameter int unsigned COMP_W = COMP_W_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic signed [COMP_W-1:0] ccs_in [N_LEVELS],
  input  code_t                    code,
  output logic signed [COMP_W-1:0] comp
);

  logic signed [COMP_W-1:0] ccs_q [N_LEVELS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < N_LEVELS; d++) ccs_q[d] <= '0;
    end else if (load) begin
      for (int d = 0; d < N_LEVELS; d++) ccs_q[d] <= ccs_in[d];
    end
  end

  always_comb begin
    comp = '0;
    for (int d = 0; d < N_LEVELS; d++)
      if (code == code_t'(d)) comp = ccs_q[d];
  end

endmodule
