// comp_value_calc: turns the eight measured capacitor errors of one stage
// into the nine compensation values, one per sub-flash code.
//
// The compensation vector is C = M * eps, with M the DAC configuration
// matrix (code D row: -1 on Cs(D+1)..Cs4 for D < 4, +1 on Cs5..Cs(D) for
// D > 4). Because every row of M is a run of equal entries next to the middle,
// the product is a pair of running sums, so only adders and subtractors are
// needed: C[4] = 0, C[d] = C[d+1] - eps[d] for d = 3..0 and
// C[d] = C[d-1] + eps[d-1] for d = 5..8. Word widths are own choices; four
// errors are summed at most, so COMP_W >= EPS_W + 2 cannot overflow.
//
// Interface: eps[j] is the error of Cs(j+1) in final LSBs; ccs[d] is the value
// added for code d. Purely combinational.
module comp_value_calc
  import pipeadc_pkg::*;
#(
  parameter int unsigned EPS_W  = EPS_W_DEF,
  parameter int unsigned COMP_W = COMP_W_DEF
) (
  input  logic signed [EPS_W-1:0]  eps [N_CAPS],
  output logic signed [COMP_W-1:0] ccs [N_LEVELS]
);

  always_comb begin
    ccs[MID_CODE] = '0;
    for (int d = MID_CODE - 1; d >= 0; d--)
      ccs[d] = ccs[d+1] - COMP_W'(eps[d]);
    for (int d = MID_CODE + 1; d < N_LEVELS; d++)
      ccs[d] = ccs[d-1] + COMP_W'(eps[d-1]);
  end

endmodule
