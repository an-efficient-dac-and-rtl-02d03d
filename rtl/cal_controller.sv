// cal_controller: sequencer of the foreground DAC / interstage-gain
// calibration.
//
// For every calibrated stage and every one of its eight unit capacitors the
// controller puts the analog front end into the measuring configuration:
// the stage input is grounded and only capacitor Cs_i is switched to +Vref.
// The stage then outputs -G(1+a)*dCs_i, ideally -4 Delta, and the stages
// behind it digitise it. After SETTLE clocks (covering the pipeline latency)
// the controller sums 2^AVG_LOG2 backend codes, rounds the mean r_Csi and
// stores the error eps_i = -4 Delta - r_Csi, with -4 Delta expressed in final
// LSBs of the stage's backend. Once all eight errors of a stage are known,
// the compensation values (computed outside from eps by comp_value_calc) are
// loaded into that stage's compensator with a one-clock comp_load strobe.
// Stages are done from the last calibrated one to the first, so every stage
// is measured through a backend that is already calibrated. The error formula
// follows the source description; the order, the averaging and the settling
// wait are this design's choices.
//
// Interface: a start pulse begins a run; busy is high during the run and
// fe_cal_en/fe_cal_stage/fe_cal_cap (0-based) select the front-end
// configuration; done is set at the end and cleared by the next start.
// backend[i] is the backend code of stage i+1 from digital_correction.
// Timing: busy rises on the clock edge that sees start and stays high for
// N_CAL * (8 * (SETTLE + 2^AVG_LOG2 + 1) + 1) clocks.
module cal_controller
  import pipeadc_pkg::*;
#(
  parameter int unsigned N_STAGES = N_STAGES_DEF,
  parameter int unsigned N_CAL    = N_CAL_DEF,
  parameter int unsigned ACC_W    = ACC_W_DEF,
  parameter int unsigned EPS_W    = EPS_W_DEF,
  parameter int unsigned AVG_LOG2 = 4,
  parameter int unsigned SETTLE   = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [ACC_W-1:0] backend [N_CAL],
  output logic                    fe_cal_en,
  output logic [2:0]              fe_cal_stage,
  output logic [2:0]              fe_cal_cap,
  output logic signed [EPS_W-1:0] eps [N_CAPS],
  output logic [N_CAL-1:0]        comp_load,
  output logic                    busy,
  output logic                    done
);

  typedef enum logic [2:0] {S_IDLE, S_SETTLE, S_ACCUM, S_STORE, S_LOAD} state_t;

  localparam int unsigned SUM_W = ACC_W + AVG_LOG2;
  localparam int unsigned CNT_W = $clog2((SETTLE > (1 << AVG_LOG2) ? SETTLE : (1 << AVG_LOG2)) + 1);

  state_t                  state_q;
  logic [2:0]              stage_q;
  logic [2:0]              cap_q;
  logic [CNT_W-1:0]        cnt_q;
  logic signed [SUM_W-1:0] sum_q;

  // Ideal measurement -4 Delta, in final LSBs of stage (stage_q+1)'s backend:
  // -4 * 4^(N_STAGES - stage_q - 2) = -4^(N_STAGES - stage_q - 1).
  logic signed [SUM_W-1:0] ideal;
  logic signed [SUM_W-1:0] mean;
  logic signed [SUM_W-1:0] err;

  // Backend code of the stage being measured.
  logic signed [ACC_W-1:0] sel_backend;

  always_comb begin
    sel_backend = '0;
    for (int i = 0; i < int'(N_CAL); i++)
      if (stage_q == 3'(i)) sel_backend = backend[i];
  end

  always_comb begin
    ideal = -(SUM_W'(1) << (2 * (N_STAGES - 1 - int'(stage_q))));
    if (AVG_LOG2 == 0) mean = sum_q;
    else               mean = (sum_q + (SUM_W'(1) <<< (AVG_LOG2 - 1))) >>> AVG_LOG2;
    err = ideal - mean;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      stage_q   <= '0;
      cap_q     <= '0;
      cnt_q     <= '0;
      sum_q     <= '0;
      comp_load <= '0;
      done      <= 1'b0;
      for (int j = 0; j < N_CAPS; j++) eps[j] <= '0;
    end else begin
      comp_load <= '0;
      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            state_q <= S_SETTLE;
            stage_q <= 3'(N_CAL - 1);
            cap_q   <= '0;
            cnt_q   <= '0;
            done    <= 1'b0;
          end
        end
        S_SETTLE: begin
          if (cnt_q == CNT_W'(SETTLE - 1)) begin
            state_q <= S_ACCUM;
            cnt_q   <= '0;
            sum_q   <= '0;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_ACCUM: begin
          sum_q <= sum_q + SUM_W'(sel_backend);
          if (cnt_q == CNT_W'((1 << AVG_LOG2) - 1)) state_q <= S_STORE;
          else cnt_q <= cnt_q + 1'b1;
        end
        S_STORE: begin
          eps[cap_q] <= EPS_W'(err);
          cnt_q      <= '0;
          if (cap_q == 3'(N_CAPS - 1)) begin
            state_q <= S_LOAD;
          end else begin
            cap_q   <= cap_q + 1'b1;
            state_q <= S_SETTLE;
          end
        end
        S_LOAD: begin
          for (int i = 0; i < int'(N_CAL); i++)
            if (stage_q == 3'(i)) comp_load[i] <= 1'b1;
          cap_q              <= '0;
          if (stage_q == '0) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else begin
            stage_q <= stage_q - 1'b1;
            state_q <= S_SETTLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy         = (state_q != S_IDLE);
  assign fe_cal_en    = (state_q == S_SETTLE) || (state_q == S_ACCUM) || (state_q == S_STORE);
  assign fe_cal_stage = stage_q;
  assign fe_cal_cap   = cap_q;

  // At most one compensator is written at a time.
  a_one_load: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(comp_load));

endmodule
