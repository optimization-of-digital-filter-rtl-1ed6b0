// addr_creator: stage and step sequencing of the time-shared biquad.
//
// Two counters drive the whole filter loop. The step counter runs 0..MOD_DELAY-1
// (one section takes MOD_DELAY clocks); the stage counter runs 0..MAX_SOS-1 and
// advances when the step counter wraps. coef_ini restarts both at zero, which
// aligns a new candidate's coefficient stream with the stages. Both counters
// reach the outputs through one register:
//   mod_address  current stage, the address of the biquad's state/coefficient RAMs
//   step_ctrl    current step inside the section
//   in_address   high for the whole of stage 0: the biquad takes the test sample
//   out_address  high in step 0 of stage mod_num: the biquad output then holds the
//                result of the last used section. A mod_num of MAX_SOS or more
//                maps to stage 0 (step 0 of the next frame).
// Timing: coef_ini high in cycle c gives mod_address=0, step_ctrl=0 in cycle c+2.
// Counters, comparisons and the mod_num mapping follow the original design.
module addr_creator
  import iir_pkg::*;
#(
  parameter int unsigned N_SOS = MAX_SOS,
  parameter int unsigned STEPS = MOD_DELAY
) (
  input  logic   clk,
  input  logic   rst,          // synchronous power-on reset
  input  logic   coef_ini,     // restart of the stage/step sequence
  input  stage_t mod_num,      // number of sections of the candidate
  output logic   in_address,
  output logic   out_address,
  output stage_t mod_address,
  output step_t  step_ctrl
);

  step_t  step_cnt;
  stage_t stage_cnt;
  stage_t out_stage;

  always_ff @(posedge clk) begin
    if (rst || coef_ini) begin
      step_cnt  <= '0;
      stage_cnt <= '0;
    end else begin
      if (step_cnt == step_t'(STEPS - 1)) begin
        step_cnt  <= '0;
        stage_cnt <= (stage_cnt == stage_t'(N_SOS - 1)) ? '0 : stage_cnt + 1'b1;
      end else begin
        step_cnt <= step_cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mod_address <= '0;
      step_ctrl   <= '0;
    end else begin
      mod_address <= stage_cnt;
      step_ctrl   <= step_cnt;
    end
  end

  always_comb begin
    out_stage   = (mod_num >= stage_t'(N_SOS)) ? '0 : mod_num;
    in_address  = (mod_address == '0);
    out_address = (mod_address == out_stage) && (step_ctrl == '0);
  end

endmodule
