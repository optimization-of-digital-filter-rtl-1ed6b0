// biquad: one Direct Form I second-order IIR section, time-shared by all stages.
//
//   y(n) = b0*x(n) + b1*x(n-1) + b2*x(n-2) - a1*y(n-1) - a2*y(n-2)
//
// Every stage (section) of the cascade has its own five state words
// x(n), x(n-1), x(n-2), y(n-1), y(n-2) and five coefficients, kept in ten small
// RAMs (five "status" RAMs of data_t, five coefficient RAMs of coef_t) addressed by
// mod_sel. One section is computed in the MOD_DELAY = 8 steps given by step_ctrl:
//   step 0  din is written to status RAM b0 (x(n)); all RAMs are read at mod_sel
//   step 1  RAM outputs valid; the five products start (MULT_LAT = 4 clocks)
//   step 2  the taps shift: b1 <= x(n), b2 <= x(n-1), a2 <= y(n-1)
//   step 5  products valid, adder tree starts (2 clocks)
//   step 7  y(n) is written to status RAM a1
// RAM reads are registered and write-first, so in step 0 of the next stage dout
// shows the y(n) just written; that is the value the I/O controller feeds back as
// the next stage's din, or registers as the filter output.
// Coefficients: while coef_feed_en is high, the word on coef_in is written to
// coefficient RAM k (k = 0..4 for b0 b1 b2 a1 a2) in step k of stage mod_sel, and
// the stage's status words are cleared, so a new candidate starts from rest.
// ram_rst clears the status words of the addressed stage as well.
// mod_bypass low (stage not used) suppresses all status writes and freezes the
// multiplier and adder pipelines.
// Arithmetic: data fix_64_56, coefficients fix_32_29. Each product is truncated
// to fix_64_56 (29 fraction bits dropped, upper bits wrap); the five terms are
// summed in full precision (fix_67_56) and the sum wraps to fix_64_56 when stored.
// The feedback products enter the adder tree negated.
// The RAM organisation, the 8-step schedule, the latencies and the formats are
// those of the original design; the negation of the feedback terms, the
// write-first RAM mode and the status clearing during coefficient loading are this
// design's choices.
module biquad
  import iir_pkg::*;
#(
  parameter int unsigned N_SOS = MAX_SOS
) (
  input  logic   clk,
  input  logic   ram_rst,       // clear status words of stage mod_sel
  input  coef_t  coef_in,       // coefficient stream, fix_32_29
  input  data_t  din,           // section input x(n), fix_64_56
  input  logic   coef_feed_en,  // coefficient loading active
  input  logic   mod_bypass,    // 1: stage in use, 0: suppress
  input  stage_t mod_sel,       // stage address
  input  step_t  step_ctrl,     // step inside the section
  output data_t  dout           // status RAM a1 output: y of the section
);

  localparam int unsigned NTAP = COEFS_PER_SOS;
  localparam int unsigned PROD_W = DATA_W + COEF_W;

  // Status and coefficient RAMs, one per tap.
  data_t st_mem [NTAP][N_SOS];
  coef_t cf_mem [NTAP][N_SOS];
  data_t st_q   [NTAP];
  coef_t cf_q   [NTAP];

  logic  st_we  [NTAP];
  data_t st_wd  [NTAP];
  logic  cf_we  [NTAP];

  // One-clock delays between neighbouring taps (x(n)->b1, x(n-1)->b2, y(n-1)->a2).
  data_t sh_b0, sh_b1, sh_a1;

  data_t prod      [NTAP];
  data_t prod_pipe [MULT_LAT][NTAP];
  sum_t  tree_out;
  logic  active;
  logic  clear;

  always_comb begin
    active = mod_bypass;
    clear  = ram_rst || coef_feed_en;
    for (int t = 0; t < NTAP; t++) begin
      st_we[t] = 1'b0;
      st_wd[t] = '0;
      cf_we[t] = coef_feed_en && (step_ctrl == step_t'(t));
    end
    if (clear) begin
      for (int t = 0; t < NTAP; t++) st_we[t] = 1'b1;
    end else if (active) begin
      unique case (step_ctrl)
        3'd0: begin
          st_we[TAP_B0] = 1'b1;
          st_wd[TAP_B0] = din;
        end
        3'd2: begin
          st_we[TAP_B1] = 1'b1;  st_wd[TAP_B1] = sh_b0;
          st_we[TAP_B2] = 1'b1;  st_wd[TAP_B2] = sh_b1;
          st_we[TAP_A2] = 1'b1;  st_wd[TAP_A2] = sh_a1;
        end
        3'd7: begin
          st_we[TAP_A1] = 1'b1;
          st_wd[TAP_A1] = data_t'(tree_out);
        end
        default: ;
      endcase
    end
  end

  // Single-port RAMs, registered read, write-first.
  always_ff @(posedge clk) begin
    for (int t = 0; t < NTAP; t++) begin
      if (st_we[t]) begin
        st_mem[t][mod_sel] <= st_wd[t];
        st_q[t]            <= st_wd[t];
      end else begin
        st_q[t]            <= st_mem[t][mod_sel];
      end
      if (cf_we[t]) begin
        cf_mem[t][mod_sel] <= coef_in;
        cf_q[t]            <= coef_in;
      end else begin
        cf_q[t]            <= cf_mem[t][mod_sel];
      end
    end
  end

  always_ff @(posedge clk) begin
    sh_b0 <= st_q[TAP_B0];
    sh_b1 <= st_q[TAP_B1];
    sh_a1 <= st_q[TAP_A1];
  end

  // Multipliers: full product truncated to fix_64_56, then MULT_LAT registers.
  always_comb begin
    for (int t = 0; t < NTAP; t++) begin
      logic signed [PROD_W-1:0] p;
      p       = PROD_W'(st_q[t]) * PROD_W'(cf_q[t]);
      prod[t] = data_t'(p >>> COEF_FRAC);
    end
  end

  always_ff @(posedge clk) begin
    if (active) begin
      for (int t = 0; t < NTAP; t++) begin
        prod_pipe[0][t] <= prod[t];
        for (int s = 1; s < MULT_LAT; s++) prod_pipe[s][t] <= prod_pipe[s-1][t];
      end
    end
  end

  adder_tree u_tree (
    .clk (clk),
    .en  (active),
    .in1 (prod_pipe[MULT_LAT-1][TAP_B0]),
    .in2 (prod_pipe[MULT_LAT-1][TAP_B1]),
    .in3 (prod_pipe[MULT_LAT-1][TAP_B2]),
    .in4 (-prod_pipe[MULT_LAT-1][TAP_A1]),
    .in5 (-prod_pipe[MULT_LAT-1][TAP_A2]),
    .out (tree_out)
  );

  always_comb dout = st_q[TAP_A1];

endmodule
