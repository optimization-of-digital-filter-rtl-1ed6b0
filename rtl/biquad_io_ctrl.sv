// biquad_io_ctrl: input selection and output capture around the time-shared biquad.
//
// Input side: during stage 0 (in_sel high) the biquad takes the g-scaled test
// sample, converted from fix_64_58 to the biquad's fix_64_56 (two fraction bits
// truncated); in every other stage it takes its own previous output (biquad_fb),
// which makes the single biquad behave as a cascade of sections.
// Output side: when out_sel is high (step 0 of the stage after the last used
// section) the feedback word, cast to fix_34_29 (27 fraction bits truncated, upper
// bits wrapped), is caught in a register. Once per frame, at the end of step 1 of
// stage 0, that register is copied to data_out. The catch moment depends on the
// number of sections (late in the frame, or in step 0 of the next frame for a
// full 10-section filter); the fixed copy point gives every candidate the same
// output timing: the result for the sample taken in frame f appears on data_out
// two clocks after the start of frame f+1 and is held for a whole frame.
// The mux, both casts and the two-register output path follow the original
// design; the copy point derived from the rising edge of in_sel replaces its delay
// lines and 80x down-sampler and is this design's choice.
module biquad_io_ctrl
  import iir_pkg::*;
(
  input  logic  clk,
  input  logic  rst,         // synchronous reset of the output registers
  input  data_t biquad_fb,   // biquad output, fix_64_56
  input  gdat_t data_in,     // g-scaled test sample, fix_64_58
  input  logic  in_sel,      // 1: take data_in, 0: take biquad_fb
  input  logic  out_sel,     // catch the final result
  output data_t biquad_din,  // biquad input, fix_64_56
  output out_t  data_out     // filter result, fix_34_29, one per frame
);

  data_t data_conv;
  out_t  fb_conv;
  out_t  res_q;
  logic  in_sel_d1, in_sel_d2;

  always_comb begin
    data_conv  = data_t'(data_in >>> (GDAT_FRAC - DATA_FRAC));
    biquad_din = in_sel ? data_conv : biquad_fb;
    fb_conv    = out_t'(biquad_fb >>> (DATA_FRAC - OUT_FRAC));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      res_q     <= '0;
      data_out  <= '0;
      in_sel_d1 <= 1'b0;
      in_sel_d2 <= 1'b0;
    end else begin
      in_sel_d1 <= in_sel;
      in_sel_d2 <= in_sel_d1;
      if (out_sel) res_q <= fb_conv;
      if (in_sel_d1 && !in_sel_d2) data_out <= res_q;
    end
  end

endmodule
