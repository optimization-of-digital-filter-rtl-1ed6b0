// iir_accel_top: reconfigurable IIR filter of up to 20th order for accelerated
// evaluation of filter candidates.
//
// A host sends a candidate as a frame of 32-bit words on coef_in (start flag, UID,
// section count, gain g, then ten 8-word slots holding b0 b1 b2 a1 a2 of each
// second-order section). The engine loads it, then filters a fixed pseudo-random
// test sequence of N_VEC samples through
//   H(z) = g * prod_k (b0k + b1k z^-1 + b2k z^-2) / (1 + a1k z^-1 + a2k z^-2)
// and returns one fix_34_29 result per sample on data_out, flagged by out_en.
// out_end rises when the whole response has been returned. A frame whose UID
// equals the loaded candidate's is ignored.
// One biquad is shared by all sections: each test sample occupies a frame of
// MAX_SOS*MOD_DELAY = 80 clocks, in which the address creator steps the biquad
// through sections 0..9 (8 clocks each), the bypass block idles the sections the
// candidate does not use, and the I/O controller feeds each section's output back
// as the next section's input.
// Sub-blocks: init_ctrl (frame parser, coefficient cache, g multiplier),
// datagen_out (LFSR test data, run control, output cache), addr_creator, bypass,
// biquad_io_ctrl, biquad.
// Timing (clock cycles, frame start word at t0): coefficients load during
// t0+5..t0+84 (frame 0); test vector m is generated in frame m+1, filtered in
// frame m+2, and its result is on data_out with out_en in the cycle after the
// last clock of frame m+3. A candidate takes about (N_VEC+4)*80 clocks.
// Block partition and data flow follow the original design, including coef_ini
// driving the biquad's ram_rst; the biquad state is fully cleared while
// coef_feed_en loads the new coefficients.
module iir_accel_top
  import iir_pkg::*;
#(
  parameter int unsigned N_VEC = N_VECTORS
) (
  input  logic  clk,
  input  logic  rst,       // synchronous power-on reset, active high
  input  coef_t coef_in,   // host word stream (Coef_IN, fix_32_29)
  output out_t  data_out,  // filter result (Data_OUT, fix_34_29)
  output logic  out_en,    // data_out valid (Out_CTRL)
  output logic  out_end    // response of the candidate complete
);

  coef_t  pseudo_data;
  gdat_t  gdata;
  coef_t  coef_stream;
  stage_t mod_num;
  logic   coef_feed_en;
  logic   coef_ini;
  logic   in_address, out_address;
  stage_t mod_address, mod_sel;
  step_t  step_ctrl;
  logic   mod_bypass;
  data_t  biquad_din, biquad_dout;
  out_t   result;

  init_ctrl u_init (
    .clk          (clk),
    .rst          (rst),
    .coef_in      (coef_in),
    .data_in      (pseudo_data),
    .end_i        (out_end),
    .coef_out     (coef_stream),
    .data_out     (gdata),
    .mod_num      (mod_num),
    .coef_feed_en (coef_feed_en),
    .coef_ini     (coef_ini)
  );

  datagen_out #(.N_VEC(N_VEC)) u_datagen (
    .clk         (clk),
    .rst         (rst),
    .dout_ramin  (result),
    .ini_rst     (coef_ini),
    .dout        (data_out),
    .outen       (out_en),
    .pseudo_data (pseudo_data),
    .outend      (out_end)
  );

  addr_creator u_addr (
    .clk         (clk),
    .rst         (rst),
    .coef_ini    (coef_ini),
    .mod_num     (mod_num),
    .in_address  (in_address),
    .out_address (out_address),
    .mod_address (mod_address),
    .step_ctrl   (step_ctrl)
  );

  bypass u_bypass (
    .mod_num    (mod_num),
    .mod_sel    (mod_address),
    .mod_bypass (mod_bypass),
    .mod_sel2   (mod_sel)
  );

  biquad_io_ctrl u_io (
    .clk        (clk),
    .rst        (rst),
    .biquad_fb  (biquad_dout),
    .data_in    (gdata),
    .in_sel     (in_address),
    .out_sel    (out_address),
    .biquad_din (biquad_din),
    .data_out   (result)
  );

  biquad u_biquad (
    .clk          (clk),
    .ram_rst      (coef_ini),
    .coef_in      (coef_stream),
    .din          (biquad_din),
    .coef_feed_en (coef_feed_en),
    .mod_bypass   (mod_bypass),
    .mod_sel      (mod_sel),
    .step_ctrl    (step_ctrl),
    .dout         (biquad_dout)
  );

endmodule
