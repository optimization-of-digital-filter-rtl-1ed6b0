// iir_pkg: formats, sizes and constants shared by the reconfigurable IIR filter engine.
//
// The engine filters one test sample through up to MAX_SOS second-order sections
// (SOS) with a single time-shared biquad. Each section takes MOD_DELAY clocks, so
// one sample period ("frame") is MAX_SOS*MOD_DELAY = 80 clocks.
//
// Fixed-point formats are written fix_W_F: W-bit two's complement, F fraction bits.
//   coef_t  fix_32_29  coefficient words, gain g and raw test vectors
//   gdat_t  fix_64_58  test vector multiplied by g (full-precision product)
//   data_t  fix_64_56  biquad data path (input, state, products, output)
//   out_t   fix_34_29  result word returned to the host
// The formats, the 10-section limit, the 8-clock section time, the 2048-vector run
// and the 0xAAAAAAAA start flag are those of the original design; the type names
// are this package's own.
package iir_pkg;

  localparam int unsigned COEF_W    = 32;
  localparam int unsigned COEF_FRAC = 29;
  localparam int unsigned GDAT_W    = 64;
  localparam int unsigned GDAT_FRAC = 58;
  localparam int unsigned DATA_W    = 64;
  localparam int unsigned DATA_FRAC = 56;
  localparam int unsigned OUT_W     = 34;
  localparam int unsigned OUT_FRAC  = 29;
  // Width of the adder tree result before it is cast back to data_t.
  localparam int unsigned SUM_W     = DATA_W + 3;

  localparam int unsigned MAX_SOS   = 10;   // sections per frame, filter order up to 20
  localparam int unsigned MOD_DELAY = 8;    // clocks per section
  localparam int unsigned FRAME_LEN = MAX_SOS * MOD_DELAY;
  localparam int unsigned COEFS_PER_SOS = 5; // b0 b1 b2 a1 a2
  localparam int unsigned N_VECTORS = 2048; // test vectors per candidate
  localparam int unsigned G_MULT_LAT = 6;   // latency of the test-data * g multiplier
  localparam int unsigned MULT_LAT  = 4;    // latency of the biquad multipliers

  localparam logic [COEF_W-1:0] START_FLAG = 32'hAAAA_AAAA;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [GDAT_W-1:0] gdat_t;
  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [OUT_W-1:0]  out_t;
  typedef logic signed [SUM_W-1:0]  sum_t;
  typedef logic [3:0]               stage_t;  // SOS index (UFix_4_0)
  typedef logic [2:0]               step_t;   // step inside a section (UFix_3_0)

  // Tap order inside a section; also the order of the coefficients in a frame.
  typedef enum logic [2:0] {TAP_B0 = 3'd0, TAP_B1 = 3'd1, TAP_B2 = 3'd2,
                            TAP_A1 = 3'd3, TAP_A2 = 3'd4} tap_e;

  // Frame parser states (input examining circuit).
  typedef enum logic [1:0] {S0_HUNT = 2'd0, S1_UID = 2'd1, S2_LOAD = 2'd2} init_state_e;

endpackage
