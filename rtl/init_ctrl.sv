// init_ctrl: frame parser, coefficient cache and test-data scaling.
//
// The host streams one 32-bit word per clock on coef_in. A candidate frame is
//   START_FLAG, UID, number of sections, gain g,
//   then MAX_SOS slots of MOD_DELAY words: b0 b1 b2 a1 a2 and three stuffing words
// (unused slots carry zero coefficients). Words outside a frame are ignored.
// Frame parser (three states):
//   S0_HUNT  wait for START_FLAG
//   S1_UID   the word after the flag is the UID. Equal to the UID of the last
//            loaded candidate: the frame is a repeat, back to S0_HUNT without
//            touching anything. Otherwise store it and go to S2_LOAD.
//   S2_LOAD  store the section count and g, then cache the coefficients; back to
//            S0_HUNT when all MAX_SOS slots have passed ("caching completed").
// Coefficient cache: a MAX_SOS*5 x 32 single-port RAM. A slot counter (0..7) and
// an address counter (0..MAX_SOS*5-1) skip the stuffing words: the address
// advances only on the five coefficient words of a slot. The RAM read is
// write-first, so the cached word appears one clock later on coef_out; coef_out
// is forced to zero when no coefficient is being written.
// Outputs to the rest of the engine:
//   coef_ini      one-clock pulse, two clocks before slot 0 word b0 reaches
//                 coef_out; restarts the address creator and the data generator
//   coef_feed_en  high for the MAX_SOS*MOD_DELAY clocks in which the slot words
//                 reach coef_out (the biquad loads its coefficient RAMs)
//   mod_num       section count, low 4 bits of its frame word read as an integer
//   data_out      test sample (fix_32_29) times g (fix_32_29) = fix_64_58, full
//                 precision, G_MULT_LAT = 6 clocks; zero once end_i is high.
// Frame order, the start flag, the UID check, the 5-of-8 slot scheme, the
// 50-word cache and the 6-clock multiplier follow the original design. The
// integer reading of the section-count word, the zeroing of data_out after the
// run and the exact pulse timing are this design's choices.
module init_ctrl
  import iir_pkg::*;
#(
  parameter int unsigned N_SOS = MAX_SOS,
  parameter int unsigned STEPS = MOD_DELAY
) (
  input  logic   clk,
  input  logic   rst,           // synchronous power-on reset
  input  coef_t  coef_in,       // host word stream
  input  coef_t  data_in,       // test sample from the data generator, fix_32_29
  input  logic   end_i,         // run finished (from the data generator)
  output coef_t  coef_out,      // cached coefficient stream to the biquad
  output gdat_t  data_out,      // g * test sample, fix_64_58
  output stage_t mod_num,       // number of sections of the candidate
  output logic   coef_feed_en,
  output logic   coef_ini
);

  localparam int unsigned N_COEF = N_SOS * COEFS_PER_SOS;
  localparam int unsigned AW     = $clog2(N_COEF);

  init_state_e      state;
  logic             hdr_idx;     // 0: section-count word, 1: gain word
  logic             in_coefs;    // slot words are arriving
  step_t            slot_cnt;    // counter #2: word inside a slot
  logic [AW-1:0]    addr_cnt;    // counter #1: cache address
  logic [31:0]      uid_q;
  logic             uid_valid;
  coef_t            g_q;

  coef_t            cache [N_COEF];
  coef_t            cache_q;
  logic             cache_we, cache_we_d;

  always_comb cache_we = in_coefs && (slot_cnt < step_t'(COEFS_PER_SOS));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S0_HUNT;
      hdr_idx   <= 1'b0;
      in_coefs  <= 1'b0;
      slot_cnt  <= '0;
      addr_cnt  <= '0;
      uid_q     <= '0;
      uid_valid <= 1'b0;
      g_q       <= '0;
      mod_num   <= '0;
      coef_ini  <= 1'b0;
    end else begin
      coef_ini <= 1'b0;
      unique case (state)
        S0_HUNT: if (coef_in == START_FLAG) state <= S1_UID;
        S1_UID: begin
          if (uid_valid && (coef_in == uid_q)) begin
            state <= S0_HUNT;               // old UID: repeated frame
          end else begin
            uid_q     <= coef_in;
            uid_valid <= 1'b1;
            hdr_idx   <= 1'b0;
            state     <= S2_LOAD;
          end
        end
        S2_LOAD: begin
          if (!in_coefs) begin
            if (!hdr_idx) begin
              mod_num  <= stage_t'(coef_in);
              hdr_idx  <= 1'b1;
              coef_ini <= 1'b1;
            end else begin
              g_q      <= coef_in;
              in_coefs <= 1'b1;
              slot_cnt <= '0;
              addr_cnt <= '0;
            end
          end else begin
            slot_cnt <= (slot_cnt == step_t'(STEPS - 1)) ? '0 : slot_cnt + 1'b1;
            if (cache_we && (addr_cnt != AW'(N_COEF - 1))) addr_cnt <= addr_cnt + 1'b1;
            if ((addr_cnt == AW'(N_COEF - 1)) && (slot_cnt == step_t'(STEPS - 1))) begin
              in_coefs <= 1'b0;
              state    <= S0_HUNT;              // caching completed
            end
          end
        end
        default: state <= S0_HUNT;
      endcase
    end
  end

  // Coefficient cache, write-first single-port RAM.
  always_ff @(posedge clk) begin
    if (cache_we) begin
      cache[addr_cnt] <= coef_in;
      cache_q         <= coef_in;
    end else begin
      cache_q         <= cache[addr_cnt];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cache_we_d   <= 1'b0;
      coef_feed_en <= 1'b0;
    end else begin
      cache_we_d   <= cache_we;
      coef_feed_en <= in_coefs;
    end
  end

  always_comb coef_out = cache_we_d ? cache_q : '0;

  // Test data times g: full-precision product through a G_MULT_LAT register pipe.
  gdat_t mult_pipe [G_MULT_LAT];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < G_MULT_LAT; i++) mult_pipe[i] <= '0;
    end else begin
      mult_pipe[0] <= end_i ? '0 : gdat_t'(data_in) * gdat_t'(g_q);
      for (int i = 1; i < G_MULT_LAT; i++) mult_pipe[i] <= mult_pipe[i-1];
    end
  end

  always_comb data_out = mult_pipe[G_MULT_LAT-1];

endmodule
