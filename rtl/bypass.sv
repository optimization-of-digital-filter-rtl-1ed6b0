// bypass: decides whether the current stage of the time-shared biquad is in use.
//
// A candidate uses sections 0 .. mod_num-1. For the stage selected by mod_sel the
// block raises mod_bypass when mod_sel < mod_num, i.e. the biquad should run; a low
// level suppresses the biquad's RAM writes and multipliers for an unused stage
// (the signal is active low as a "bypass"). mod_sel is forwarded unchanged as
// mod_sel2 so that the stage address and the bypass decision reach the biquad
// together. Purely combinational; the comparison is the one of the original design.
module bypass
  import iir_pkg::*;
(
  input  stage_t mod_num,    // number of sections of the candidate
  input  stage_t mod_sel,    // current stage from the address creator
  output logic   mod_bypass, // 1: stage in use, 0: suppress the stage
  output stage_t mod_sel2    // mod_sel, forwarded to the biquad
);

  always_comb begin
    mod_bypass = (mod_num > mod_sel);
    mod_sel2   = mod_sel;
  end

endmodule
