// iir_tb_pkg: reference model and frame builder shared by the testbenches.
//
// The reference model is written sample by sample, independently of the RTL's
// time-shared schedule: for every test sample it runs the whole cascade of
// Direct Form I sections with the same fixed-point rules as the hardware
//   x   = lfsr word (fix_32_29) * g (fix_32_29)   -> fix_64_58, then >>2 -> fix_64_56
//   p   = state (fix_64_56) * coef (fix_32_29)    -> >>29, low 64 bits
//   y   = p_b0 + p_b1 + p_b2 - p_a1 - p_a2         modulo 2^64 (fix_64_56)
//   out = y_last >> 27, low 34 bits               (fix_34_29)
// The LFSR model keeps the 32 stages as a bit array numbered 1..32.
package iir_tb_pkg;
  import iir_pkg::*;

  typedef coef_t sos_coefs_t [COEFS_PER_SOS];

  typedef struct {
    logic [31:0] uid;
    int          nsos_word;          // value sent in the section-count word
    coef_t       g;
    coef_t       c [MAX_SOS][COEFS_PER_SOS];
    coef_t       stuff [MAX_SOS][MOD_DELAY - COEFS_PER_SOS];
  } cand_t;

  function automatic logic [31:0] lfsr_model_next(logic [31:0] q);
    bit s [1:32];
    bit n [1:32];
    logic [31:0] r;
    for (int i = 1; i <= 32; i++) s[i] = q[i-1];
    for (int i = 32; i >= 2; i--) n[i] = s[i-1];
    n[1] = !(s[32] ^ s[22] ^ s[2] ^ s[1]);
    for (int i = 1; i <= 32; i++) r[i-1] = n[i];
    return r;
  endfunction

  function automatic coef_t to_fix29(real v);
    return coef_t'($rtoi(v * 536870912.0));
  endfunction

  function automatic real urand01();
    return real'($urandom) / 4294967296.0;
  endfunction

  // Random stable section: poles at radius rp, zeros at radius rz.
  function automatic void rand_section(output coef_t c [COEFS_PER_SOS], input real rmax);
    real rp, tp, rz, tz, bs;
    rp = 0.3 + (rmax - 0.3) * urand01();
    tp = 3.14159265 * urand01();
    rz = urand01();
    tz = 3.14159265 * urand01();
    bs = 0.25 + 0.5 * urand01();
    c[0] = to_fix29(bs);
    c[1] = to_fix29(-2.0 * rz * $cos(tz) * bs);
    c[2] = to_fix29(rz * rz * bs);
    c[3] = to_fix29(-2.0 * rp * $cos(tp));
    c[4] = to_fix29(rp * rp);
  endfunction

  function automatic data_t mul_trunc(data_t d, coef_t c);
    logic signed [95:0] p;
    p = 96'(d) * 96'(c);
    return p[29 +: 64];
  endfunction

  // Expected output sequence of a candidate for n_vec samples.
  function automatic void reference(input cand_t cd, input int n_vec, input logic [31:0] seed,
                                    ref out_t gold [$]);
    data_t x1 [MAX_SOS], x2 [MAX_SOS], y1 [MAX_SOS], y2 [MAX_SOS];
    logic [31:0] q;
    int nsec;
    gold.delete();
    nsec = (cd.nsos_word & 15);
    if (nsec > MAX_SOS) nsec = MAX_SOS;
    for (int k = 0; k < MAX_SOS; k++) begin
      x1[k] = '0; x2[k] = '0; y1[k] = '0; y2[k] = '0;
    end
    q = seed;
    for (int m = 0; m < n_vec; m++) begin
      gdat_t gx;
      data_t v, y;
      gx = gdat_t'(coef_t'(q)) * gdat_t'(cd.g);
      v  = data_t'(gx >>> 2);
      for (int k = 0; k < nsec; k++) begin
        y = mul_trunc(v, cd.c[k][0]) + mul_trunc(x1[k], cd.c[k][1]) + mul_trunc(x2[k], cd.c[k][2])
          - mul_trunc(y1[k], cd.c[k][3]) - mul_trunc(y2[k], cd.c[k][4]);
        x2[k] = x1[k]; x1[k] = v;
        y2[k] = y1[k]; y1[k] = y;
        v = y;
      end
      gold.push_back(out_t'(v >>> 27));
      q = lfsr_model_next(q);
    end
  endfunction

  // Frame words of a candidate, in transmission order.
  function automatic void build_frame(input cand_t cd, ref coef_t words [$]);
    words.delete();
    words.push_back(coef_t'(START_FLAG));
    words.push_back(coef_t'(cd.uid));
    words.push_back(coef_t'(cd.nsos_word));
    words.push_back(cd.g);
    for (int k = 0; k < MAX_SOS; k++) begin
      for (int j = 0; j < COEFS_PER_SOS; j++) words.push_back(cd.c[k][j]);
      for (int j = 0; j < MOD_DELAY - COEFS_PER_SOS; j++) words.push_back(cd.stuff[k][j]);
    end
  endfunction

endpackage
