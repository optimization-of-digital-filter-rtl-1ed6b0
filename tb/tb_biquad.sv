// tb_biquad: the time-shared biquad driven by a testbench sequencer that plays
// the roles of the address creator, bypass and I/O controller: stage/step
// counters, din = test sample in stage 0 and the biquad's own output otherwise,
// result taken in step 0 of stage nsos. A load frame writes the coefficients
// (random words on the stuffing steps must be ignored) and clears the state,
// then random samples are filtered. Results are compared bit-exactly with a
// sample-by-sample cascade model. Runs a 4-section and a 10-section candidate
// (the second load also checks that the state left by the first is cleared),
// then every section count from 1 to 10 in turn with a short run each.
module tb_biquad;
  import iir_pkg::*;
  import iir_tb_pkg::*;
  logic   clk = 1'b0, ram_rst, coef_feed_en, mod_bypass;
  coef_t  coef_in;
  data_t  din, dout;
  stage_t mod_sel;
  step_t  step_ctrl;
  data_t  sample;
  int checks = 0, failures = 0;
  int nsos;
  coef_t c [MAX_SOS][COEFS_PER_SOS];
  data_t x1 [MAX_SOS], x2 [MAX_SOS], y1 [MAX_SOS], y2 [MAX_SOS];

  biquad dut (.clk(clk), .ram_rst(ram_rst), .coef_in(coef_in), .din(din),
              .coef_feed_en(coef_feed_en), .mod_bypass(mod_bypass), .mod_sel(mod_sel),
              .step_ctrl(step_ctrl), .dout(dout));
  always #5 clk = ~clk;

  always_comb begin
    din = (mod_sel == '0) ? sample : dout;
    mod_bypass = (int'(mod_sel) < nsos);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic data_t model(data_t v);
    data_t y;
    for (int k = 0; k < nsos; k++) begin
      y = mul_trunc(v, c[k][0]) + mul_trunc(x1[k], c[k][1]) + mul_trunc(x2[k], c[k][2])
        - mul_trunc(y1[k], c[k][3]) - mul_trunc(y2[k], c[k][4]);
      x2[k] = x1[k]; x1[k] = v; y2[k] = y1[k]; y1[k] = y;
      v = y;
    end
    return v;
  endfunction

  // One clock of the sequencer: present (stage, step) for one cycle.
  task automatic tick(input int st, input int sp);
    mod_sel   <= stage_t'(st);
    step_ctrl <= step_t'(sp);
    @(posedge clk);
  endtask

  task automatic run_candidate(input int n, input int n_samples);
    data_t expq [$];
    nsos = n;
    for (int k = 0; k < MAX_SOS; k++) begin
      coef_t s [COEFS_PER_SOS];
      rand_section(s, 0.9);
      for (int j = 0; j < COEFS_PER_SOS; j++) c[k][j] = s[j];
      x1[k] = '0; x2[k] = '0; y1[k] = '0; y2[k] = '0;
    end
    // load frame
    coef_feed_en <= 1'b1;
    for (int st = 0; st < MAX_SOS; st++)
      for (int sp = 0; sp < MOD_DELAY; sp++) begin
        coef_in <= (sp < COEFS_PER_SOS) ? c[st][sp] : coef_t'($urandom);
        tick(st, sp);
      end
    coef_feed_en <= 1'b0;
    coef_in <= coef_t'($urandom);
    // filter frames; result of a frame is taken at step 0 of stage nsos (next frame for 10)
    for (int m = 0; m <= n_samples; m++) begin
      sample <= (m < n_samples) ? data_t'(signed'($urandom)) <<< 25 : '0;
      for (int st = 0; st < MAX_SOS; st++)
        for (int sp = 0; sp < MOD_DELAY; sp++) begin
          mod_sel   <= stage_t'(st);
          step_ctrl <= step_t'(sp);
          @(negedge clk);
          if (sp == 0 && ((st == nsos && m < n_samples) || (nsos == MAX_SOS && st == 0 && m > 0))) begin
            check(expq.size() > 0 && dout == expq[0], $sformatf("n=%0d m=%0d got %h exp %h", nsos, m, dout, expq[0]));
            void'(expq.pop_front());
          end
          if (st == 0 && sp == 0 && m < n_samples) expq.push_back(model(data_t'(sample)));
          @(posedge clk);
        end
    end
    check(expq.size() == 0, "results left over");
  endtask

  initial begin
    ram_rst = 0; coef_feed_en = 0; coef_in = '0; sample = '0; mod_sel = '0; step_ctrl = '0;
    nsos = 0;
    repeat (3) @(posedge clk);
    run_candidate(4, 40);
    run_candidate(10, 30);
    for (int n = 1; n <= MAX_SOS; n++) run_candidate(n, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
