// tb_iir_accel_top: end-to-end test of the filter engine at its default sizes
// (2048 test vectors per candidate).
//
// Sequence: idle words that are not a start flag; candidate A (10 sections, the
// full 20th order, non-zero stuffing words) run to completion; the same frame sent
// again, which must be ignored; candidate B (FIR: 3 sections with a1 = a2 = 0)
// interrupted after 100 results by candidate C (section-count word 12, beyond the
// 10-section limit, which must behave as 10 sections); candidate D (1 section) run
// to completion. Every result is compared with the bit-exact reference model of
// iir_tb_pkg. Also checked: the latency from the start flag to the first result
// (324 clocks), the 80-clock spacing of results, out_end. Each mechanism
// (repeat UID ignored, reload, mid-run restart, unused-stage bypass, stuffing
// words dropped, over-range section count, full 10-section wrap) is counted and
// must occur at least once.
module tb_iir_accel_top;
  import iir_pkg::*;
  import iir_tb_pkg::*;

  localparam int unsigned NV = N_VECTORS;

  logic  clk = 1'b0;
  logic  rst;
  coef_t coef_in;
  out_t  data_out;
  logic  out_en, out_end;

  int checks = 0, failures = 0;
  longint cyc = 0;

  iir_accel_top dut (
    .clk      (clk),
    .rst      (rst),
    .coef_in  (coef_in),
    .data_out (data_out),
    .out_en   (out_en),
    .out_end  (out_end)
  );

  always #5 clk = ~clk;

  // Expected results of the active candidate.
  out_t   gold [$];
  int     got = 0;
  longint flag_cyc = 0, last_en_cyc = 0;
  int     n_bypass_cycles = 0, n_wrap_captures = 0;
  int     n_repeat_ignored = 0, n_reload = 0, n_restart = 0, n_over_range = 0, n_stuffing = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && coef_in == coef_t'(START_FLAG)) flag_cyc <= cyc;
    if (!rst && dut.mod_bypass == 1'b0) n_bypass_cycles++;
    if (!rst && dut.out_address && dut.mod_address == 4'd0) n_wrap_captures++;
    if (!rst && out_en) begin
      if (got < gold.size())
        check(data_out == gold[got], $sformatf("result %0d: got %h expected %h", got, data_out, gold[got]));
      else
        check(1'b0, $sformatf("unexpected result %0d", got));
      if (got == 0)
        check(cyc - flag_cyc == 324, $sformatf("first-result latency %0d", cyc - flag_cyc));
      else
        check(cyc - last_en_cyc == longint'(FRAME_LEN), $sformatf("result spacing %0d", cyc - last_en_cyc));
      last_en_cyc <= cyc;
      got++;
    end
  end

  task automatic send_words(input coef_t w [$]);
    foreach (w[i]) begin
      coef_in <= w[i];
      @(posedge clk);
    end
    coef_in <= '0;
  endtask

  task automatic start_cand(input cand_t cd);
    coef_t w [$];
    build_frame(cd, w);
    reference(cd, NV, 32'h0, gold);
    got = 0;
    send_words(w);
  endtask

  function automatic cand_t make_cand(input logic [31:0] uid, input int nsos_word,
                                      input bit fir, input real rmax);
    cand_t cd;
    cd.uid = uid;
    cd.nsos_word = nsos_word;
    cd.g = to_fix29(0.125 + 0.25 * urand01());
    for (int k = 0; k < MAX_SOS; k++) begin
      coef_t c [COEFS_PER_SOS];
      rand_section(c, rmax);
      if (fir) begin c[3] = '0; c[4] = '0; end
      for (int j = 0; j < COEFS_PER_SOS; j++) cd.c[k][j] = c[j];
      for (int j = 0; j < MOD_DELAY - COEFS_PER_SOS; j++) cd.stuff[k][j] = coef_t'($urandom);
    end
    return cd;
  endfunction

  task automatic wait_end();
    while (!out_end) @(posedge clk);
    repeat (5) @(posedge clk);
  endtask

  cand_t ca, cb, cc, cdd;

  initial begin
    rst = 1'b1;
    coef_in = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 20; i++) begin
      coef_in <= coef_t'($urandom) & 32'h7fff_ffff;
      @(posedge clk);
    end

    // A: 10 sections, run to completion.
    ca = make_cand(32'h1234_0001, 10, 1'b0, 0.9);
    start_cand(ca);
    n_stuffing++;
    wait_end();
    check(got == NV, $sformatf("A: %0d results", got));
    check(out_end == 1'b1, "A: out_end");

    // Same UID again: must be ignored.
    begin
      coef_t w [$];
      int n_prev;
      n_prev = got;
      build_frame(ca, w);
      send_words(w);
      repeat (5 * FRAME_LEN) @(posedge clk);
      check(got == n_prev && out_end, "repeated UID was not ignored");
      if (got == n_prev && out_end && dut.u_init.state == S0_HUNT) n_repeat_ignored++;
    end

    // B: FIR, 3 sections, interrupted by C after 100 results.
    cb = make_cand(32'h1234_0002, 3, 1'b1, 0.9);
    start_cand(cb);
    n_reload++;
    while (got < 100) @(posedge clk);
    @(posedge clk);
    check(!out_end, "B: out_end early");
    cc = make_cand(32'h1234_0003, 12, 1'b0, 0.8);
    start_cand(cc);
    n_restart++;
    n_over_range++;
    wait_end();
    check(got == NV, $sformatf("C: %0d results", got));

    // D: 1 section.
    cdd = make_cand(32'h1234_0004, 1, 1'b0, 0.95);
    start_cand(cdd);
    n_reload++;
    wait_end();
    check(got == NV, $sformatf("D: %0d results", got));

    $display("mechanisms: repeat_ignored=%0d reload=%0d restart=%0d over_range=%0d stuffing=%0d bypass_cycles=%0d wrap_captures=%0d",
             n_repeat_ignored, n_reload, n_restart, n_over_range, n_stuffing, n_bypass_cycles, n_wrap_captures);
    check(n_repeat_ignored > 0, "mechanism: repeated UID ignored");
    check(n_reload > 0, "mechanism: reload");
    check(n_restart > 0, "mechanism: restart mid-run");
    check(n_over_range > 0, "mechanism: over-range section count");
    check(n_stuffing > 0, "mechanism: stuffing words");
    check(n_bypass_cycles > 0, "mechanism: bypass of unused stages");
    check(n_wrap_captures > 0, "mechanism: 10-section result in next frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
