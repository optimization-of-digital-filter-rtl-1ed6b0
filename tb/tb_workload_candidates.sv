// tb_workload_candidates: a run of 100 filter candidates, back to back, through
// the filter engine at its default sizes.
//
// This is the evaluation loop the engine was built for, with the host side played
// by the testbench. Each candidate is a random Butterworth low-pass filter, drawn
// like the original's stand-in for its optimiser: cutoff uniform in 0.2..0.8
// (relative to Nyquist) and order floor(17 * u) + 2, i.e. 2..18, so odd orders
// (ending with a first-order section) and section counts from 1 to 9 occur.
// The filter is designed with iir_design_pkg, quantised to a frame with a random
// UID, and sent as soon as the previous candidate's out_end is seen.
//
// Checks, per candidate:
//   - the design: gain 1 at DC and 1/sqrt(2) at the cutoff;
//   - all 2048 results bit-exact against the fixed-point model of iir_tb_pkg;
//   - the arithmetic error: results within 1e-6 of a floating-point cascade
//     that uses the quantised coefficients and g (in practice within one output
//     LSB, 2^-29);
//   - the timing: first result 324 clocks after the start flag, out_end with the
//     2048th result, 324 + 80 * 2047 clocks after the flag.
// Also printed, not checked: the difference to the unquantised design. For
// narrow high-order low-passes g is below 1e-6, where the 2^-29 step of its
// fix_32_29 format is a sizeable fraction of g, and the whole response scales by
// that error (up to about 1.5 % here). Candidates where this exceeds 1e-3 are
// listed. At the end it prints how many candidates of each section count ran.
// About 16.5 million clocks.
module tb_workload_candidates;
  import iir_pkg::*;
  import iir_tb_pkg::*;
  import iir_design_pkg::*;

  localparam int unsigned NV = N_VECTORS;
  localparam int N_CAND = 100;

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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  out_t   gold [$];
  real    fgold [$];
  int     got = 0, n_exact = 0;
  real    max_diff = 0.0, run_max_diff = 0.0, run_sum_diff = 0.0;
  longint flag_cyc = 0, first_cyc = 0, end_cyc = 0;
  bit     end_seen = 1'b0;
  logic   out_end_q = 1'b0;
  real    qgold [$];
  real    qmax_diff = 0.0, run_qmax_diff = 0.0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && coef_in == coef_t'(START_FLAG)) flag_cyc <= cyc;
    out_end_q <= out_end;
    if (!rst && out_end && !out_end_q) begin
      end_seen <= 1'b1;
      end_cyc  <= cyc;
    end
    if (!rst && out_en) begin
      if (got < gold.size()) begin
        real hw, df;
        check(data_out == gold[got], $sformatf("result %0d: got %h expected %h", got, data_out, gold[got]));
        if (data_out == gold[got]) n_exact++;
        hw = real'(data_out) / 536870912.0;
        df = hw - qgold[got];
        if (df < 0.0) df = -df;
        if (df > qmax_diff) qmax_diff = df;
        run_sum_diff += df;
        df = hw - fgold[got];
        if (df < 0.0) df = -df;
        if (df > max_diff) max_diff = df;
      end else
        check(1'b0, $sformatf("unexpected result %0d", got));
      if (got == 0) first_cyc <= cyc;
      got++;
    end
  end

  int per_nsec [MAX_SOS+1];

  initial begin
    logic [31:0] prev_uid;
    for (int i = 0; i <= MAX_SOS; i++) per_nsec[i] = 0;
    rst = 1'b1;
    coef_in = '0;
    prev_uid = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (4) @(posedge clk);
    for (int n = 0; n < N_CAND; n++) begin
      design_t d, dq;
      cand_t cd;
      coef_t w [$];
      real fc, h0, hc;
      int order;
      logic [31:0] uid;
      fc    = urand01() * 0.6 + 0.2;
      order = $rtoi(urand01() * 17.0) + 2;
      d = butter($sformatf("candidate %0d: Butterworth LP order %0d fc %f", n, order, fc), order, fc, 1'b0);
      h0 = resp(d, 0.0);
      hc = resp(d, fc);
      check(h0 > 1.0 - 1e-9 && h0 < 1.0 + 1e-9, $sformatf("%s: DC gain %f", d.name, h0));
      check(hc > 0.7071 - 1e-4 && hc < 0.7071 + 1e-4, $sformatf("%s: cutoff gain %f", d.name, hc));
      do uid = $urandom; while (uid == prev_uid || uid == 32'(START_FLAG));
      prev_uid = uid;
      cd = to_cand(d, uid);
      build_frame(cd, w);
      reference(cd, NV, 32'h0, gold);
      float_model(d, NV, fgold);
      dq = d;
      dq.g = real'(cd.g) / 536870912.0;
      for (int k = 0; k < d.nsec; k++)
        for (int j = 0; j < COEFS_PER_SOS; j++) dq.c[k][j] = real'(cd.c[k][j]) / 536870912.0;
      float_model(dq, NV, qgold);
      got = 0; n_exact = 0; max_diff = 0.0; qmax_diff = 0.0;
      end_seen = 1'b0;
      per_nsec[d.nsec]++;
      foreach (w[i]) begin
        coef_in <= w[i];
        @(posedge clk);
      end
      coef_in <= '0;
      while (!end_seen) @(posedge clk);
      @(posedge clk);
      check(got == NV, $sformatf("%s: %0d results", d.name, got));
      check(first_cyc - flag_cyc == 324, $sformatf("%s: first result after %0d clocks", d.name, first_cyc - flag_cyc));
      check(end_cyc - flag_cyc == 324 + 80 * (longint'(NV) - 1),
            $sformatf("%s: out_end after %0d clocks", d.name, end_cyc - flag_cyc));
      check(qmax_diff < 1e-6, $sformatf("%s: arithmetic difference %g", d.name, qmax_diff));
      if (max_diff > run_max_diff) run_max_diff = max_diff;
      if (qmax_diff > run_qmax_diff) run_qmax_diff = qmax_diff;
      if (max_diff > 1e-3)
        $display("%s: g = %g, difference to the unquantised design %g", d.name, d.g, max_diff);
    end
    for (int i = 1; i <= MAX_SOS; i++)
      if (per_nsec[i] > 0) $display("candidates with %0d sections: %0d", i, per_nsec[i]);
    $display("%0d candidates, %0d clocks each; arithmetic difference: largest %g, mean %g; difference to the unquantised designs: largest %g",
             N_CAND, 324 + 80 * (NV - 1), run_qmax_diff, run_sum_diff / real'(N_CAND * NV), run_max_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
