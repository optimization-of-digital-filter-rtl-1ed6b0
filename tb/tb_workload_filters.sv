// tb_workload_filters: runs classic filter designs through the filter engine at
// its default sizes and compares the hardware response with two models.
//
// The filters are the four verification designs of the original work: a
// 14th-order Butterworth high-pass with cutoff 0.5, an 18th-order Butterworth
// low-pass with cutoff 0.6, a 6th-order Chebyshev type I band-pass from 0.4 to
// 0.6 and a 10th-order elliptic band-stop from 0.3 to 0.5 (frequencies relative
// to Nyquist). The original gives no ripple or attenuation; 0.5 dB passband
// ripple (Chebyshev, elliptic) and 40 dB stopband attenuation (elliptic) are
// used here. "6th/10th order" is run in both readings: as the order of the
// whole filter (3 and 5 sections) and as the prototype order of the band-pass
// and band-stop transforms (12th and 20th order, 6 and 10 sections; the latter
// fills all ten stages).
//
// Design method (in iir_design_pkg, standard textbook, plain real arithmetic):
// analog low-pass prototype poles and zeros, frequency pre-warping with
// tan(w/2), low-pass to high-pass, band-pass or band-stop transform, bilinear
// transform z = (1+s)/(1-s), one second-order section per pole pair with
// Im(z) > 0. The elliptic prototype uses Jacobi elliptic functions computed by
// descending Landen transformations, and the degree equation for its
// selectivity; each pole pair takes the nearest zero pair, and the sections are
// ordered by pole radius. Section numerators are (1 + z^-1)^2 (low-pass),
// (1 - z^-1)^2 (high-pass), 1 - z^-2 (band-pass) or 1 - 2cos(t) z^-1 + z^-2
// (band-stop, zero at angle t); the overall gain g sets the peak passband
// response to 1.
//
// Checks, per filter:
//   - the designed response at a band edge (Butterworth -3 dB, Chebyshev and
//     elliptic the ripple level), which checks the design itself; for the
//     elliptic filter also the whole passband and stopband on a 1000-point grid;
//   - all 2048 hardware results bit-exact against the fixed-point model of
//     iir_tb_pkg;
//   - the largest and the mean difference between the hardware results and a
//     floating-point model with unquantised coefficients, as in the original's
//     comparison of its hardware and theoretical models; the largest must stay
//     below 1e-3 (the input spans -4 to 4).
// The two differences are printed for each filter. The run takes about
// 6 x 164,000 clocks.
module tb_workload_filters;
  import iir_pkg::*;
  import iir_tb_pkg::*;
  import iir_design_pkg::*;

  localparam int unsigned NV = N_VECTORS;

  logic  clk = 1'b0;
  logic  rst;
  coef_t coef_in;
  out_t  data_out;
  logic  out_en, out_end;

  int checks = 0, failures = 0;

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

  out_t gold [$];
  real  fgold [$];
  int   got = 0, n_exact = 0;
  real  max_diff = 0.0, sum_diff = 0.0;

  always @(posedge clk) begin
    if (!rst && out_en) begin
      if (got < gold.size()) begin
        real hw, df;
        check(data_out == gold[got], $sformatf("result %0d: got %h expected %h", got, data_out, gold[got]));
        if (data_out == gold[got]) n_exact++;
        hw = real'(data_out) / 536870912.0;
        df = hw - fgold[got];
        if (df < 0.0) df = -df;
        if (df > max_diff) max_diff = df;
        sum_diff += df;
      end else
        check(1'b0, $sformatf("unexpected result %0d", got));
      got++;
    end
  end


  task automatic run_design(input design_t d, input logic [31:0] uid);
    cand_t cd;
    coef_t w [$];
    real eg;
    eg = resp(d, d.f_edge);
    check(eg > d.edge_gain - 1e-3 && eg < d.edge_gain + 1e-3,
          $sformatf("%s: design gain %f at band edge, expected %f", d.name, eg, d.edge_gain));
    cd = to_cand(d, uid);
    build_frame(cd, w);
    reference(cd, NV, 32'h0, gold);
    float_model(d, NV, fgold);
    got = 0; n_exact = 0; max_diff = 0.0; sum_diff = 0.0;
    foreach (w[i]) begin
      coef_in <= w[i];
      @(posedge clk);
    end
    coef_in <= '0;
    while (!out_end) @(posedge clk);
    repeat (5) @(posedge clk);
    check(got == NV, $sformatf("%s: %0d results", d.name, got));
    check(max_diff < 1e-3, $sformatf("%s: max difference %g", d.name, max_diff));
    $display("%s: %0d sections, g=%g, bit-exact %0d of %0d, max difference %g, mean difference %g",
             d.name, d.nsec, d.g, n_exact, got, max_diff, sum_diff / real'(got));
  endtask

  // Whole-band check of a band-stop design: with the prototype frequency
  // W = bw w / |w0^2 - w^2| (w pre-warped), the gain must lie between the ripple
  // level and 1 where W <= 1, and stay at or below the stopband level where
  // W >= omega_s.
  task automatic check_bandstop(input design_t d);
    int n_pass = 0, n_stop = 0, bad = 0;
    for (int i = 1; i < 1000; i++) begin
      real f, w, wl, h;
      f  = real'(i) / 1000.0;
      w  = $tan(PI * f / 2.0);
      wl = d.bs_bw * w / ((d.bs_w0sq > w * w) ? d.bs_w0sq - w * w : w * w - d.bs_w0sq);
      h  = resp(d, f);
      if (wl <= 1.0) begin
        n_pass++;
        if (h < d.edge_gain - 1e-6 || h > 1.0 + 1e-6) bad++;
      end else if (wl >= d.omega_s) begin
        n_stop++;
        if (h > d.stop_gain * 1.0001) bad++;
      end
    end
    check(bad == 0 && n_pass > 0 && n_stop > 0,
          $sformatf("%s: %0d of %0d passband / stopband points out of bounds", d.name, bad, n_pass + n_stop));
  endtask

  design_t ed;

  initial begin
    rst = 1'b1;
    coef_in = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (4) @(posedge clk);
    run_design(butter("Butterworth HP 14th fc 0.5", 14, 0.5, 1'b1), 32'h0000_0101);
    run_design(butter("Butterworth LP 18th fc 0.6", 18, 0.6, 1'b0), 32'h0000_0102);
    run_design(cheby_bp("Chebyshev BP 6th 0.4-0.6", 3, 0.4, 0.6, 0.5), 32'h0000_0103);
    ed = ellip_bs("Elliptic BS 10th 0.3-0.5", 5, 0.3, 0.5, 0.5, 40.0);
    check_bandstop(ed);
    run_design(ed, 32'h0000_0104);
    // the same two specifications with 6 and 10 as prototype orders
    run_design(cheby_bp("Chebyshev BP 12th (prototype 6) 0.4-0.6", 6, 0.4, 0.6, 0.5), 32'h0000_0105);
    ed = ellip_bs("Elliptic BS 20th (prototype 10) 0.3-0.5", 10, 0.3, 0.5, 0.5, 40.0);
    check_bandstop(ed);
    run_design(ed, 32'h0000_0106);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
