// tb_biquad_io_ctrl: drives frames of 80 clocks with in_sel high for the first 8
// and out_sel in step 0 of a chosen stage (stage 0 for a 10-section filter, i.e.
// the start of the next frame). Checks the input mux and the fix_64_58 ->
// fix_64_56 conversion every clock, and that data_out changes exactly two clocks
// after each frame start to the fix_34_29 cast of the word caught at out_sel.
module tb_biquad_io_ctrl;
  import iir_pkg::*;
  logic  clk = 1'b0, rst, in_sel, out_sel;
  data_t biquad_fb, biquad_din;
  gdat_t data_in;
  out_t  data_out;
  out_t  caught, expect_out;
  int checks = 0, failures = 0;

  biquad_io_ctrl dut (.clk(clk), .rst(rst), .biquad_fb(biquad_fb), .data_in(data_in),
                      .in_sel(in_sel), .out_sel(out_sel), .biquad_din(biquad_din),
                      .data_out(data_out));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    automatic int out_stage [4] = '{3, 0, 9, 5};
    rst = 1; in_sel = 0; out_sel = 0; biquad_fb = '0; data_in = '0;
    caught = '0; expect_out = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 12; f++) begin
      for (int c = 0; c < 80; c++) begin
        #2;
        in_sel    = (c < 8);
        out_sel   = (c == 8 * out_stage[f % 4]);
        biquad_fb = data_t'({$urandom, $urandom});
        data_in   = gdat_t'({$urandom, $urandom});
        #1;
        check(biquad_din == (in_sel ? data_t'(data_in >>> 2) : biquad_fb), "mux");
        check(data_out == expect_out, $sformatf("f=%0d c=%0d data_out %h exp %h", f, c, data_out, expect_out));
        @(posedge clk);
        if (out_sel) caught = out_t'(biquad_fb >>> 27);
        if (c == 1) expect_out = caught;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
