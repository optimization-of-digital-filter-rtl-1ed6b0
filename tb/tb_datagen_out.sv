// tb_datagen_out: run control, test vectors and output cache with a short run
// (N_VEC = 40). After ini_rst (cycle c) pseudo_data must be zero until c+81, then
// follow the LFSR model from the seed, one word per 80 clocks, and return to zero
// after 40 words. dout_ramin carries a fresh random word every clock; outen must
// pulse exactly at c+321+80m, with dout equal to the word driven one clock
// earlier. outend rises with the last result. A second ini_rst in the middle of
// a run must restart the sequence from the seed.
module tb_datagen_out;
  import iir_pkg::*;
  import iir_tb_pkg::*;
  localparam int NV = 40;
  localparam longint NVL = longint'(NV);
  logic  clk = 1'b0, rst, ini_rst;
  out_t  dout_ramin, dout, prev_in;
  logic  outen, outend;
  coef_t pseudo_data;
  int checks = 0, failures = 0;
  longint cyc = 0, c0 = -100000;
  int n_out = 0;

  datagen_out #(.N_VEC(NV)) dut (.clk(clk), .rst(rst), .dout_ramin(dout_ramin), .ini_rst(ini_rst),
                                 .dout(dout), .outen(outen), .pseudo_data(pseudo_data),
                                 .outend(outend));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] lfsr_at(int m);
    logic [31:0] q = 32'h0;
    for (int i = 0; i < m; i++) q = lfsr_model_next(q);
    return q;
  endfunction

  always @(posedge clk) begin
    longint d;
    cyc <= cyc + 1;
    prev_in <= dout_ramin;
    dout_ramin <= out_t'({$urandom, $urandom});
    if (!rst) begin
      if (ini_rst) c0 <= cyc;
      d = cyc - c0;
      if (!ini_rst && c0 >= 0) begin
        if (d < 81 || d >= 81 + 80 * NVL) check(pseudo_data == '0, $sformatf("pseudo_data idle d=%0d", d));
        else if ((d - 81) % 80 == 0) check(pseudo_data == coef_t'(lfsr_at(int'((d - 81) / 80))), $sformatf("vector d=%0d", d));
        if (d >= 321 && (d - 321) % 80 == 0 && (d - 321) / 80 < NVL) begin
          check(outen == 1'b1, $sformatf("outen missing d=%0d", d));
          check(dout == prev_in, "dout value");
        end else begin
          check(outen == 1'b0, $sformatf("outen extra d=%0d", d));
        end
        check(outend == (d >= 321 + 80 * (NVL - 1)), $sformatf("outend d=%0d", d));
      end
      if (outen) n_out++;
    end
  end

  initial begin
    rst = 1; ini_rst = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (37) @(posedge clk);
    ini_rst <= 1; @(posedge clk); ini_rst <= 0;
    repeat (80 * 10 + 17) @(posedge clk);     // restart in the middle of a run
    ini_rst <= 1; @(posedge clk); ini_rst <= 0;
    n_out = 0;
    repeat (80 * (NV + 6)) @(posedge clk);
    check(n_out == NV, $sformatf("results %0d", n_out));
    check(outend == 1'b1, "outend");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
