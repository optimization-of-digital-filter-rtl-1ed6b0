// tb_bypass: exhaustive check of the stage-in-use decision for every pair of
// section count and stage address.
module tb_bypass;
  import iir_pkg::*;
  stage_t mod_num, mod_sel, mod_sel2;
  logic   mod_bypass;
  int checks = 0, failures = 0;

  bypass dut (.mod_num(mod_num), .mod_sel(mod_sel), .mod_bypass(mod_bypass), .mod_sel2(mod_sel2));

  initial begin
    for (int n = 0; n < 16; n++) begin
      for (int s = 0; s < 16; s++) begin
        mod_num = stage_t'(n);
        mod_sel = stage_t'(s);
        #1;
        checks += 2;
        if (mod_bypass != (s < n)) begin
          failures++;
          $display("FAIL: num=%0d sel=%0d bypass=%0b", n, s, mod_bypass);
        end
        if (mod_sel2 != stage_t'(s)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
