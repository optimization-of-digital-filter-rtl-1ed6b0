// tb_addr_creator: after a coef_ini pulse, compares the four outputs with values
// derived from the clock count alone (stage = (t/8) mod 10, step = t mod 8, two
// clocks after the pulse) for several section counts, including the full 10 and
// an over-range 12. Exactly one out_address pulse per 80-clock frame is required.
module tb_addr_creator;
  import iir_pkg::*;
  logic   clk = 1'b0, rst, coef_ini;
  stage_t mod_num, mod_address;
  step_t  step_ctrl;
  logic   in_address, out_address;
  int checks = 0, failures = 0;

  addr_creator dut (.clk(clk), .rst(rst), .coef_ini(coef_ini), .mod_num(mod_num),
                    .in_address(in_address), .out_address(out_address),
                    .mod_address(mod_address), .step_ctrl(step_ctrl));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    automatic int nums [4] = '{3, 10, 12, 1};
    rst = 1; coef_ini = 0; mod_num = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (13) @(posedge clk);
    foreach (nums[i]) begin
      int pulses, out_stage;
      mod_num <= stage_t'(nums[i]);
      coef_ini <= 1;
      @(posedge clk);
      coef_ini <= 0;
      pulses = 0;
      out_stage = (nums[i] >= 10) ? 0 : nums[i];
      for (int t = 0; t < 400; t++) begin
        int st, sp;
        @(posedge clk);
        #1;
        st = (t / 8) % 10;
        sp = t % 8;
        check(mod_address == stage_t'(st), $sformatf("n=%0d t=%0d stage %0d", nums[i], t, mod_address));
        check(step_ctrl == step_t'(sp), $sformatf("n=%0d t=%0d step %0d", nums[i], t, step_ctrl));
        check(in_address == (st == 0), "in_address");
        check(out_address == (st == out_stage && sp == 0), $sformatf("n=%0d t=%0d out_address", nums[i], t));
        if (out_address) pulses++;
      end
      check(pulses == 5, $sformatf("out pulses %0d", pulses));
      repeat (37) @(posedge clk);
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
