// tb_lfsr32: checks the 32-bit XNOR LFSR against a stage-numbered model:
// reset value, 5000 consecutive steps, hold when not enabled, restart by load,
// and that neither the lock-up word nor a repeat of the seed occurs.
module tb_lfsr32;
  import iir_tb_pkg::*;
  logic clk = 1'b0, rst, load, en;
  logic [31:0] q, model;
  int checks = 0, failures = 0;

  lfsr32 dut (.clk(clk), .rst(rst), .load(load), .en(en), .q(q));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 1; load = 0; en = 0;
    @(posedge clk); @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(q == 32'h0, "reset value");
    model = 32'h0;
    en <= 1;
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk);
      #1;
      model = lfsr_model_next(model);
      check(q == model, $sformatf("step %0d: %h vs %h", i, q, model));
      check(q != 32'hffff_ffff, "lock-up word");
      check(q != 32'h0, "seed repeated");
    end
    en <= 0;
    repeat (3) @(posedge clk);
    #1 check(q == model, "hold");
    load <= 1;
    @(posedge clk);
    load <= 0;
    #1 check(q == 32'h0, "load");
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
