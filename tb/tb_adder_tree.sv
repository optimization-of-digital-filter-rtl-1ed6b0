// tb_adder_tree: random five-input sums, including values near the limits of
// fix_64_56, checked two clocks after the inputs; en low must freeze the output.
module tb_adder_tree;
  import iir_pkg::*;
  logic  clk = 1'b0, en;
  data_t in [5];
  sum_t  out;
  sum_t  exp_q [$];
  int checks = 0, failures = 0;

  adder_tree dut (.clk(clk), .en(en), .in1(in[0]), .in2(in[1]), .in3(in[2]), .in4(in[3]),
                  .in5(in[4]), .out(out));
  always #5 clk = ~clk;

  function automatic data_t rnd();
    case ($urandom_range(0, 3))
      0: return data_t'({1'b0, {63{1'b1}}});
      1: return data_t'({1'b1, {63{1'b0}}});
      default: return data_t'({$urandom, $urandom});
    endcase
  endfunction

  initial begin
    en = 1;
    for (int i = 0; i < 5; i++) in[i] = '0;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      sum_t e;
      e = '0;
      for (int i = 0; i < 5; i++) begin
        in[i] = rnd();
        e += sum_t'(in[i]);
      end
      exp_q.push_back(e);
      @(posedge clk);
      #1;
      if (n >= 1) begin
        checks++;
        if (out != exp_q[0]) begin
          failures++;
          if (failures < 10) $display("FAIL: %0d got %h exp %h", n, out, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
    end
    begin
      sum_t held;
      @(posedge clk); #1;
      held = out;
      en = 0;
      for (int i = 0; i < 5; i++) in[i] = rnd();
      repeat (4) @(posedge clk);
      #1 checks++;
      if (out != held) begin failures++; $display("FAIL: en=0 did not hold"); end
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
