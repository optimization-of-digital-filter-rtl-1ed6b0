// tb_init_ctrl: frame parsing, coefficient cache and g multiplier.
// Sends idle words, a frame (with random stuffing words), the same frame again
// (repeated UID) and a frame with a new UID. Checks: coef_ini exactly 3 clocks
// after the start flag; coef_feed_en for exactly 80 clocks from flag+5; on
// coef_out word j of slot k at flag+5+8k+j for j < 5 and zero for the stuffing
// positions; mod_num; no reload for the repeated UID; data_out equal to
// data_in * g six clocks later, and zero while end_i is high.
module tb_init_ctrl;
  import iir_pkg::*;
  import iir_tb_pkg::*;
  logic   clk = 1'b0, rst, end_i;
  coef_t  coef_in, data_in, coef_out;
  gdat_t  data_out;
  stage_t mod_num;
  logic   coef_feed_en, coef_ini;
  int checks = 0, failures = 0;
  longint cyc = 0, t0 = -1000;
  int n_ini = 0, n_feed = 0;
  cand_t cd;
  coef_t din_hist [$];
  logic  end_hist [$];
  coef_t g_hist [$];
  bit    expect_load = 1'b1;

  init_ctrl dut (.clk(clk), .rst(rst), .coef_in(coef_in), .data_in(data_in), .end_i(end_i),
                 .coef_out(coef_out), .data_out(data_out), .mod_num(mod_num),
                 .coef_feed_en(coef_feed_en), .coef_ini(coef_ini));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    longint d;
    cyc <= cyc + 1;
    if (!rst) begin
      if (coef_in == coef_t'(START_FLAG) && dut.state == S0_HUNT && expect_load) t0 <= cyc;
      d = cyc - t0;
      if (coef_ini) n_ini++;
      if (coef_feed_en) n_feed++;
      check(coef_ini == (d == 3), $sformatf("coef_ini at d=%0d", d));
      check(coef_feed_en == (d >= 5 && d <= 84), $sformatf("coef_feed_en at d=%0d", d));
      if (d >= 5 && d <= 84) begin
        int k, j;
        k = int'(d - 5) / 8;
        j = int'(d - 5) % 8;
        if (j < 5) check(coef_out == cd.c[k][j], $sformatf("coef_out slot %0d word %0d", k, j));
        else       check(coef_out == '0, "coef_out stuffing");
      end else begin
        check(coef_out == '0, "coef_out idle");
      end
      // g multiplier, G_MULT_LAT clocks
      din_hist.push_back(data_in);
      end_hist.push_back(end_i);
      g_hist.push_back(dut.g_q);
      if (din_hist.size() > G_MULT_LAT) begin
        coef_t x, g; logic e;
        x = din_hist.pop_front();
        e = end_hist.pop_front();
        g = g_hist.pop_front();
        check(data_out == (e ? '0 : gdat_t'(x) * gdat_t'(g)), "g product");
      end
    end
  end

  always @(posedge clk) data_in <= coef_t'($urandom);

  task automatic send(input cand_t c);
    coef_t w [$];
    build_frame(c, w);
    foreach (w[i]) begin
      coef_in <= w[i];
      @(posedge clk);
    end
    coef_in <= '0;
  endtask

  function automatic cand_t make(input logic [31:0] uid, input int n);
    cand_t c;
    c.uid = uid; c.nsos_word = n; c.g = coef_t'($urandom);
    for (int k = 0; k < MAX_SOS; k++) begin
      for (int j = 0; j < 5; j++) c.c[k][j] = coef_t'($urandom);
      for (int j = 0; j < 3; j++) c.stuff[k][j] = coef_t'($urandom);
    end
    return c;
  endfunction

  initial begin
    rst = 1; end_i = 0; coef_in = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (10) begin coef_in <= coef_t'($urandom) & 32'h0fff_ffff; @(posedge clk); end
    cd = make(32'h55, 7);
    send(cd);
    repeat (20) @(posedge clk);
    check(mod_num == 4'd7, "mod_num");
    check(n_ini == 1 && n_feed == 80, $sformatf("first load ini=%0d feed=%0d", n_ini, n_feed));
    expect_load = 1'b0;
    send(cd);                       // repeated UID
    repeat (100) @(posedge clk);
    check(n_ini == 1 && n_feed == 80, "repeated UID reloaded");
    end_i <= 1;
    repeat (20) @(posedge clk);
    end_i <= 0;
    expect_load = 1'b1;
    cd = make(32'h56, 10);
    send(cd);
    repeat (20) @(posedge clk);
    check(mod_num == 4'd10, "mod_num 2");
    check(n_ini == 2 && n_feed == 160, "second load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
