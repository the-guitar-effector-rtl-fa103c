// Testbench for flange_lfo. A small instance (2^3 x 2^2 clock divider)
// is run through several full sweeps: every step must come exactly 32
// clocks after the previous one and follow the triangle 0,1,..,144,143,..,
// 0,1,.. computed here. A default-size instance is checked for its step
// period of 2^17 clocks (50 MHz / 2^17 = 381 Hz).
module flange_lfo_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic [11:0] d_small, d_full;
  int checks = 0, failures = 0;
  longint cyc = 0;

  flange_lfo #(.LR_BITS(3), .RATE_BITS(2)) dut_small (.clk, .rst, .d_cnt(d_small));
  flange_lfo dut_full (.clk, .rst, .d_cnt(d_full));

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at cycle %0d", what, cyc); end
  endtask

  int exp_v = 0, dir = 1, n_top = 0, n_bottom = 0, steps_full = 0;
  longint last_small = -1, last_full = -1;
  logic [11:0] ds_d = '0, df_d = '0;
  always @(posedge clk) begin
    if (!rst) begin
      ds_d <= d_small;
      df_d <= d_full;
      if (d_small != ds_d) begin
        exp_v = exp_v + dir;
        if (exp_v == 144) dir = -1;
        if (exp_v == 0)   dir = 1;
        if (exp_v == 144) n_top++;
        if (exp_v == 0)   n_bottom++;
        check(d_small == 12'(exp_v), $sformatf("d_cnt %0d expected %0d", d_small, exp_v));
        if (last_small >= 0) check(cyc - last_small == 32, "small step period");
        last_small = cyc;
      end
      if (d_full != df_d) begin
        steps_full++;
        check(d_full == 12'(steps_full), "full-size count up");
        if (last_full >= 0) check(cyc - last_full == 131072, "full-size step period 2^17");
        last_full = cyc;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (32 * 288 * 3 + 500) @(posedge clk);
    wait (steps_full >= 3);
    check(n_top >= 3 && n_bottom >= 3, "full sweeps reached both limits");
    check(d_small <= 144, "never above 144");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
