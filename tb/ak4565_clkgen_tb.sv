// Testbench for ak4565_clkgen: measures the period of every generated
// clock in system-clock cycles (mclk 4, control clock 16, bclk 32, lrclk
// 1024), counts the strobes per frame, and checks the phase relations:
// ad_capture equals lrclk, the inverted bit clock strobe falls while bclk
// is low, and the output frame (da_stream) opens 16 cycles (4 mclk)
// before the input frame.
module ak4565_clkgen_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic mclk, bclk, lrclk, cclk, ad_capture, da_stream;
  logic sb_rise, snb_rise, fs64_rise, lr_rise;
  int checks = 0, failures = 0;
  longint cyc = 0;

  ak4565_clkgen dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at cycle %0d", what, cyc);
    end
  endtask

  // edge timestamps
  longint last_mclk = -1, last_bclk = -1, last_lr = -1, last_cclk = -1;
  longint lr_fall = -1, da_fall = -1;
  int n_sb = 0, n_snb = 0, n_fs64 = 0;
  logic mclk_d, bclk_d, lrclk_d, cclk_d, da_d;
  bit measuring = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    mclk_d <= mclk; bclk_d <= bclk; lrclk_d <= lrclk; cclk_d <= cclk; da_d <= da_stream;
    if (measuring) begin
      if (mclk && !mclk_d) begin
        if (last_mclk >= 0) check(cyc - last_mclk == 4, "mclk period");
        last_mclk = cyc;
      end
      if (cclk && !cclk_d) begin
        if (last_cclk >= 0) check(cyc - last_cclk == 16, "control clock period");
        last_cclk = cyc;
      end
      if (bclk && !bclk_d) begin
        if (last_bclk >= 0) check(cyc - last_bclk == 32, "bclk period");
        last_bclk = cyc;
      end
      if (lrclk && !lrclk_d) begin
        if (last_lr >= 0) begin
          check(cyc - last_lr == 1024, "lrclk period");
          check(n_sb == 32, "32 bit-clock strobes per frame");
          check(n_snb == 32, "32 inverted bit-clock strobes per frame");
          check(n_fs64 == 64, "64 control-clock strobes per frame");
        end
        last_lr = cyc; n_sb = 0; n_snb = 0; n_fs64 = 0;
      end
      if (!lrclk && lrclk_d) lr_fall = cyc;
      if (!da_stream && da_d) da_fall = cyc;
      if (!lrclk && lrclk_d && da_fall >= 0) check(lr_fall - da_fall == 16, "output frame leads by 16 cycles");
      check(ad_capture == lrclk, "ad_capture equals lrclk");
      if (sb_rise) begin n_sb++; check(bclk == 1'b1, "sb_rise while bclk high"); end
      if (snb_rise) begin n_snb++; check(bclk == 1'b0, "snb_rise while bclk low"); end
      if (fs64_rise) begin n_fs64++; check(cclk == 1'b0, "fs64_rise while control clock low"); end
      if (lr_rise) check(lrclk == 1'b1, "lr_rise while lrclk high");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (40) @(posedge clk);
    measuring = 1;
    repeat (1024 * 5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
