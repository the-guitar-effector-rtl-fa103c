// Testbench for codec_init with a 4-bit frame counter. Frame strobes come
// every 64 clocks and bit-clock strobes every 2; a responder raises c_done
// 40 clocks after c_wr. Checks: no c_wr before 8 frames, exactly one c_wr
// pulse lasting one bit-clock period (2 clocks), norm only after c_done,
// and norm stays on for good.
module codec_init_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic bclk_rise = 1'b0, lr_rise = 1'b0, c_done = 1'b1, c_wr, norm;
  int checks = 0, failures = 0;
  longint cyc = 0;

  codec_init #(.INIT_BITS(4)) dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at cycle %0d", what, cyc); end
  endtask

  int frames = 0, wr_cycles = 0, wr_pulses = 0, done_wait = -1;
  logic c_wr_d = 1'b0;
  longint done_at = -1, norm_at = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      bclk_rise <= (cyc % 2 == 0);
      lr_rise   <= (cyc % 64 == 0);
      if (lr_rise) frames <= frames + 1;
      c_wr_d <= c_wr;
      if (c_wr) begin
        wr_cycles <= wr_cycles + 1;
        check(frames >= 8, "c_wr only after 2^3 frames");
        c_done <= 1'b0;
        done_wait <= 40;
      end else if (done_wait > 0) begin
        done_wait <= done_wait - 1;
      end else if (done_wait == 0) begin
        c_done <= 1'b1;
        done_wait <= -1;
        done_at = cyc;
      end
      if (c_wr && !c_wr_d) wr_pulses <= wr_pulses + 1;
      if (norm && norm_at < 0) norm_at = cyc;
      if (norm_at >= 0) check(norm == 1'b1, "norm stays on");
      if (norm) check(done_at >= 0, "norm only after c_done");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (64 * 30) @(posedge clk);
    check(wr_pulses == 1, $sformatf("%0d c_wr pulses", wr_pulses));
    check(wr_cycles == 2, $sformatf("c_wr lasted %0d clocks", wr_cycles));
    check(norm == 1'b1, "reached normal operation");
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
