// Testbench for the ak4565 codec controller against a serial-port model
// of the codec. Each frame the model sends a random sample; the testbench
// checks that it appears on adc_dtout when adcdone rises, exactly 1024
// clocks after the previous one. It sets dac_dtin to a random word at
// each adcdone rise and checks that the model receives that word in the
// next frame. Finally it pulses c_wr and checks that the model's control
// port received the 16-bit control word.
module ak4565_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic mclk, bclk, lrclk, sdti, sdto0, csn, cclk, cdti, adcdone, dacload;
  logic [15:0] adc_dtout, dac_dtin = '0, c_datain = 16'hE020;
  logic c_wr = 1'b0, c_done, bclk_rise, lr_rise;
  logic [15:0] adc_sample = '0, dac_word, ctrl_word;
  int unsigned dac_frames, ctrl_words, ctrl_bits;
  int checks = 0, failures = 0;
  longint cyc = 0;

  ak4565 dut (.*);
  ak4565_model codec (.bclk, .lrclk, .sdti, .sdto0, .csn, .cclk, .cdti,
                      .adc_sample, .dac_word, .dac_frames,
                      .ctrl_word, .ctrl_words, .ctrl_bits);

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at cycle %0d", what, cyc); end
  endtask

  // new ADC sample each frame, taken by the model at the frame start
  logic [15:0] sent_q [$];
  logic lr_d = 1'b0;
  always @(posedge clk) begin
    lr_d <= lrclk;
    if (lrclk && !lr_d) begin
      adc_sample <= 16'($urandom);
    end
  end
  always @(negedge bclk) if (!lrclk && codec.lr_last) sent_q.push_back(adc_sample);

  logic adcdone_d = 1'b0;
  longint last_done = -1;
  logic [15:0] dac_q [$];
  int frames = 0;
  always @(posedge clk) begin
    adcdone_d <= adcdone;
    if (adcdone && !adcdone_d && !rst) begin
      frames++;
      if (sent_q.size() > 0) begin
        logic [15:0] exp_s;
        exp_s = sent_q.pop_front();
        if (frames > 1) check(adc_dtout == exp_s, $sformatf("adc got %h expected %h", adc_dtout, exp_s));
      end
      if (last_done >= 0) check(cyc - last_done == 1024, "one sample per 1024 clocks");
      last_done = cyc;
      begin
        logic [15:0] v;
        v = 16'($urandom);
        dac_dtin <= v;
        dac_q.push_back(v);
      end
    end
  end

  int unsigned frames_seen = 0;
  always @(dac_frames) begin
    frames_seen++;
    // the word captured now is the last one set, at the previous adcdone rise
    if (dac_q.size() >= 1)
      check(dac_word == dac_q[$], $sformatf("dac got %h expected %h", dac_word, dac_q[$]));
  end

  // sdti may change only while bclk is low (the codec samples on its rise)
  logic sdti_d = 1'b0;
  always @(posedge clk) begin
    sdti_d <= sdti;
    if (!rst && sdti != sdti_d) check(bclk == 1'b0, "sdti changes while bclk is low");
  end

  int unsigned words0;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (1024 * 20) @(posedge clk);
    words0 = ctrl_words;
    @(posedge clk) c_wr <= 1'b1;
    repeat (32) @(posedge clk);
    c_wr <= 1'b0;
    wait (c_done);
    repeat (64) @(posedge clk);
    check(ctrl_words == words0 + 1, "one control word");
    check(ctrl_word == 16'hE020, $sformatf("control word %h", ctrl_word));
    check(ctrl_bits == 16, "16 control bits");
    check(frames_seen > 15, "frames reached the DAC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1024 * 40) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
