// Testbench for ak4565_adc_rx: plays random 16-bit words MSB first into
// sdto0, one bit per bit-clock strobe while ad_capture is 0, then opens
// the capture half. Checks that adc_dtout shows the word after the first
// strobe of the capture half, keeps the previous word while the next one
// is shifted in, and that adcdone follows ad_capture.
module ak4565_adc_rx_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic sb_rise = 1'b0, ad_capture = 1'b0, sdto0 = 1'b0;
  logic [15:0] adc_dtout;
  logic adcdone;
  int checks = 0, failures = 0;

  ak4565_adc_rx #(.W(16)) dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic strobe();
    @(posedge clk) sb_rise <= 1'b1;
    @(posedge clk) sb_rise <= 1'b0;
    repeat (2) @(posedge clk);
  endtask

  logic [15:0] word, prev;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    prev = '0;
    for (int f = 0; f < 40; f++) begin
      word = 16'($urandom);
      if (f == 1) word = 16'h8000;
      if (f == 2) word = 16'h0001;
      ad_capture <= 1'b0;
      for (int b = 15; b >= 0; b--) begin
        sdto0 <= word[b];
        strobe();
        check(adc_dtout == prev, "output holds during shift");
        check(adcdone == 1'b0, "adcdone low during shift");
      end
      ad_capture <= 1'b1;
      sdto0 <= 1'($urandom);
      strobe();
      check(adc_dtout == word, $sformatf("captured %h expected %h", adc_dtout, word));
      check(adcdone == 1'b1, "adcdone high in capture half");
      repeat (3) strobe();
      check(adc_dtout == word, "capture stable");
      prev = word;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
