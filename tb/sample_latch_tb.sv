// Testbench for sample_latch: random inputs every clock with random
// adcdone/dacload; a reference register pair updated only when both flags
// are 1 must match the outputs after every clock.
module sample_latch_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic adcdone = 1'b0, dacload = 1'b0;
  logic [15:0] adc_dtout = '0, snd_output = '0, latch16bit, dac_dtin;
  logic [15:0] ref_l = '0, ref_d = '0;
  int checks = 0, failures = 0, loads = 0;

  sample_latch #(.W(16)) dut (.*);
  always #10 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      adcdone    <= 1'($urandom);
      dacload    <= 1'($urandom);
      adc_dtout  <= 16'($urandom);
      snd_output <= 16'($urandom);
      @(posedge clk);
      #1;
      if (adcdone && dacload) begin ref_l = adc_dtout; ref_d = snd_output; loads++; end
      checks++;
      if (latch16bit !== ref_l || dac_dtin !== ref_d) begin
        failures++;
        $display("FAIL: %h/%h expected %h/%h", latch16bit, dac_dtin, ref_l, ref_d);
      end
    end
    checks++;
    if (loads < 100) failures++;
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
