// Testbench for ak4565_dac_tx: loads random words while da_stream is 1,
// then collects sdti after each of 16 strobes with da_stream 0 and checks
// that the word leaves MSB first, that sdti is 0 in the load half and
// that dacload follows da_stream.
module ak4565_dac_tx_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic snb_rise = 1'b0, da_stream = 1'b1;
  logic [15:0] dac_dtin = '0;
  logic sdti, dacload;
  int checks = 0, failures = 0;

  ak4565_dac_tx #(.W(16)) dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic strobe();
    @(posedge clk) snb_rise <= 1'b1;
    @(posedge clk) snb_rise <= 1'b0;
    repeat (2) @(posedge clk);
  endtask

  logic [15:0] word, got;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f < 40; f++) begin
      word = 16'($urandom);
      if (f == 0) word = 16'h8001;
      da_stream <= 1'b1;
      dac_dtin  <= word;
      repeat (2) begin
        strobe();
        check(sdti == 1'b0, "sdti low in load half");
        check(dacload == 1'b1, "dacload high in load half");
      end
      dac_dtin <= 16'($urandom);   // later changes must not matter
      da_stream <= 1'b0;
      got = '0;
      for (int b = 0; b < 16; b++) begin
        strobe();
        got = {got[14:0], sdti};
        check(dacload == 1'b0, "dacload low while streaming");
      end
      check(got == word, $sformatf("sent %h expected %h", got, word));
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
