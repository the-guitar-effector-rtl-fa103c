// Testbench for ak4565_ctrl_tx: sends random control words and, at each
// control-clock strobe, records cdti while csn is low. Checks that csn is
// low for exactly 16 strobes, the 16 bits are the word MSB first, c_done
// rises on the 16th strobe, and csn returns high on the next one.
module ak4565_ctrl_tx_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic fs64_rise = 1'b0, c_wr = 1'b0;
  logic [15:0] c_datain = '0;
  logic csn, cdti, c_done;
  int checks = 0, failures = 0;

  ak4565_ctrl_tx #(.W(16)) dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic strobe();
    @(posedge clk) fs64_rise <= 1'b1;
    @(posedge clk) fs64_rise <= 1'b0;
    repeat (2) @(posedge clk);
  endtask

  logic [15:0] word, got;
  int low, done_at;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(csn == 1'b1 && c_done == 1'b1, "idle after reset");
    for (int f = 0; f < 30; f++) begin
      word = (f == 0) ? 16'hE020 : 16'($urandom);
      @(posedge clk) begin c_wr <= 1'b1; c_datain <= word; end
      repeat (3) @(posedge clk);
      c_wr <= 1'b0;
      c_datain <= 16'($urandom);
      @(posedge clk);
      check(c_done == 1'b0 && csn == 1'b1, "armed after c_wr");
      got = '0; low = 0; done_at = -1;
      for (int s = 1; s <= 20; s++) begin
        strobe();
        if (!csn) begin low++; got = {got[14:0], cdti}; end
        if (c_done && done_at < 0) done_at = s;
      end
      check(low == 16, $sformatf("csn low for %0d strobes", low));
      check(got == word, $sformatf("sent %h expected %h", got, word));
      check(done_at == 16, $sformatf("c_done at strobe %0d", done_at));
      check(csn == 1'b1, "csn back high");
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
