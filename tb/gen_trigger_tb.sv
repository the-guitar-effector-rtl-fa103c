// Testbench for gen_trigger. It opens adcdone/dacload windows of random
// length (with the two flags rising a few clocks apart) and answers each
// trigger like the SRAM effects unit: done for one clock, two clocks after
// the trigger is first seen. Checks: exactly one processing run per
// window, the trigger starts one clock after the window opens (from the
// second window on, once armed), never outside a window, and falls right
// after done.
module gen_trigger_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic adcdone = 1'b0, dacload = 1'b0, echodone = 1'b0, trigger;
  int checks = 0, failures = 0;

  gen_trigger dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // responder: done in the third clock of a run
  int phase = 0, runs = 0;
  always @(posedge clk) begin
    echodone <= 1'b0;
    case (phase)
      0: if (trigger) begin phase <= 1; runs <= runs + 1; end
      1: begin phase <= 2; echodone <= 1'b1; end
      2: phase <= 0;
      default: phase <= 0;
    endcase
  end

  int runs0, len, first_trig;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);
    for (int w = 0; w < 50; w++) begin
      runs0 = runs;
      dacload <= 1'b1;
      repeat (1 + $urandom_range(0, 3)) @(posedge clk);
      adcdone <= 1'b1;
      len = 20 + $urandom_range(0, 400);
      first_trig = -1;
      for (int c = 0; c < len; c++) begin
        @(posedge clk);
        #1;
        if (trigger && first_trig < 0) first_trig = c;
      end
      adcdone <= 1'b0;
      dacload <= 1'b0;
      repeat (3) @(posedge clk);
      #1;
      check(runs - runs0 == 1, $sformatf("window %0d: %0d runs", w, runs - runs0));
      check(first_trig == 0, $sformatf("window %0d: trigger after %0d clocks", w, first_trig));
      repeat ($urandom_range(5, 50)) begin
        @(posedge clk);
        #1;
        check(trigger == 1'b0, "no trigger outside a window");
      end
    end
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
