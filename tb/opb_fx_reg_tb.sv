// Testbench for opb_fx_reg. A bus-master task holds select, address,
// data and read-not-write until the acknowledge arrives and counts the
// clocks. Checks: writes to the register address store the code (OPB data
// bits 0..2) and are acknowledged at the second clock edge after select; reads return the
// code in the top bits and are acknowledged at the third edge with the
// data valid; writes to another address change nothing and are never
// acknowledged; the acknowledge lasts one clock; reset gives code 000.
module opb_fx_reg_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] opb_abus = '0, opb_dbus = '0, sln_dbus;
  logic opb_rnw = 1'b0, opb_select = 1'b0, sln_xferack;
  logic [2:0] fx_sel;
  int checks = 0, failures = 0;
  localparam logic [31:0] A = 32'hFEFF1001;

  opb_fx_reg dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input logic [31:0] addr, input bit rnw, input logic [31:0] wdata,
                      output int clocks, output logic [31:0] rdata);
    clocks = 0;
    rdata  = '0;
    @(posedge clk);
    opb_select <= 1'b1; opb_abus <= addr; opb_rnw <= rnw; opb_dbus <= wdata;
    do begin
      @(posedge clk);
      clocks++;
      #1;
    end while (!sln_xferack && clocks < 10);
    rdata = sln_dbus;
    @(posedge clk);
    #1;
    check(!sln_xferack, "acknowledge lasts one clock");
    opb_select <= 1'b0; opb_rnw <= 1'b0; opb_dbus <= '0;
    repeat (2) @(posedge clk);
  endtask

  int clocks;
  logic [31:0] rd;
  logic [2:0] code, cur;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1;
    check(fx_sel == 3'b000, "clean after reset");
    cur = 3'b000;
    for (int i = 0; i < 60; i++) begin
      code = 3'($urandom);
      xfer(A, 1'b0, {code, 29'($urandom)}, clocks, rd);
      check(clocks == 2, $sformatf("write acknowledged after %0d clocks", clocks));
      cur = code;
      check(fx_sel == cur, "code stored");
      xfer(A, 1'b1, 32'($urandom), clocks, rd);
      check(clocks == 3, $sformatf("read acknowledged after %0d clocks", clocks));
      check(rd == {cur, 29'b0}, $sformatf("read %h", rd));
      xfer(A ^ (32'h1 << $urandom_range(0, 31)), 1'b0, {~cur, 29'b0}, clocks, rd);
      check(clocks == 10, "other address not acknowledged");
      check(fx_sel == cur, "other address ignored");
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
