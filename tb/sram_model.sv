// Behavioural model of a 256K x 16 asynchronous SRAM for simulation.
//
// Reads are combinational: dout shows mem[addr] whenever the chip is
// enabled and its outputs are enabled. A write stores din at addr on every
// rising clk while ce_n and we_n are both 0 (the real part writes on the
// level of we_n; sampling it on the system clock is enough for a design
// whose writes last one clock). The contents start at zero. Byte enables
// are assumed active. Not synthesizable as a device model; for testbenches.
module sram_model #(
  parameter int unsigned ADDR_W = 18,
  parameter int unsigned W      = 16
) (
  input  logic              clk,
  input  logic              ce_n,
  input  logic              oe_n,
  input  logic              we_n,
  input  logic [ADDR_W-1:0] addr,
  input  logic [W-1:0]      din,
  output logic [W-1:0]      dout,
  output int unsigned       writes
);

  logic [W-1:0] mem [2**ADDR_W];

  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) mem[i] = '0;
    writes = 0;
  end

  always @(posedge clk) begin
    if (!ce_n && !we_n) begin
      mem[addr] <= din;
      writes    <= writes + 1;
    end
  end

  assign dout = (!ce_n && !oe_n) ? mem[addr] : '0;

endmodule
