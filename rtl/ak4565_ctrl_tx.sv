// Serial transmitter for the codec's control port.
//
// A control word is 16 bits: 3-bit opcode, 5-bit register address and
// 8-bit data, sent MSB first. A 1 on c_wr (synchronous, held for any
// number of cycles) loads c_datain, clears the 4-bit bit counter and the
// done flag and raises the active-low chip select csn. After c_wr falls,
// each control-clock strobe (fs64_rise) while not done puts bit 15 on
// cdti, shifts the word left, counts, and pulls csn low. The strobe on
// which the counter reads 15 sets c_done; the next strobe raises csn
// again. So csn is low for exactly 16 control clocks and cdti changes on
// the falling edge of the control clock (cclk is the inverted source
// clock), as the codec requires.
//
// Reset leaves the unit idle with c_done = 1 and csn = 1 (this design's
// choice; the document resets it only through c_wr).
module ak4565_ctrl_tx #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         fs64_rise,
  input  logic         c_wr,
  input  logic [W-1:0] c_datain,
  output logic         csn,
  output logic         cdti,
  output logic         c_done
);

  logic [3:0]   ccount;
  logic [W-1:0] c_shift_reg;

  always_ff @(posedge clk) begin
    if (rst) begin
      ccount      <= '0;
      c_done      <= 1'b1;
      csn         <= 1'b1;
      c_shift_reg <= '0;
      cdti        <= 1'b0;
    end else if (c_wr) begin
      ccount      <= '0;
      c_done      <= 1'b0;
      csn         <= 1'b1;
      c_shift_reg <= c_datain;
      cdti        <= 1'b0;
    end else if (fs64_rise) begin
      if (!c_done) begin
        ccount      <= ccount + 4'd1;
        csn         <= 1'b0;
        c_shift_reg <= {c_shift_reg[W-2:0], 1'b0};
        cdti        <= c_shift_reg[W-1];
      end
      if (ccount == 4'hF) c_done <= 1'b1;
      if (c_done)         csn    <= 1'b1;
    end
  end

endmodule
