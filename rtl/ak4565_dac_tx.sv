// Parallel-to-serial converter for the codec's DAC input (sdti).
//
// While da_stream is 1 every strobe of the inverted bit clock (snb_rise)
// loads dac_dtin into a 16-bit register and holds sdti at 0. While
// da_stream is 0 every strobe puts bit 15 of the register on sdti and
// shifts the register left, filling with 0, so the 16 bits leave MSB
// first, one per bit clock, changing on the falling bit clock so the codec
// samples them on the rising one. dacload is da_stream registered on the
// same strobe: it is 1 during the load half of the frame.
//
// Behaviour follows the document; the enable-strobe clocking is this
// design's own.
module ak4565_dac_tx #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         snb_rise,
  input  logic         da_stream,
  input  logic [W-1:0] dac_dtin,
  output logic         sdti,
  output logic         dacload
);

  logic [W-1:0] out_shift_reg;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_shift_reg <= '0;
      sdti          <= 1'b0;
      dacload       <= 1'b0;
    end else if (snb_rise) begin
      if (!da_stream) begin
        out_shift_reg <= {out_shift_reg[W-2:0], 1'b0};
        sdti          <= out_shift_reg[W-1];
      end else begin
        out_shift_reg <= dac_dtin;
        sdti          <= 1'b0;
      end
      dacload <= da_stream;
    end
  end

endmodule
