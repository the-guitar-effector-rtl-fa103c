// Serial-to-parallel converter for the codec's ADC output (sdto0).
//
// While ad_capture is 0 (the first half of the frame, which carries the
// mono input), every bit-clock strobe shifts sdto0 into a 16-bit register
// from the right, so after 16 strobes the first (most significant) bit
// sent has reached bit 15. While ad_capture is 1 the shift register is
// copied into adc_dtout on every strobe, so adc_dtout changes once per
// frame and holds the newest sample. adcdone is ad_capture registered on
// the same strobe: it is 1 while adc_dtout is valid.
//
// Timing: sb_rise comes half a bit period after the codec changed sdto0
// (the codec drives on the falling bit clock). Behaviour follows the
// document; the enable-strobe clocking is this design's own.
module ak4565_adc_rx #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         sb_rise,
  input  logic         ad_capture,
  input  logic         sdto0,
  output logic [W-1:0] adc_dtout,
  output logic         adcdone
);

  logic [W-1:0] in_shift_reg;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_shift_reg <= '0;
      adc_dtout    <= '0;
      adcdone      <= 1'b0;
    end else if (sb_rise) begin
      if (!ad_capture) begin
        in_shift_reg <= {in_shift_reg[W-2:0], sdto0};
      end else begin
        adc_dtout <= in_shift_reg;
      end
      adcdone <= ad_capture;
    end
  end

endmodule
