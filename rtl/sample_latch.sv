// Sample exchange between the codec controller and the effects.
//
// While the codec controller shows a complete input sample (adcdone = 1)
// and is loading its output register (dacload = 1), every clock copies
// the input sample into latch16bit, which feeds all effects, and copies
// the selected effect output into dac_dtin, which the codec controller
// plays back. Outside that window both hold. Since the effects see
// latch16bit one clock late, the output played in a frame is the effect
// result available during that window. Behaviour follows the document.
module sample_latch #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         adcdone,
  input  logic         dacload,
  input  logic [W-1:0] adc_dtout,
  input  logic [W-1:0] snd_output,
  output logic [W-1:0] latch16bit,
  output logic [W-1:0] dac_dtin
);

  always_ff @(posedge clk) begin
    if (rst) begin
      latch16bit <= '0;
      dac_dtin   <= '0;
    end else if (adcdone && dacload) begin
      latch16bit <= adc_dtout;
      dac_dtin   <= snd_output;
    end
  end

endmodule
