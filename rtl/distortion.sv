// Absolute-value distortion.
//
// Folding the negative half of the waveform up over the positive half
// doubles the fundamental and adds strong harmonics. The cheap form used
// here checks only the sign bit: when it is 1 all bits of the sample are
// inverted (one's complement, so -x becomes x-1), otherwise the sample
// passes unchanged. The result is registered: dout follows din one clock
// later. This is the document's method; it was preferred over clipping
// because it needs no amplitude-dependent threshold.
module distortion #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  always_ff @(posedge clk) begin
    if (rst)            dout <= '0;
    else if (din[W-1])  dout <= ~din;
    else                dout <= din;
  end

endmodule
