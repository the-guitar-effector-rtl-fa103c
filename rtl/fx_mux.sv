// Effect output multiplexer.
//
// All effects run on every sample at the same time; this multiplexer picks
// the one to play: code 000 passes the clean input, code 001 the distortion
// output, and every other code the output of the SRAM effects unit (delay,
// echo or flange, which that unit itself tells apart by bits 1 and 0 of
// the code). Purely combinational. Follows the document.
module fx_mux
  import gfx_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [2:0]   fx_sel,
  input  logic [W-1:0] clean,
  input  logic [W-1:0] distorted,
  input  logic [W-1:0] sram_fx,
  output logic [W-1:0] snd_output
);

  always_comb begin
    unique case (fx_sel)
      FX_CLEAN: snd_output = clean;
      FX_DIST:  snd_output = distorted;
      default:  snd_output = sram_fx;
    endcase
  end

endmodule
