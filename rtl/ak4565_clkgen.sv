// Clock generation for the AK4565 codec interface.
//
// A 2-bit counter on the 50 MHz system clock gives fs256clk (12.5 MHz,
// 256 x the sample rate); its inverse is the codec master clock mclk.
// fs256clk steps two 8-bit counters: adcount, whose bits give the control
// clock source fs64clk (bit 1, 3.125 MHz), the bit clock sbclk (bit 2,
// 1.5625 MHz = 32 fs) and the frame clock lrclk / ad_capture (bit 7,
// 48.8 kHz); and dacount, which starts DA_OFFSET ahead so that its bit 2
// (snbclk) is the bit clock inverted and its bit 7 (da_stream) opens the
// output frame half a bit earlier. All outputs of both counters are
// registered on the fs256clk edge, so every clock leaves aligned to mclk,
// which the codec requires.
//
// Everything here runs on clk. Instead of clocking logic from the derived
// clocks, the module raises one-cycle strobes (sb_rise, snb_rise,
// fs64_rise, lr_rise) in the clk cycle after a derived clock register
// rose; logic elsewhere acts on those strobes. The counter widths and the
// DA offset follow the document; the strobe scheme is this design's own.
module ak4565_clkgen #(
  parameter int unsigned DA_OFFSET = 4
) (
  input  logic clk,
  input  logic rst,
  output logic mclk,
  output logic bclk,
  output logic lrclk,
  output logic cclk,
  output logic ad_capture,
  output logic da_stream,
  output logic sb_rise,
  output logic snb_rise,
  output logic fs64_rise,
  output logic lr_rise
);

  logic [1:0] clkcount;
  logic       fs256clk, fs256clk_d;
  logic       fs256_rise;
  logic [7:0] adcount, dacount;
  logic       fs64clk, sbclk, snbclk, slrclk;
  logic       fs64clk_d, sbclk_d, snbclk_d, slrclk_d;

  // clkdiv1: 50 MHz / 4
  always_ff @(posedge clk) begin
    if (rst) begin
      clkcount   <= '0;
      fs256clk   <= 1'b0;
      fs256clk_d <= 1'b0;
    end else begin
      clkcount   <= clkcount + 2'd1;
      fs256clk   <= clkcount[1];
      fs256clk_d <= fs256clk;
    end
  end
  assign fs256_rise = fs256clk & ~fs256clk_d;

  // clkdiv2: 8-bit counters stepped at 12.5 MHz
  always_ff @(posedge clk) begin
    if (rst) begin
      adcount    <= '0;
      dacount    <= 8'(DA_OFFSET);
      fs64clk    <= 1'b0;
      sbclk      <= 1'b0;
      snbclk     <= 1'b0;
      slrclk     <= 1'b0;
      ad_capture <= 1'b0;
      da_stream  <= 1'b0;
    end else if (fs256_rise) begin
      adcount    <= adcount + 8'd1;
      dacount    <= dacount + 8'd1;
      fs64clk    <= adcount[1];
      sbclk      <= adcount[2];
      snbclk     <= dacount[2];
      slrclk     <= adcount[7];
      ad_capture <= adcount[7];
      da_stream  <= dacount[7];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fs64clk_d <= 1'b0;
      sbclk_d   <= 1'b0;
      snbclk_d  <= 1'b0;
      slrclk_d  <= 1'b0;
    end else begin
      fs64clk_d <= fs64clk;
      sbclk_d   <= sbclk;
      snbclk_d  <= snbclk;
      slrclk_d  <= slrclk;
    end
  end

  assign sb_rise   = sbclk   & ~sbclk_d;
  assign snb_rise  = snbclk  & ~snbclk_d;
  assign fs64_rise = fs64clk & ~fs64clk_d;
  assign lr_rise   = slrclk  & ~slrclk_d;

  assign mclk  = ~fs256clk;
  assign bclk  = sbclk;
  assign lrclk = slrclk;
  assign cclk  = ~fs64clk;

endmodule
