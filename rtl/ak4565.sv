// AK4565 codec controller: clock generation, data handling and control.
//
// Produces the codec clocks from the 50 MHz system clock (mclk 12.5 MHz,
// bclk 1.5625 MHz, lrclk 48.8 kHz, control clock 3.125 MHz), receives one
// 16-bit mono sample per frame from sdto0 into adc_dtout, sends one
// 16-bit sample per frame from dac_dtin out on sdti, and sends a 16-bit
// control word on csn/cdti/cclk when c_wr is pulsed.
//
// Frame timing: a frame is 1024 clk cycles. The sample is shifted in
// while lrclk is 0 (the half the codec uses for the mono channel, found by
// experiment to be the reverse of what the board manual says) and is
// presented on adc_dtout with adcdone = 1 during the other half. dacload
// is 1 during the half in which dac_dtin is loaded. Both flags are 1
// together for most of that half; the top level captures its samples then.
// bclk_rise and lr_rise are enable strobes for logic that the document
// clocks with bclk and lrclk.
module ak4565 #(
  parameter int unsigned DA_OFFSET = 4
) (
  input  logic        clk,
  input  logic        rst,
  output logic        mclk,
  output logic        bclk,
  output logic        lrclk,
  output logic        sdti,
  input  logic        sdto0,
  output logic        csn,
  output logic        cclk,
  output logic        cdti,
  output logic        adcdone,
  output logic        dacload,
  output logic [15:0] adc_dtout,
  input  logic [15:0] dac_dtin,
  input  logic [15:0] c_datain,
  input  logic        c_wr,
  output logic        c_done,
  output logic        bclk_rise,
  output logic        lr_rise
);

  logic ad_capture, da_stream, sb_rise, snb_rise, fs64_rise;

  ak4565_clkgen #(.DA_OFFSET(DA_OFFSET)) u_clkgen (
    .clk, .rst, .mclk, .bclk, .lrclk, .cclk,
    .ad_capture, .da_stream, .sb_rise, .snb_rise, .fs64_rise, .lr_rise
  );

  ak4565_adc_rx #(.W(16)) u_rx (
    .clk, .rst, .sb_rise, .ad_capture, .sdto0, .adc_dtout, .adcdone
  );

  ak4565_dac_tx #(.W(16)) u_tx (
    .clk, .rst, .snb_rise, .da_stream, .dac_dtin, .sdti, .dacload
  );

  ak4565_ctrl_tx #(.W(16)) u_ctrl (
    .clk, .rst, .fs64_rise, .c_wr, .c_datain, .csn, .cdti, .c_done
  );

  assign bclk_rise = sb_rise;

endmodule
