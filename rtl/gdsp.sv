// Guitar effector: top level.
//
// A guitar signal enters the AK4565 codec, which sends one 16-bit mono
// sample per 48.8 kHz frame. Every sample goes through all effects at
// once: absolute-value distortion, and the SRAM effects unit, which makes
// a 0.5 s delay, an echo (the same delay with feedback), or a flanger
// (0-3 ms sweeping delay, with or without feedback). A multiplexer picks
// clean, distorted or SRAM-effect sound by the 3-bit effect code that the
// processor writes over the OPB bus, and the result goes back to the codec.
//
// Structure:
//   ak4565       codec clocks, serial data in/out, control port
//   codec_init   waits after reset, sends CTRL_WORD, then enables the rest
//   sample_latch swaps input and output samples once per frame
//   gen_trigger  starts the SRAM effects unit once per frame
//   distortion, sram_fx (with flange_lfo), fx_mux
//   opb_fx_reg   OPB slave with the effect code
//
// External SRAM (256K x 16, asynchronous): chip enabled only after codec
// initialisation; output enable, byte enables tied active; write enable is
// the effects unit's read-not-write. The data pins are split into
// pb_d_o / pb_d_oe / pb_d_i for an external bidirectional pad. Before
// initialisation ends the pins are driven, and bits 0 and 1 carry the
// codec's control clock and control data (the board routes the codec
// control port over those lines); afterwards they are driven only during
// SRAM writes. The hand-over waits until the codec's chip select is high
// again after the last control bit; switching as soon as initialisation
// reports done would let an SRAM write clock a stray bit into the codec.
//
// Timing: everything runs on the 50 MHz clk; a frame is 1024 clocks, of
// which the SRAM unit needs three. The output played in a frame is the
// effect of the sample received in the frame before.
//
// Structure, constants and pin use follow the document; the split SRAM
// data pins, the chip-select wait in the pin hand-over, the single clock domain and the effect codes for delay, echo
// and flange (see gfx_pkg) are this design's choices. LFO_LR_BITS and
// LFO_RATE_BITS exist only to shorten simulations.
module gdsp
  import gfx_pkg::*;
#(
  parameter logic [17:0] DELAY_LEN     = DELAY_LEN_DEFAULT,
  parameter logic [15:0] CTRL_WORD     = CODEC_CTRL_WORD,
  parameter int unsigned INIT_BITS     = 16,
  parameter logic [31:0] SEL_ADDR      = 32'hFEFF1001,
  parameter int unsigned LFO_LR_BITS   = 10,
  parameter int unsigned LFO_RATE_BITS = 7
) (
  input  logic        clk,
  input  logic        rst,
  // OPB slave
  input  logic [31:0] opb_abus,
  input  logic [3:0]  opb_be,
  input  logic [31:0] opb_dbus,
  input  logic        opb_rnw,
  input  logic        opb_select,
  input  logic        opb_seqaddr,
  output logic [31:0] sln_dbus,
  output logic        sln_errack,
  output logic        sln_retry,
  output logic        sln_toutsup,
  output logic        sln_xferack,
  // SRAM
  output logic        sram_ce_n,
  output logic        sram_oe_n,
  output logic        sram_we_n,
  output logic        sram_ub_n,
  output logic        sram_lb_n,
  output logic [17:0] pb_a,
  output logic [15:0] pb_d_o,
  output logic        pb_d_oe,
  input  logic [15:0] pb_d_i,
  // codec
  output logic        au_mclk,
  output logic        au_lrclk,
  output logic        au_bclk,
  output logic        au_sdti,
  input  logic        au_sdto0,
  output logic        au_cs
);

  logic       cclk, cdti, csn;
  logic       adcdone, dacload, c_wr, c_done, bclk_rise, lr_rise;
  logic       norm, sram_side;
  sample_t    adc_dtout, dac_dtin, latch16bit, dist_out, echo_out, snd_output;
  logic [2:0] fx_sel;
  logic       trigger, echobegin, echodone;
  logic       sram_rnw;
  sram_addr_t sram_addr;
  sample_t    sram_dt_wr;

  ak4565 #(.DA_OFFSET(4)) u_codec (
    .clk, .rst,
    .mclk(au_mclk), .bclk(au_bclk), .lrclk(au_lrclk),
    .sdti(au_sdti), .sdto0(au_sdto0),
    .csn, .cclk, .cdti,
    .adcdone, .dacload, .adc_dtout, .dac_dtin,
    .c_datain(CTRL_WORD), .c_wr, .c_done,
    .bclk_rise, .lr_rise
  );

  codec_init #(.INIT_BITS(INIT_BITS)) u_init (
    .clk, .rst, .bclk_rise, .lr_rise, .c_done, .c_wr, .norm
  );

  sample_latch #(.W(SAMPLE_W)) u_latch (
    .clk, .rst, .adcdone, .dacload, .adc_dtout, .snd_output,
    .latch16bit, .dac_dtin
  );

  gen_trigger u_trig (
    .clk, .rst, .adcdone, .dacload, .echodone, .trigger
  );

  // the SRAM side owns the shared pins once initialisation is over and the
  // codec's chip select has returned high after the last control bit
  assign sram_side = norm & csn;
  assign echobegin = trigger & sram_side;

  distortion #(.W(SAMPLE_W)) u_dist (
    .clk, .rst, .din(latch16bit), .dout(dist_out)
  );

  sram_fx #(
    .ADDR_W(ADDR_W), .W(SAMPLE_W),
    .LFO_LR_BITS(LFO_LR_BITS), .LFO_RATE_BITS(LFO_RATE_BITS)
  ) u_fx (
    .clk, .rst,
    .feedback(fx_sel[FX_FEEDBACK_BIT]), .effect_sel(fx_sel[FX_EFFECTSEL_BIT]),
    .delay_len(DELAY_LEN), .trigger(echobegin), .done(echodone),
    .snd_in(latch16bit), .snd_out(echo_out),
    .sram_rnw, .sram_addr, .sram_dt_wr, .sram_dt_rd(pb_d_i)
  );

  fx_mux #(.W(SAMPLE_W)) u_mux (
    .fx_sel, .clean(latch16bit), .distorted(dist_out), .sram_fx(echo_out),
    .snd_output
  );

  opb_fx_reg #(.SEL_ADDR(SEL_ADDR)) u_opb (
    .clk, .rst, .opb_abus, .opb_dbus, .opb_rnw, .opb_select,
    .sln_dbus, .sln_xferack, .fx_sel
  );

  assign sln_errack  = 1'b0;
  assign sln_retry   = 1'b0;
  assign sln_toutsup = 1'b0;

  // codec control chip select goes straight out
  assign au_cs = csn;

  // SRAM pins
  assign sram_ce_n = ~sram_side;
  assign sram_oe_n = 1'b0;
  assign sram_we_n = sram_rnw;
  assign sram_ub_n = 1'b0;
  assign sram_lb_n = 1'b0;
  assign pb_a      = sram_addr;
  assign pb_d_oe   = sram_side ? ~sram_rnw : 1'b1;
  assign pb_d_o    = sram_side ? sram_dt_wr : {14'b0, cdti, cclk};

  // byte enables and sequential-address hint carry no information here
  logic unused_ok;
  assign unused_ok = ^{opb_be, opb_seqaddr};

endmodule
