// Shared types and constants of the guitar effector.
//
// Audio samples are 16-bit two's complement, the delay buffer lives in an
// 18-bit addressed (256K x 16) SRAM. The effect selection is a 3-bit code:
// clean (000) and distortion (001) are fixed by the output multiplexer;
// for the SRAM effects bit 1 requests feedback (echo) and bit 0 requests
// the sweeping flanger delay instead of the fixed one. The codes chosen for
// delay, echo and the two flanges follow from that bit meaning; the exact
// values the menu software writes are this design's choice.
package gfx_pkg;

  localparam int unsigned SAMPLE_W = 16;
  localparam int unsigned ADDR_W   = 18;

  typedef logic [SAMPLE_W-1:0] sample_t;  // two's complement bits
  typedef logic        [ADDR_W-1:0]   sram_addr_t;

  typedef enum logic [2:0] {
    FX_CLEAN     = 3'b000,
    FX_DIST      = 3'b001,
    FX_DELAY     = 3'b100,
    FX_FLANGE    = 3'b101,
    FX_ECHO      = 3'b110,
    FX_FLANGE_FB = 3'b111
  } fx_sel_e;

  // Bit positions inside the effect code that steer the SRAM effects unit.
  localparam int unsigned FX_FEEDBACK_BIT  = 1;
  localparam int unsigned FX_EFFECTSEL_BIT = 0;

  // 0.5 s of delay at the 48.8 kHz frame rate (24000 samples).
  localparam sram_addr_t DELAY_LEN_DEFAULT = 18'h05DC0;

  // Control word sent to the codec after power-up:
  // opcode 111, address 00000, data 0010_0000.
  localparam logic [15:0] CODEC_CTRL_WORD = 16'hE020;

endpackage
