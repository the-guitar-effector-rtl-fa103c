// Sweep generator for the flanger delay.
//
// The flanger mixes the signal with a copy whose delay rises and falls
// slowly. A 10-bit counter divides the 50 MHz clock to about 48.8 kHz
// (its MSB), a 7-bit counter divides that by 128 to about 381 Hz (flgclk,
// one step every 2.6 ms), and each flgclk rise steps the 12-bit delay
// counter d_cnt up or down by one. The direction flag turns to "down"
// on the step that leaves TOP (0x08F) going up and to "up" on the step
// that leaves BOTTOM (0x001) going down, so d_cnt sweeps 0..144 and back:
// a delay of 0 to about 3 ms at 48.8 kHz, one full up-and-down sweep in
// about 0.75 s.
//
// Runs on clk with enable strobes in place of the document's ripple
// clocks; counter sizes and limits follow the document. LR_BITS and
// RATE_BITS may be lowered to speed up simulation.
module flange_lfo #(
  parameter int unsigned       LR_BITS   = 10,
  parameter int unsigned       RATE_BITS = 7,
  parameter int unsigned       D_W       = 12,
  parameter logic [D_W-1:0]    TOP       = 12'h08F,
  parameter logic [D_W-1:0]    BOTTOM    = 12'h001
) (
  input  logic           clk,
  input  logic           rst,
  output logic [D_W-1:0] d_cnt
);

  logic [LR_BITS-1:0]   lrcnt;
  logic [RATE_BITS-1:0] cnt;
  logic                 lrclk, lrclk_d, flgclk, flgclk_d;
  logic                 lr_rise, flg_rise;
  logic                 up;

  always_ff @(posedge clk) begin
    if (rst) begin
      lrcnt    <= '0;
      lrclk    <= 1'b0;
      lrclk_d  <= 1'b0;
      cnt      <= '0;
      flgclk   <= 1'b0;
      flgclk_d <= 1'b0;
    end else begin
      lrcnt   <= lrcnt + 1'b1;
      lrclk   <= lrcnt[LR_BITS-1];
      lrclk_d <= lrclk;
      if (lr_rise) begin
        cnt    <= cnt + 1'b1;
        flgclk <= cnt[RATE_BITS-1];
      end
      flgclk_d <= flgclk;
    end
  end

  assign lr_rise  = lrclk  & ~lrclk_d;
  assign flg_rise = flgclk & ~flgclk_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      d_cnt <= '0;
      up    <= 1'b1;
    end else if (flg_rise) begin
      if (up) begin
        d_cnt <= d_cnt + 1'b1;
        if (d_cnt == TOP) up <= 1'b0;
      end else begin
        d_cnt <= d_cnt - 1'b1;
        if (d_cnt == BOTTOM) up <= 1'b1;
      end
    end
  end

endmodule
