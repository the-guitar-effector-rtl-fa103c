// Full-size end-to-end testbench for gdsp: every parameter at its
// default. After the real 2^15-frame (0.67 s) power-up wait it plays the
// 0.5 s delay for 24200 frames, so the buffer both wraps below address 0
// and returns real delayed samples, then echo, clean and distortion, a
// full flanger sweep (0..144..0 at one step per 128 frames, 37000 frames)
// and the flanger with feedback. About 1e8 clocks, 2 s of audio. All
// checking is in gdsp_checker.
module gdsp_full_tb;
  logic clk = 1'b0;
  always #10 clk = ~clk;

  logic rst;
  logic [31:0] opb_abus, opb_dbus, sln_dbus;
  logic [3:0] opb_be;
  logic opb_rnw, opb_select, opb_seqaddr, sln_errack, sln_retry, sln_toutsup, sln_xferack;
  logic sram_ce_n, sram_oe_n, sram_we_n, sram_ub_n, sram_lb_n, pb_d_oe;
  logic [17:0] pb_a;
  logic [15:0] pb_d_o, pb_d_i;
  logic au_mclk, au_lrclk, au_bclk, au_sdti, au_sdto0, au_cs;

  gdsp dut (.*);

  gdsp_checker #(
    .DELAY_LEN(18'h05DC0), .N_CLEAN(50), .N_DIST(50), .N_DELAY(24200), .N_ECHO(200),
    .N_FLANGE(37000), .N_FLANGE_FB(200), .MAX_CYCLES(64'd120_000_000)
  ) chk (.*, .d_cnt_peek(dut.u_fx.d_cnt), .echobegin_peek(dut.echobegin));
endmodule
