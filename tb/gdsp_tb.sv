// End-to-end testbench for gdsp at reduced sizes: 8-frame power-up wait,
// a 5-sample fixed delay and a flanger sweep 4096 times faster than the
// real one (a full 0..144..0 sweep in 9 frames), so that every effect,
// the buffer wrap and both sweep turns happen within a few hundred frames.
// All checking is in gdsp_checker.
module gdsp_tb;
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

  gdsp #(.DELAY_LEN(18'd5), .INIT_BITS(4), .LFO_LR_BITS(3), .LFO_RATE_BITS(2)) dut (.*);

  gdsp_checker #(
    .DELAY_LEN(18'd5), .N_CLEAN(20), .N_DIST(20), .N_DELAY(20), .N_ECHO(20),
    .N_FLANGE(25), .N_FLANGE_FB(25), .MAX_CYCLES(64'd400_000)
  ) chk (.*, .d_cnt_peek(dut.u_fx.d_cnt), .echobegin_peek(dut.echobegin));
endmodule
