// End-to-end stimulus and checker for the gdsp top level.
//
// Surrounds the design with a codec model (random 16-bit guitar samples
// in, played samples out, control port), a 256K x 16 SRAM model and an
// OPB bus master, and compares every played sample with a reference
// model computed here:
//   clean      y = x
//   distortion y = x < 0 ? ~x : x
//   SRAM modes y = x/2 + buf[ptr - d]/2, buf[ptr] = feedback ? y : x/2
// The reference circular buffer is updated on every processed frame,
// whatever the selected effect, as the hardware does. d is DELAY_LEN, or
// for the flanges the sweep value, which is observed through d_cnt_peek;
// echobegin_peek marks the start of each processing run.
// A sample received in frame r is played in frame r+1; every played
// sample is checked against the sample of the frame before.
//
// Sequence: reset; wait for the codec initialisation (control word 0xE020
// must arrive on the control lines shared with the SRAM data pins, with
// the SRAM disabled meanwhile); then for each effect write its code over
// OPB, read it back, and play N_* frames. Counted mechanisms, each of
// which must happen: codec initialisation, every effect mode, feedback
// writes, delayed address below the buffer start (wrap), flanger sweep
// turning at 144 and at 0, OPB write and read.
module gdsp_checker
  import gfx_pkg::*;
#(
  parameter logic [17:0] DELAY_LEN   = 18'h05DC0,
  parameter int          N_CLEAN     = 20,
  parameter int          N_DIST      = 20,
  parameter int          N_DELAY     = 20,
  parameter int          N_ECHO      = 20,
  parameter int          N_FLANGE    = 20,
  parameter int          N_FLANGE_FB = 20,
  parameter longint      MAX_CYCLES  = 64'd10_000_000
) (
  input  logic        clk,
  output logic        rst,
  output logic [31:0] opb_abus,
  output logic [3:0]  opb_be,
  output logic [31:0] opb_dbus,
  output logic        opb_rnw,
  output logic        opb_select,
  output logic        opb_seqaddr,
  input  logic [31:0] sln_dbus,
  input  logic        sln_errack,
  input  logic        sln_retry,
  input  logic        sln_toutsup,
  input  logic        sln_xferack,
  input  logic        sram_ce_n,
  input  logic        sram_oe_n,
  input  logic        sram_we_n,
  input  logic        sram_ub_n,
  input  logic        sram_lb_n,
  input  logic [17:0] pb_a,
  input  logic [15:0] pb_d_o,
  input  logic        pb_d_oe,
  output logic [15:0] pb_d_i,
  input  logic        au_mclk,
  input  logic        au_lrclk,
  input  logic        au_bclk,
  input  logic        au_sdti,
  output logic        au_sdto0,
  input  logic        au_cs,
  input  logic [11:0] d_cnt_peek,
  input  logic        echobegin_peek
);
  localparam int AW = 18;
  localparam logic [31:0] SEL_ADDR = 32'hFEFF1001;

  int checks = 0, failures = 0;
  longint cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s at cycle %0d", what, cyc);
    end
  endtask

  // ---------------- models ----------------
  logic [15:0] adc_sample = '0, dac_word, ctrl_word, sram_q;
  int unsigned dac_frames, ctrl_words, ctrl_bits, sram_writes;

  ak4565_model codec (
    .bclk(au_bclk), .lrclk(au_lrclk), .sdti(au_sdti), .sdto0(au_sdto0),
    .csn(au_cs), .cclk(pb_d_o[0] & pb_d_oe), .cdti(pb_d_o[1]),
    .adc_sample, .dac_word, .dac_frames, .ctrl_word, .ctrl_words, .ctrl_bits
  );

  sram_model #(.ADDR_W(AW), .W(16)) sram (
    .clk, .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n), .addr(pb_a),
    .din(pb_d_o), .dout(sram_q), .writes(sram_writes)
  );
  assign pb_d_i = pb_d_oe ? pb_d_o : sram_q;

  // ---------------- reference ----------------
  logic [15:0] refbuf [2**AW];
  logic [AW-1:0] ptr = '0;
  fx_sel_e cur_mode = FX_CLEAN;
  logic [15:0] exp_out = '0;
  bit exp_valid = 1'b0;
  longint triggers = 0;
  int n_mode [8];
  int n_fb_writes = 0, n_wrap = 0, n_top = 0, n_bottom = 0, played = 0;

  function automatic logic [15:0] half(input logic [15:0] v);
    return {v[15], v[15:1]};
  endfunction

  logic [11:0] d_prev = '0;
  logic eb_d = 1'b0, lr_d = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    d_prev <= d_cnt_peek;
    eb_d   <= echobegin_peek;
    lr_d   <= au_lrclk;
    if (au_lrclk && !lr_d) adc_sample <= 16'($urandom);
    // sweep turns, counted while a flanger effect is selected
    if (cur_mode == FX_FLANGE || cur_mode == FX_FLANGE_FB) begin
      if (d_cnt_peek == 12'd144 && d_prev != 12'd144) n_top++;
      if (d_cnt_peek == 12'd0 && d_prev != 12'd0)     n_bottom++;
    end
    if (!rst && !sram_we_n) check(pb_d_oe && !sram_ce_n, "SRAM write with bus driven and chip enabled");
    if (!rst && echobegin_peek && !eb_d) begin
      logic [15:0] x, rd, y, st;
      logic [AW-1:0] d;
      // the previous frame's result has been played by now
      if (exp_valid) begin
        check(dac_word == exp_out, $sformatf("played %h expected %h (mode %s)", dac_word, exp_out, cur_mode.name()));
        played++;
      end
      x  = codec.adc_word;
      d  = cur_mode[FX_EFFECTSEL_BIT] ? AW'(d_prev) : DELAY_LEN;
      rd = refbuf[ptr - d];
      y  = half(x) + half(rd);
      st = cur_mode[FX_FEEDBACK_BIT] ? y : half(x);
      refbuf[ptr] = st;
      if (ptr < d) n_wrap++;
      ptr++;
      if (cur_mode[FX_FEEDBACK_BIT] && cur_mode != FX_DIST) n_fb_writes++;
      case (cur_mode)
        FX_CLEAN: exp_out = x;
        FX_DIST:  exp_out = x[15] ? ~x : x;
        default:  exp_out = y;
      endcase
      exp_valid = 1'b1;
      n_mode[cur_mode]++;
      triggers++;
    end
  end

  // ---------------- OPB master ----------------
  int n_opb_wr = 0, n_opb_rd = 0;
  int unsigned words0 = 0, writes0 = 0;
  task automatic opb(input bit rnw, input logic [31:0] wdata, output logic [31:0] rdata);
    int clocks;
    clocks = 0;
    @(posedge clk);
    opb_select <= 1'b1; opb_abus <= SEL_ADDR; opb_rnw <= rnw; opb_dbus <= wdata;
    do begin
      @(posedge clk);
      clocks++;
      #1;
    end while (!sln_xferack && clocks < 20);
    check(sln_xferack, "OPB acknowledge");
    rdata = sln_dbus;
    @(posedge clk);
    opb_select <= 1'b0; opb_rnw <= 1'b0; opb_dbus <= '0; opb_abus <= '0;
    if (rnw) n_opb_rd++; else n_opb_wr++;
  endtask

  task automatic select_effect(input fx_sel_e m, input int frames);
    logic [31:0] rd;
    @(negedge au_lrclk);
    opb(1'b0, {m, 29'b0}, rd);
    cur_mode = m;
    opb(1'b1, '0, rd);
    check(rd[31:29] == m, $sformatf("effect code read back %b", rd[31:29]));
    repeat (frames) @(posedge au_lrclk);
  endtask

  initial begin
    for (int i = 0; i < 2**AW; i++) refbuf[i] = '0;
    for (int i = 0; i < 8; i++) n_mode[i] = 0;
    rst = 1'b1;
    opb_abus = '0; opb_be = 4'hF; opb_dbus = '0; opb_rnw = 1'b0;
    opb_select = 1'b0; opb_seqaddr = 1'b0;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    words0 = ctrl_words;
    writes0 = sram_writes;
    // codec initialisation
    while (sram_ce_n) begin
      @(posedge clk);
      if (sram_ce_n) check(pb_d_oe == 1'b1, "bus driven during initialisation");
    end
    check(triggers == 0, "no processing before initialisation");
    repeat (64) @(posedge clk);
    check(ctrl_words - words0 == 1 && ctrl_word == CODEC_CTRL_WORD, $sformatf("control word %h (%0d)", ctrl_word, ctrl_words));
    select_effect(FX_CLEAN, N_CLEAN);
    select_effect(FX_DIST, N_DIST);
    select_effect(FX_DELAY, N_DELAY);
    select_effect(FX_ECHO, N_ECHO);
    select_effect(FX_FLANGE, N_FLANGE);
    select_effect(FX_FLANGE_FB, N_FLANGE_FB);
    repeat (2) @(posedge au_lrclk);
    // mechanisms
    check(ctrl_words - words0 == 1, "codec initialised once");
    check(n_mode[FX_CLEAN] > 0, "clean used");
    check(n_mode[FX_DIST] > 0, "distortion used");
    check(n_mode[FX_DELAY] > 0, "delay used");
    check(n_mode[FX_ECHO] > 0, "echo used");
    check(n_mode[FX_FLANGE] > 0, "flange used");
    check(n_mode[FX_FLANGE_FB] > 0, "flange with feedback used");
    check(n_fb_writes > 0, "feedback written to SRAM");
    check(n_wrap > 0, "delayed address wrapped");
    check(n_top > 0, "flanger sweep turned at 144");
    check(n_bottom > 0, "flanger sweep turned at 0");
    check(n_opb_wr >= 6 && n_opb_rd >= 6, "OPB writes and reads");
    check(longint'(sram_writes) - longint'(writes0) == triggers, "one SRAM write per processed frame");
    check(played > N_CLEAN, "samples played and checked");
    $display("mechanisms: init=%0d clean=%0d dist=%0d delay=%0d echo=%0d flange=%0d flange_fb=%0d fb_writes=%0d wrap=%0d turn144=%0d turn0=%0d opb_wr=%0d opb_rd=%0d played=%0d",
             ctrl_words - words0, n_mode[FX_CLEAN], n_mode[FX_DIST], n_mode[FX_DELAY], n_mode[FX_ECHO],
             n_mode[FX_FLANGE], n_mode[FX_FLANGE_FB], n_fb_writes, n_wrap, n_top, n_bottom,
             n_opb_wr, n_opb_rd, played);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc >= MAX_CYCLES);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic unused_ok;
  assign unused_ok = ^{sln_errack, sln_retry, sln_toutsup, sram_ub_n, sram_lb_n, au_mclk};
endmodule
