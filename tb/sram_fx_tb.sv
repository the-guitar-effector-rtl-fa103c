// Testbench for sram_fx with a behavioural SRAM. A reference model kept
// here (its own circular buffer, write pointer and halving arithmetic)
// predicts every output and every stored value:
//     read  = buf[ptr - d],  y = x/2 + read/2,  buf[ptr] = fb ? y : x/2
// Phases: plain delay and echo with a short delay (7 samples), flange and
// flange with feedback with a fast sweep generator (the delay is read
// from the generator at trigger time), and the 0.5 s default delay over
// more than 24000 samples, so that the buffer wraps at address 0.
// Checks: snd_out two clocks after trigger, done exactly in the third
// clock, one SRAM write per sample at the write pointer, and the stored
// data word.
module sram_fx_tb;
  localparam int AW = 18;
  logic clk = 1'b0, rst = 1'b1;
  logic feedback = 1'b0, effect_sel = 1'b0, trigger = 1'b0;
  logic [AW-1:0] delay_len = 18'd7;
  logic done, sram_rnw;
  logic [15:0] snd_in = '0, snd_out, sram_dt_wr, sram_dt_rd;
  logic [AW-1:0] sram_addr;
  int unsigned writes;
  int checks = 0, failures = 0;

  sram_fx #(.LFO_LR_BITS(3), .LFO_RATE_BITS(2)) dut (.*);
  sram_model #(.ADDR_W(AW), .W(16)) mem (
    .clk, .ce_n(1'b0), .oe_n(1'b0), .we_n(sram_rnw), .addr(sram_addr),
    .din(sram_dt_wr), .dout(sram_dt_rd), .writes
  );

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] refbuf [2**AW];
  logic [AW-1:0] ptr = '0;
  int n_wrap = 0, d_max = 0, d_min = 1000;

  function automatic logic [15:0] half(input logic [15:0] v);
    return {v[15], v[15:1]};
  endfunction

  task automatic one_sample(input logic [15:0] x);
    logic [15:0] rd, y, st;
    logic [AW-1:0] d;
    @(posedge clk) snd_in <= x;
    @(posedge clk);
    @(posedge clk);
    d = effect_sel ? AW'(dut.u_lfo.d_cnt) : delay_len;
    if (int'(d) > d_max) d_max = int'(d);
    if (int'(d) < d_min) d_min = int'(d);
    if (ptr < d) n_wrap++;
    rd = refbuf[ptr - d];
    y  = half(x) + half(rd);
    st = feedback ? y : half(x);
    trigger <= 1'b1;
    @(posedge clk) trigger <= 1'b0;       // state S1 follows
    check(done == 1'b0, "no done in S1");
    @(posedge clk);                        // S2
    #1;
    check(done == 1'b1, "done in third clock");
    check(sram_rnw == 1'b0, "write in S2");
    check(sram_addr == ptr, $sformatf("write address %h expected %h", sram_addr, ptr));
    check(sram_dt_wr == st, $sformatf("stored %h expected %h", sram_dt_wr, st));
    check(snd_out == y, $sformatf("out %h expected %h (x %h d %0d)", snd_out, y, x, d));
    @(posedge clk);
    #1;
    check(done == 1'b0 && sram_rnw == 1'b1, "back to idle");
    refbuf[ptr] = st;
    ptr++;
  endtask

  int w0;
  initial begin
    for (int i = 0; i < 2**AW; i++) refbuf[i] = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // delay
    feedback = 0; effect_sel = 0; delay_len = 7;
    w0 = int'(writes);
    for (int i = 0; i < 60; i++) one_sample(16'($urandom));
    check(int'(writes) - w0 == 60, "one write per sample");
    // echo
    feedback = 1;
    for (int i = 0; i < 60; i++) one_sample((i % 10 == 0) ? 16'h7FFF : 16'($urandom));
    // flange without and with feedback
    feedback = 0; effect_sel = 1;
    for (int i = 0; i < 1500; i++) one_sample(16'($urandom));
    feedback = 1;
    for (int i = 0; i < 1500; i++) one_sample(16'($urandom));
    check(d_max == 144 && d_min == 0, $sformatf("flange delay swept %0d..%0d", d_min, d_max));
    // default 0.5 s delay, past the buffer start
    feedback = 0; effect_sel = 0; delay_len = 18'h05DC0;
    for (int i = 0; i < 24100; i++) one_sample(16'($urandom));
    check(n_wrap > 0, "delayed address wrapped below zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
