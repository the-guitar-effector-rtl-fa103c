// SRAM effects unit: delay, echo and flanger on a circular buffer.
//
// The external SRAM holds the last 2^18 samples as a circular buffer. A
// write pointer c_addr advances by one per processed sample; the delayed
// sample sits at c_addr - fxdelay, where fxdelay is delay_len (fixed
// delay, effect_sel = 0) or the sweeping flanger delay from flange_lfo
// (effect_sel = 1). Both the input and the value read back are halved
// (arithmetic shift right) before they are added, so the sum cannot
// leave the 16-bit range:
//     y(n) = x(n)/2 + m(n-d)/2
// where m is what was stored d samples earlier. With feedback = 0 the
// buffer stores x/2 (plain delay or flange); with feedback = 1 it stores
// y itself, giving the recursive echo y(n) = x(n)/2 + y(n-d)/2.
//
// Per sample a three-state machine runs once:
//   IDLE  sram_addr shows the delayed address; on trigger the SRAM read
//         data is captured (readram_dt) and the machine goes to S1.
//   S1    the sum is captured into snd_out; the address register is
//         loaded with the write pointer.
//   S2    sram_rnw = 0 writes sram_dt_wr at the write pointer, done = 1,
//         the write pointer advances; back to IDLE.
// The SRAM is assumed asynchronous: read data is valid one clock after the
// address register changes, and a write happens while sram_rnw is 0.
// snd_out updates two clocks after trigger; done is a one-clock pulse.
//
// The state machine, datapath and address scheme follow the document.
// Capturing the read data only on readram_dt (not every cycle) follows the
// document's datapath drawing; LFO_LR_BITS and LFO_RATE_BITS exist only
// to speed up simulation.
module sram_fx #(
  parameter int unsigned ADDR_W        = 18,
  parameter int unsigned W             = 16,
  parameter int unsigned LFO_LR_BITS   = 10,
  parameter int unsigned LFO_RATE_BITS = 7
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              feedback,
  input  logic              effect_sel,
  input  logic [ADDR_W-1:0] delay_len,
  input  logic              trigger,
  output logic              done,
  input  logic [W-1:0]      snd_in,
  output logic [W-1:0]      snd_out,
  output logic              sram_rnw,
  output logic [ADDR_W-1:0] sram_addr,
  output logic [W-1:0]      sram_dt_wr,
  input  logic [W-1:0]      sram_dt_rd
);

  typedef enum logic [1:0] {IDLING = 2'b00, S1 = 2'b01, S2 = 2'b10} fx_state_e;

  fx_state_e         c_state, n_state;
  logic              readram_dt;
  logic [W-1:0]      dt_in, sr_dt_rd, dt_out, temp_sum;
  logic [ADDR_W-1:0] c_addr, fxdelay, delay_addr;
  logic [11:0]       d_cnt;

  flange_lfo #(
    .LR_BITS(LFO_LR_BITS), .RATE_BITS(LFO_RATE_BITS), .D_W(12),
    .TOP(12'h08F), .BOTTOM(12'h001)
  ) u_lfo (
    .clk, .rst, .d_cnt
  );

  // delay selection and delayed address
  assign fxdelay    = effect_sel ? ADDR_W'(d_cnt) : delay_len;
  assign delay_addr = c_addr - fxdelay;

  // input latch, halved
  always_ff @(posedge clk) begin
    if (rst) dt_in <= '0;
    else     dt_in <= {snd_in[W-1], snd_in[W-1:1]};
  end

  // SRAM read latch, halved
  always_ff @(posedge clk) begin
    if (rst)             sr_dt_rd <= '0;
    else if (readram_dt) sr_dt_rd <= {sram_dt_rd[W-1], sram_dt_rd[W-1:1]};
  end

  assign temp_sum = dt_in + sr_dt_rd;

  // output latch
  always_ff @(posedge clk) begin
    if (rst)               dt_out <= '0;
    else if (c_state == S1) dt_out <= temp_sum;
  end

  // address register: write pointer in S2, delayed address otherwise
  always_ff @(posedge clk) begin
    if (rst)               sram_addr <= '0;
    else if (c_state == S1) sram_addr <= c_addr;
    else                   sram_addr <= delay_addr;
  end

  // write pointer
  always_ff @(posedge clk) begin
    if (rst)               c_addr <= '0;
    else if (c_state == S2) c_addr <= c_addr + 1'b1;
  end

  // state machine
  always_ff @(posedge clk) begin
    if (rst) c_state <= IDLING;
    else     c_state <= n_state;
  end

  always_comb begin
    n_state    = IDLING;
    sram_rnw   = 1'b1;
    done       = 1'b0;
    readram_dt = 1'b0;
    unique case (c_state)
      IDLING: begin
        if (trigger) begin
          readram_dt = 1'b1;
          n_state    = S1;
        end
      end
      S1: n_state = S2;
      S2: begin
        sram_rnw = 1'b0;
        done     = 1'b1;
        n_state  = IDLING;
      end
      default: n_state = IDLING;
    endcase
  end

  // feedback multiplexer
  assign sram_dt_wr = feedback ? dt_out : dt_in;
  assign snd_out    = dt_out;

  // a write lasts exactly one clock and happens at the write pointer
  a_single_write: assert property (@(posedge clk) disable iff (rst)
    !sram_rnw |=> sram_rnw);
  a_write_addr: assert property (@(posedge clk) disable iff (rst)
    !sram_rnw |-> sram_addr == c_addr);

endmodule
