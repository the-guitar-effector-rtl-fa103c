// Power-up sequencing of the codec.
//
// The codec needs time after power-up before it accepts control words.
// A counter of frames (one step per lrclk rise) runs from reset; when its
// MSB (bit INIT_BITS-1) becomes 1, i.e. after 2^(INIT_BITS-1) frames
// (0.67 s at the default), the state machine pulses c_wr for one bit-clock
// period to start sending the control word, waits for c_done, and then
// stays in NORM for good. norm = 1 enables the SRAM and the effects and
// hands the shared SRAM data pins back from the codec control lines.
//
// The state machine steps on bit-clock strobes (bclk_rise) and the counter
// on frame strobes (lr_rise), both in the clk domain. States and waiting
// time follow the document; INIT_BITS may be lowered for simulation.
module codec_init #(
  parameter int unsigned INIT_BITS = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic bclk_rise,
  input  logic lr_rise,
  input  logic c_done,
  output logic c_wr,
  output logic norm
);

  typedef enum logic [1:0] {
    PRE_INIT  = 2'b00,
    C_WR_WAIT = 2'b01,
    WAIT_DONE = 2'b10,
    NORM      = 2'b11
  } init_state_e;

  init_state_e          c_state, n_state;
  logic [INIT_BITS-1:0] initcnt;

  always_ff @(posedge clk) begin
    if (rst)          initcnt <= '0;
    else if (lr_rise) initcnt <= initcnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst)            c_state <= PRE_INIT;
    else if (bclk_rise) c_state <= n_state;
  end

  always_comb begin
    c_wr    = 1'b0;
    n_state = c_state;
    unique case (c_state)
      PRE_INIT:  if (initcnt[INIT_BITS-1]) n_state = C_WR_WAIT;
      C_WR_WAIT: begin
        c_wr    = 1'b1;
        n_state = WAIT_DONE;
      end
      WAIT_DONE: if (c_done) n_state = NORM;
      NORM:      n_state = NORM;
      default:   n_state = PRE_INIT;
    endcase
  end

  assign norm = (c_state == NORM);

endmodule
