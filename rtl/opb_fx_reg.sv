// OPB slave register holding the effect selection.
//
// The menu program on the processor writes the 3-bit effect code to one
// bus address; this slave stores it and can return it on a read. OPB
// numbers bits from the MSB (OPB bit 0 = bit 31 here); the code travels
// in OPB data bits 0..2, i.e. opb_dbus[31:29].
//
// The bus inputs (the code bits and read-not-write) are registered
// first. A four-state machine, encoded so that only XFER has its top bit
// set, drives sln_xferack straight from that bit:
//   IDLE      -> SELECTED when opb_select is 1 and opb_abus == SEL_ADDR
//   SELECTED  -> write: store the code (WE), go to XFER
//                read:  go to READ; select dropped: back to IDLE
//   READ      -> output enable, go to XFER (select dropped: IDLE)
//   XFER      -> acknowledge for one clock, back to IDLE
// A write is acknowledged in the third clock of the transfer and a read in
// the fourth, with sln_dbus valid in the same clock as the acknowledge.
// After reset the code is 000 (clean). Behaviour and encoding follow the
// document; SEL_ADDR defaults to the address its bus decoder compares.
module opb_fx_reg #(
  parameter logic [31:0] SEL_ADDR = 32'hFEFF1001
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] opb_abus,
  input  logic [31:0] opb_dbus,
  input  logic        opb_rnw,
  input  logic        opb_select,
  output logic [31:0] sln_dbus,
  output logic        sln_xferack,
  output logic [2:0]  fx_sel
);

  typedef enum logic [2:0] {
    IDLE     = 3'b000,
    SELECTED = 3'b001,
    READ     = 3'b011,
    XFER     = 3'b111
  } opb_state_e;

  opb_state_e  present_state, next_state;
  logic [2:0]  di;
  logic        rnw, chip_select, we, output_enable;

  always_ff @(posedge clk) begin
    if (rst) begin
      di  <= '0;
      rnw <= 1'b0;
    end else begin
      di  <= opb_dbus[31:29];
      rnw <= opb_rnw;
    end
  end

  assign chip_select = opb_select && (opb_abus == SEL_ADDR);

  always_ff @(posedge clk) begin
    if (rst)     fx_sel <= 3'b000;
    else if (we) fx_sel <= di;
  end

  always_ff @(posedge clk) begin
    if (rst)                present_state <= IDLE;
    else                    present_state <= next_state;
  end

  always_comb begin
    we            = 1'b0;
    output_enable = 1'b0;
    next_state    = IDLE;
    unique case (present_state)
      IDLE:     if (chip_select) next_state = SELECTED;
      SELECTED: begin
        if (opb_select) begin
          if (rnw) begin
            next_state = READ;
          end else begin
            we         = 1'b1;
            next_state = XFER;
          end
        end
      end
      READ: begin
        if (opb_select) begin
          output_enable = 1'b1;
          next_state    = XFER;
        end
      end
      XFER:     next_state = IDLE;
      default:  next_state = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)                sln_dbus[31:16] <= '0;
    else if (output_enable) sln_dbus[31:16] <= {fx_sel, 13'b0};
    else                    sln_dbus[31:16] <= '0;
  end
  assign sln_dbus[15:0] = '0;

  assign sln_xferack = present_state[2];

  // only OPB data bits 0..2 carry the effect code
  logic unused_ok;
  assign unused_ok = ^opb_dbus[28:0];

  // the acknowledge is a single-clock pulse
  a_ack_pulse: assert property (@(posedge clk) disable iff (rst)
    sln_xferack |=> !sln_xferack);

endmodule
