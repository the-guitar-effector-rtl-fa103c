// Once-per-frame start pulse for the SRAM effects unit.
//
// The window in which the codec controller shows a new input sample
// (adcdone = 1) and accepts the next output sample (dacload = 1) lasts
// about half a frame. On entering the window trigger rises and stays 1
// until the effects unit reports done; then trigger falls and stays 0
// until the window has closed and opened again. So the unit processes
// exactly one sample per frame, however long the window is.
//
// The arming flag en_echoproc is set outside the window and cleared when
// the unit has finished. Behaviour follows the document.
module gen_trigger (
  input  logic clk,
  input  logic rst,
  input  logic adcdone,
  input  logic dacload,
  input  logic echodone,
  output logic trigger
);

  logic en_echoproc;

  always_ff @(posedge clk) begin
    if (rst) begin
      trigger     <= 1'b0;
      en_echoproc <= 1'b0;
    end else if (adcdone && dacload) begin
      if (!echodone && en_echoproc) begin
        trigger <= 1'b1;
      end else begin
        en_echoproc <= 1'b0;
        trigger     <= 1'b0;
      end
    end else begin
      en_echoproc <= 1'b1;
    end
  end

endmodule
