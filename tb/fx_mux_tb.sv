// Testbench for fx_mux: for every effect code and random inputs the
// output must be the clean input for 000, the distortion input for 001 and
// the SRAM effect input for all other codes.
module fx_mux_tb;
  logic [2:0] fx_sel = '0;
  logic [15:0] clean = '0, distorted = '0, sram_fx = '0, snd_output;
  logic [15:0] expv;
  int checks = 0, failures = 0;

  fx_mux #(.W(16)) dut (.*);

  initial begin
    for (int i = 0; i < 800; i++) begin
      fx_sel    = 3'(i % 8);
      clean     = 16'($urandom);
      distorted = 16'($urandom);
      sram_fx   = 16'($urandom);
      #5;
      expv = (fx_sel == 3'b000) ? clean : (fx_sel == 3'b001) ? distorted : sram_fx;
      checks++;
      if (snd_output !== expv) begin
        failures++;
        $display("FAIL: code %b out %h expected %h", fx_sel, snd_output, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
