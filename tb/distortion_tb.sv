// Testbench for distortion: random and corner samples; the expected output
// (bitwise inverse for negative samples, unchanged otherwise) is computed
// here and compared one clock after the sample is applied.
module distortion_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic [15:0] din = '0, dout;
  int checks = 0, failures = 0;

  distortion #(.W(16)) dut (.*);
  always #10 clk = ~clk;

  function automatic logic [15:0] ref_abs(input logic [15:0] x);
    int v;
    v = $signed(x);
    return (v < 0) ? 16'(-v - 1) : x;   // -x - 1 is the one's complement of x
  endfunction

  logic [15:0] x;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 2000; i++) begin
      case (i)
        0: x = 16'h0000;  1: x = 16'hFFFF;  2: x = 16'h8000;  3: x = 16'h7FFF;
        default: x = 16'($urandom);
      endcase
      @(posedge clk) din <= x;
      @(posedge clk);
      #1;
      checks++;
      if (dout !== ref_abs(x)) begin
        failures++;
        $display("FAIL: din %h dout %h expected %h", x, dout, ref_abs(x));
      end
      checks++;
      if ($signed(dout) < 0) begin failures++; $display("FAIL: negative output %h", dout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
