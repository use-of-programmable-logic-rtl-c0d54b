// tb_link80_tx: sends a new random 10-bit value every bunch crossing and
// checks that the link carries its low digit in the first 80 MHz cycle and
// its high digit in the second, starting one crossing after capture.
module tb_link80_tx;
  import jep_pkg::*;
  logic clk = 0, rst = 1, ce = 0;
  logic [ET_W-1:0] din;
  logic [DIG_W-1:0] dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  link80_tx dut (.clk, .rst, .ce, .din, .dout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev;
    din = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    prev = -1;
    for (int t = 0; t < 500; t++) begin
      int v;
      v = $urandom_range(0, 1023);
      // ph == 1 cycle: value presented, captured at the end
      @(negedge clk);
      ce = 1; din = ET_W'(v);
      if (prev >= 0) begin
        checks++;
        if (dout != DIG_W'(prev / 32)) begin
          failures++;
          $display("FAIL high digit of %0d: %0d", prev, dout);
        end
      end
      // ph == 0 cycle: low digit on the link
      @(negedge clk);
      ce = 0; din = $urandom;
      checks++;
      if (dout != DIG_W'(v % 32)) begin
        failures++;
        $display("FAIL low digit of %0d: %0d", v, dout);
      end
      prev = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
