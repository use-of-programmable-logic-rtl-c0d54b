// tb_serial5_arith: random operands through a 5-bit serial adder and a
// 5-bit serial comparator.  Each operand pair is sent as a low digit and an
// upper digit on consecutive cycles; the full sum and comparison are checked
// against plain integer arithmetic, including equal upper digits.
module tb_serial5_arith;
  localparam int HW = 9;
  logic clk = 0, rst = 1, lo = 1;
  logic [HW-1:0] a, b, s;
  logic gt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  serial5_add #(.HW(HW)) dut_add (.clk, .rst, .lo, .a, .b, .s);
  serial5_cmp #(.HW(HW)) dut_cmp (.clk, .rst, .lo, .a, .b, .gt);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 2000; t++) begin
      int x, y, sum;
      x = $urandom_range(0, 8191);
      y = (t % 4 == 0) ? ((x & ~31) | $urandom_range(0, 31)) : $urandom_range(0, 8191);
      if (t % 50 == 0) y = x;
      sum = x + y;
      // low digit
      @(negedge clk);
      lo = 1; a = HW'(x % 32); b = HW'(y % 32);
      #1 check(s == HW'(sum % 32), $sformatf("low digit %0d+%0d", x, y));
      // upper digit
      @(negedge clk);
      lo = 0; a = HW'(x / 32); b = HW'(y / 32);
      #1 check(s == HW'(sum / 32), $sformatf("upper digit %0d+%0d got %0d", x, y, s));
      check(gt == (x > y), $sformatf("compare %0d>%0d", x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
