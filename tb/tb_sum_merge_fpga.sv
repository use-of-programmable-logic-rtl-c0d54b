// tb_sum_merge_fpga: random signed and unsigned partial sums from eight
// Energy Sum FPGAs (including the extremes of their ranges); the module
// totals must appear one bunch crossing later and hold between crossings.
module tb_sum_merge_fpga;
  import jep_pkg::*;
  logic clk = 0, rst = 1, ph = 0;
  logic [ESUM_ET_W-1:0] et_in [8];
  logic signed [ESUM_XY_W-1:0] ex_in [8], ey_in [8];
  logic [JEM_ET_W-1:0] et;
  logic signed [JEM_XY_W-1:0] ex, ey;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sum_merge_fpga #(.N_IN(8)) dut (.clk, .rst, .ph, .et_in, .ex_in, .ey_in, .et, .ex, .ey);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pt, px, py;
    for (int k = 0; k < 8; k++) begin
      et_in[k] = '0; ex_in[k] = '0; ey_in[k] = '0;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    pt = 0; px = 0; py = 0;
    for (int t = 0; t < 500; t++) begin
      int st, sx, sy;
      @(negedge clk);
      ph = 1;
      st = 0; sx = 0; sy = 0;
      for (int k = 0; k < 8; k++) begin
        int a, b, c;
        a = (t % 10 == 0) ? 4092 : $urandom_range(0, 4092);
        b = (t % 10 == 1) ? -4092 : (t % 10 == 2) ? 4092 : int'($urandom_range(0, 8184)) - 4092;
        c = int'($urandom_range(0, 8184)) - 4092;
        et_in[k] = ESUM_ET_W'(a); ex_in[k] = ESUM_XY_W'(b); ey_in[k] = ESUM_XY_W'(c);
        st += a; sx += b; sy += c;
      end
      @(negedge clk);
      ph = 0;
      check(int'(et) == st && int'(ex) == sx && int'(ey) == sy,
            $sformatf("t=%0d sums %0d %0d %0d exp %0d %0d %0d", t, et, ex, ey, st, sx, sy));
      for (int k = 0; k < 8; k++) et_in[k] = $urandom;
      @(negedge clk);
      check(int'(et) == st, "held between crossings");
      ph = 1;
      for (int k = 0; k < 8; k++) et_in[k] = '0;
      // one idle crossing with zero ET keeps the pattern simple
      @(negedge clk);
      ph = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
