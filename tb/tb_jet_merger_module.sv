// tb_jet_merger_module: random per-module jet multiplicities (mostly small,
// sometimes large enough to saturate) from eight modules; the crate counts
// must be their sums clipped at 7, one bunch crossing later.
module tb_jet_merger_module;
  import jep_pkg::*;
  logic clk = 0, rst = 1, ph = 0;
  logic [MULT_W-1:0] mult_in [8][N_JTHR];
  logic [MULT_W-1:0] mult [N_JTHR];
  int checks = 0, failures = 0, saturated = 0;

  always #5 clk = ~clk;

  jet_merger_module #(.N_JEM(8)) dut (.clk, .rst, .ph, .mult_in, .mult);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 8; m++)
      for (int k = 0; k < N_JTHR; k++) mult_in[m][k] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 1000; t++) begin
      int s [N_JTHR];
      @(negedge clk);
      ph = 1;
      for (int k = 0; k < N_JTHR; k++) begin
        s[k] = 0;
        for (int m = 0; m < 8; m++) begin
          int v;
          v = (t % 4 == 0) ? $urandom_range(0, 7) : ($urandom_range(0, 5) == 0);
          mult_in[m][k] = MULT_W'(v);
          s[k] += v;
        end
      end
      @(negedge clk);
      ph = 0;
      for (int k = 0; k < N_JTHR; k++) begin
        int e;
        e = (s[k] > 7) ? 7 : s[k];
        if (s[k] > 7) saturated++;
        checks++;
        if (int'(mult[k]) != e) begin
          failures++;
          $display("FAIL t=%0d k=%0d exp %0d got %0d", t, k, e, mult[k]);
        end
      end
    end
    checks++;
    if (saturated == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
