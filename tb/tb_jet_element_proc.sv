// tb_jet_element_proc: loads the three lookup tables, then drives random
// EM/hadronic energies and noise thresholds one bunch crossing at a time.
// Checks the thresholded 10-bit ET one crossing later and the ET/EX/EY
// table outputs two crossings later against an integer model.
module tb_jet_element_proc;
  import jep_pkg::*;
  import jep_ref_pkg::*;
  localparam int ROW = 2;
  logic clk = 0, rst = 1, ce = 0;
  logic [EM_W-1:0] em, had, em_thr, had_thr;
  logic lw_en;
  logic [1:0] lw_tab;
  logic [ET_W-1:0] lw_idx;
  logic [15:0] lw_data;
  logic [ET_W-1:0] et;
  logic [LET_W-1:0] lut_et;
  logic signed [EXY_W-1:0] lut_ex, lut_ey;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  jet_element_proc dut (.clk, .rst, .ce, .em, .had, .em_thr, .had_thr,
    .lw_en, .lw_tab, .lw_idx, .lw_data, .et, .lut_et, .lut_ex, .lut_ey);

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
    int exp_et [$];
    em = '0; had = '0; em_thr = '0; had_thr = '0;
    lw_en = 0; lw_tab = '0; lw_idx = '0; lw_data = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int tab = 0; tab < 3; tab++)
      for (int v = 0; v < 1024; v++) begin
        @(negedge clk);
        lw_en = 1; lw_tab = 2'(tab); lw_idx = ET_W'(v); lw_data = 16'(lut_val(tab, ROW, v));
      end
    @(negedge clk);
    lw_en = 0;
    for (int t = 0; t < 600; t++) begin
      int e, h, te, th, x;
      e = $urandom_range(0, 511); h = $urandom_range(0, 511);
      te = (t % 3 == 0) ? 0 : $urandom_range(0, 300);
      th = (t % 5 == 0) ? 0 : $urandom_range(0, 300);
      if (t % 7 == 0) te = e;           // exactly at threshold: suppressed
      em = EM_W'(e); had = EM_W'(h); em_thr = EM_W'(te); had_thr = EM_W'(th);
      x = ((e > te) ? e : 0) + ((h > th) ? h : 0);
      exp_et.push_back(x);
      ce = 1;
      @(negedge clk);              // bunch-crossing edge
      ce = 0;
      em = $urandom; had = $urandom;  // ignored between crossings
      check(et == ET_W'(x), $sformatf("et t=%0d exp %0d got %0d", t, x, et));
      if (exp_et.size() > 1) begin
        int p;
        p = exp_et.pop_front();
        check(lut_et == LET_W'(lut_val(0, ROW, p)), "lut et");
        check(int'(lut_ex) == lut_val(1, ROW, p), $sformatf("lut ex of %0d: %0d", p, lut_ex));
        check(int'(lut_ey) == lut_val(2, ROW, p), "lut ey");
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
