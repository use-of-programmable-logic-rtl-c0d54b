// tb_energy_sum_fpga: configures one Energy Sum FPGA over the configuration
// bus (tables by broadcast to all four elements, per-element noise
// thresholds), then drives random energies.  Checks the ET/EX/EY adder-tree
// outputs three crossings later, the 80 MHz digits of every element two
// crossings later, that writes to another chip or module are ignored, and
// the readout of one Level-1 Accept.
module tb_energy_sum_fpga;
  import jep_pkg::*;
  import jep_ref_pkg::*;
  localparam logic [3:0] CHIP = 4'd5;
  localparam int LATENCY = 100, SLICES = 5;
  logic clk = 0, rst = 1, ph = 0;
  logic [3:0] jem_id = 4'd3;
  logic [EM_W-1:0] em [N_EL], had [N_EL];
  cfg_wr_t cfg;
  logic [ESUM_ET_W-1:0] et_sum;
  logic signed [ESUM_XY_W-1:0] ex_sum, ey_sum;
  logic [DIG_W-1:0] jet_dig [N_EL];
  logic l1a = 0, rd_valid, rd_ready = 0, rd_last, l1a_lost;
  logic [2*EM_W*N_EL-1:0] rd_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  energy_sum_fpga #(.CHIP(CHIP)) dut (.clk, .rst, .ph, .jem_id, .em, .had, .cfg,
    .et_sum, .ex_sum, .ey_sum, .jet_dig, .l1a, .rd_valid, .rd_ready, .rd_data,
    .rd_last, .l1a_lost);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [3:0] jem, logic [3:0] chip, logic [3:0] sub, int addr, int data);
    @(negedge clk);
    cfg = '{we: 1'b1, jem: jem, chip: chip, sub: sub, addr: 12'(addr), data: 16'(data)};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  int thr_e [N_EL], thr_h [N_EL];
  int xe [$][N_EL], xh [$][N_EL];
  int et_hist [$][N_EL];

  initial begin
    cfg = '0;
    for (int k = 0; k < N_EL; k++) begin
      em[k] = '0; had[k] = '0;
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int tab = 0; tab < 3; tab++)
      for (int v = 0; v < 1024; v++)
        wr(4'd3, CHIP, BCAST, tab * 1024 + v, lut_val(tab, int'(CHIP), v));
    for (int k = 0; k < N_EL; k++) begin
      thr_e[k] = 10 * k + 3;
      thr_h[k] = 40 - 5 * k;
      wr(4'd3, CHIP, SUB_REG, k, thr_e[k]);
      wr(4'd3, CHIP, SUB_REG, k + N_EL, thr_h[k]);
    end
    // writes for other targets must not disturb this chip
    wr(4'd3, CHIP + 4'd1, SUB_REG, 0, 500);
    wr(4'd2, CHIP, BCAST, 5, 0);
    wr(4'd3, CHIP, SUB_REG, 9, 0);
    // align to the bunch-crossing phase: next cycle is ph == 0
    @(negedge clk);
    ph = 1;
    for (int t = 0; t < 270; t++) begin
      int e [N_EL], h [N_EL], x [N_EL];
      @(negedge clk);                     // ph == 0 cycle of crossing t
      ph = 0;
      l1a = (t == 250);
      for (int k = 0; k < N_EL; k++) begin
        e[k] = (t % 9 == 0) ? thr_e[k] : $urandom_range(0, 511);
        h[k] = $urandom_range(0, 511);
        em[k] = EM_W'(e[k]); had[k] = EM_W'(h[k]);
        x[k] = ((e[k] > thr_e[k]) ? e[k] : 0) + ((h[k] > thr_h[k]) ? h[k] : 0);
      end
      xe.push_back(e); xh.push_back(h); et_hist.push_back(x);
      if (t >= 2)
        for (int k = 0; k < N_EL; k++)
          check(jet_dig[k] == DIG_W'(et_hist[t-2][k] % 32), $sformatf("low digit t=%0d k=%0d", t, k));
      if (t >= 3) begin
        int st, sx, sy;
        st = 0; sx = 0; sy = 0;
        for (int k = 0; k < N_EL; k++) begin
          st += lut_val(0, int'(CHIP), et_hist[t-3][k]);
          sx += lut_val(1, int'(CHIP), et_hist[t-3][k]);
          sy += lut_val(2, int'(CHIP), et_hist[t-3][k]);
        end
        check(int'(et_sum) == st, $sformatf("et_sum t=%0d exp %0d got %0d", t, st, et_sum));
        check(int'(ex_sum) == sx, $sformatf("ex_sum t=%0d exp %0d got %0d", t, sx, ex_sum));
        check(int'(ey_sum) == sy, "ey_sum");
      end
      @(negedge clk);                     // ph == 1 cycle
      ph = 1;
      if (t >= 2)
        for (int k = 0; k < N_EL; k++)
          check(jet_dig[k] == DIG_W'(et_hist[t-2][k] / 32), "high digit");
    end
    l1a = 0;
    // readout of the accept issued at crossing 250, held until now
    check(rd_valid, "event waiting");
    begin
      int n;
      n = 0;
      while (n < SLICES) begin
        @(negedge clk);
        ph = ~ph;
        if (rd_valid) begin
          int c;
          c = 250 - LATENCY - SLICES / 2 + n;
          for (int k = 0; k < N_EL; k++)
            check(rd_data[2*EM_W*k +: 2*EM_W] == {EM_W'(xe[c][k]), EM_W'(xh[c][k])},
                  $sformatf("readout slice %0d element %0d", n, k));
          check(rd_last == (n == SLICES - 1), "rd_last");
          rd_ready = 1;
          n++;
        end
      end
    end
    check(!l1a_lost, "no accept lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
