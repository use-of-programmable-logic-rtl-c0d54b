// tb_jet_fpga: drives random 5 x 11 jet-element environments into one Jet
// FPGA over its 80 MHz 5-bit links (low digit in the first cycle of a
// crossing, high digit in the second), with eight threshold / window-size
// combinations covering all three window sizes.  The environments mix
// sparse deposits, dense random fields, flat plateaus (equal neighbouring
// windows, to exercise the tie rule) and saturated elements.  The ROI mask,
// per-ROI hit bits and multiplicities are checked against the integer
// reference model two crossings after the data, and one Level-1 Accept is
// read out and compared.
module tb_jet_fpga;
  import jep_pkg::*;
  import jep_ref_pkg::*;
  localparam int LATENCY = 100, SLICES = 5, NT = 400;
  logic clk = 0, rst = 1, ph = 0;
  logic [3:0] jem_id = 4'd6;
  logic [DIG_W-1:0] din [5][11];
  cfg_wr_t cfg;
  logic [MULT_W-1:0] mult [N_JTHR];
  logic [15:0] roi;
  logic [N_JTHR-1:0] roi_hits [16];
  logic l1a = 0, rd_valid, rd_ready = 0, rd_last, l1a_lost;
  logic [16*(N_JTHR+1)-1:0] rd_data;
  int checks = 0, failures = 0;
  int thr [8] = '{100, 300, 800, 1500, 2500, 4000, 6000, 1000};
  int wsel [8] = '{0, 1, 2, 0, 1, 2, 2, 1};
  int n_roi = 0, n_sat = 0, n_hit [3] = '{0, 0, 0};

  always #5 clk = ~clk;

  jet_fpga #(.CHIP(CHIP_JET0 + 4'd1)) dut (.clk, .rst, .ph, .jem_id, .din, .cfg,
    .mult, .roi, .roi_hits, .l1a, .rd_valid, .rd_ready, .rd_data, .rd_last, .l1a_lost);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wr(int addr, int data);
    @(negedge clk);
    cfg = '{we: 1'b1, jem: jem_id, chip: CHIP_JET0 + 4'd1, sub: SUB_REG, addr: 12'(addr), data: 16'(data)};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  env_t hist [NT];
  int exp_roi [NT];
  int exp_hits [NT][16];

  initial begin
    cfg = '0;
    for (int e = 0; e < 5; e++)
      for (int f = 0; f < 11; f++) din[e][f] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 8; k++) begin
      wr(k, thr[k]);
      wr(k + 8, wsel[k]);
    end
    wr(12'h100, 0);                     // unused address
    @(negedge clk);
    ph = 1;
    for (int t = 0; t < NT + 2; t++) begin
      env_t x;
      int mode;
      mode = t % 4;
      for (int e = 0; e < 5; e++)
        for (int f = 0; f < 11; f++) begin
          case (mode)
            0: x[e][f] = ($urandom_range(0, 5) == 0) ? $urandom_range(0, 1023) : 0;
            1: x[e][f] = $urandom_range(0, 300);
            2: x[e][f] = ($urandom_range(0, 2) == 0) ? 200 : 0;
            default: x[e][f] = ($urandom_range(0, 3) == 0) ? 1023 : $urandom_range(0, 40);
          endcase
        end
      if (t == 7)
        for (int e = 0; e < 5; e++)
          for (int f = 0; f < 11; f++) x[e][f] = 1023;
      if (t < NT) begin
        int m [8];
        hist[t] = x;
        ref_jet(x, thr, wsel, m, exp_roi[t], exp_hits[t]);
      end
      // first cycle: low digits; check results of crossing t-2
      @(negedge clk);
      ph = 0;
      l1a = (t == NT - 10);
      for (int e = 0; e < 5; e++)
        for (int f = 0; f < 11; f++) din[e][f] = DIG_W'(x[e][f] % 32);
      if (t >= 2 && t - 2 < NT) begin
        int c, m [8], r, h [16];
        c = t - 2;
        ref_jet(hist[c], thr, wsel, m, r, h);
        check(int'(roi) == r, $sformatf("roi t=%0d exp %h got %h", c, r, roi));
        for (int q = 0; q < 16; q++)
          check(int'(roi_hits[q]) == h[q], $sformatf("hits t=%0d roi %0d exp %h got %h", c, q, h[q], roi_hits[q]));
        for (int k = 0; k < 8; k++) begin
          check(int'(mult[k]) == m[k], $sformatf("mult t=%0d k=%0d exp %0d got %0d", c, k, m[k], mult[k]));
          if (m[k] >= 3) n_sat++;
          if (m[k] > 0) n_hit[wsel[k]]++;
        end
        n_roi += $countones(r);
      end
      // second cycle: high digits
      @(negedge clk);
      ph = 1;
      for (int e = 0; e < 5; e++)
        for (int f = 0; f < 11; f++) din[e][f] = DIG_W'(x[e][f] / 32);
    end
    l1a = 0;
    // readout of the accept at crossing NT-10
    begin
      int n;
      n = 0;
      while (n < SLICES) begin
        @(negedge clk);
        ph = ~ph;
        if (rd_valid) begin
          int c;
          c = NT - 10 - LATENCY - SLICES / 2 + n;
          check(int'(rd_data[15:0]) == exp_roi[c], $sformatf("readout roi slice %0d", n));
          for (int q = 0; q < 16; q++)
            check(int'(rd_data[16 + 8*q +: 8]) == exp_hits[c][q], "readout hits");
          check(rd_last == (n == SLICES - 1), "rd_last");
          rd_ready = 1;
          n++;
        end
      end
    end
    check(n_roi > 100, $sformatf("ROIs found: %0d", n_roi));
    check(n_sat > 0, "multiplicities of 3 or more");
    check(n_hit[0] > 0 && n_hit[1] > 0 && n_hit[2] > 0, "hits with every window size");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
