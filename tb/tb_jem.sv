// tb_jem: one Jet/Energy Sum Module with its eta neighbours' links driven
// by the testbench.  All eleven Energy Sum FPGAs get their own tables and
// noise thresholds, both Jet FPGAs the same eight jet combinations.  Random
// energies are driven every crossing; the module ET/EX/EY (core rows only)
// are checked four crossings later and the merged jet multiplicities five
// crossings later against the integer reference, built from the element
// ETs of this module plus the neighbour columns.  One Level-1 Accept is
// read from an Energy Sum FPGA and a Jet FPGA: both must return the same
// bunch crossing.
module tb_jem;
  import jep_pkg::*;
  import jep_ref_pkg::*;
  localparam int LATENCY = 100, SLICES = 5, NT = 140, ACC = NT - 10;
  logic clk = 0, rst = 1, ph = 0;
  logic [3:0] jem_id = 4'd2;
  logic [EM_W-1:0] em [11][N_EL], had [11][N_EL];
  cfg_wr_t cfg;
  logic [DIG_W-1:0] dig_out [11][N_EL], dig_lo [11], dig_hi [11][2];
  logic [JEM_ET_W-1:0] et;
  logic signed [JEM_XY_W-1:0] ex, ey;
  logic [MULT_W-1:0] mult [N_JTHR];
  logic l1a = 0;
  logic e_rd_valid [11], e_rd_ready [11], e_rd_last [11];
  logic [2*EM_W*N_EL-1:0] e_rd_data [11];
  logic j_rd_valid [2], j_rd_ready [2], j_rd_last [2];
  logic [16*(N_JTHR+1)-1:0] j_rd_data [2];
  logic l1a_lost;
  int checks = 0, failures = 0;
  int thr [8] = '{100, 400, 900, 1500, 2500, 3500, 5000, 200};
  int wsel [8] = '{0, 1, 2, 0, 1, 2, 2, 1};
  int n_mult = 0;

  always #5 clk = ~clk;

  jem dut (.clk, .rst, .ph, .jem_id, .em, .had, .cfg, .dig_out, .dig_lo, .dig_hi,
    .et, .ex, .ey, .mult, .l1a, .e_rd_valid, .e_rd_ready, .e_rd_data, .e_rd_last,
    .j_rd_valid, .j_rd_ready, .j_rd_data, .j_rd_last, .l1a_lost);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wr(logic [3:0] chip, logic [3:0] sub, int addr, int data);
    @(negedge clk);
    cfg = '{we: 1'b1, jem: jem_id, chip: chip, sub: sub, addr: 12'(addr), data: 16'(data)};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ethr(int f, int k);
    return (f * 7 + k * 3) % 50;
  endfunction

  // per crossing: element ET of eta columns -1..5 (index +1), phi rows 0..10
  int xet [NT + 6][7][11];
  int ein [NT + 6][11][N_EL], hin [NT + 6][11][N_EL];

  initial begin
    cfg = '0;
    for (int f = 0; f < 11; f++) begin
      e_rd_ready[f] = 0;
      dig_lo[f] = '0; dig_hi[f][0] = '0; dig_hi[f][1] = '0;
      for (int k = 0; k < N_EL; k++) begin
        em[f][k] = '0; had[f][k] = '0;
      end
    end
    j_rd_ready[0] = 0; j_rd_ready[1] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 11; f++) begin
      for (int tab = 0; tab < 3; tab++)
        for (int v = 0; v < 1024; v++) wr(4'(f), BCAST, tab * 1024 + v, lut_val(tab, f, v));
      for (int k = 0; k < N_EL; k++) begin
        wr(4'(f), SUB_REG, k, ethr(f, k));
        wr(4'(f), SUB_REG, k + N_EL, 20);
      end
    end
    for (int k = 0; k < 8; k++) begin
      wr(BCAST, SUB_REG, k, thr[k]);        // both Jet FPGAs (Energy Sum FPGAs ignore 8..15)
      wr(BCAST, SUB_REG, k + 8, wsel[k]);
    end
    // the broadcast above also wrote addr 0..7 of the Energy Sum FPGAs: restore
    for (int f = 0; f < 11; f++)
      for (int k = 0; k < N_EL; k++) begin
        wr(4'(f), SUB_REG, k, ethr(f, k));
        wr(4'(f), SUB_REG, k + N_EL, 20);
      end
    @(negedge clk);
    ph = 1;
    for (int t = 0; t < NT; t++) begin
      int dense;
      dense = t % 3;
      // energies of this crossing, and the neighbour columns' ETs
      for (int f = 0; f < 11; f++) begin
        for (int k = 0; k < N_EL; k++) begin
          int e, h;
          e = (dense == 0 || $urandom_range(0, 4) == 0) ? $urandom_range(0, 511) : $urandom_range(0, 30);
          h = (dense == 1) ? $urandom_range(0, 511) : $urandom_range(0, 60);
          ein[t][f][k] = e; hin[t][f][k] = h;
          xet[t][k + 1][f] = ((e > ethr(f, k)) ? e : 0) + ((h > 20) ? h : 0);
        end
        xet[t][0][f] = $urandom_range(0, 700);
        xet[t][5][f] = $urandom_range(0, 700);
        xet[t][6][f] = (dense == 2) ? 1023 : $urandom_range(0, 700);
      end
      @(negedge clk);                       // first cycle of crossing t
      ph = 0;
      l1a = (t == ACC);
      for (int f = 0; f < 11; f++) begin
        for (int k = 0; k < N_EL; k++) begin
          em[f][k] = EM_W'(ein[t][f][k]); had[f][k] = EM_W'(hin[t][f][k]);
        end
        if (t >= 2) begin
          dig_lo[f] = DIG_W'(xet[t-2][0][f] % 32);
          dig_hi[f][0] = DIG_W'(xet[t-2][5][f] % 32);
          dig_hi[f][1] = DIG_W'(xet[t-2][6][f] % 32);
        end
      end
      if (t >= 4) begin
        int st, sx, sy;
        st = 0; sx = 0; sy = 0;
        for (int f = 1; f <= 8; f++)
          for (int k = 0; k < N_EL; k++) begin
            st += lut_val(0, f, xet[t-4][k+1][f]);
            sx += lut_val(1, f, xet[t-4][k+1][f]);
            sy += lut_val(2, f, xet[t-4][k+1][f]);
          end
        check(int'(et) == st && int'(ex) == sx && int'(ey) == sy,
              $sformatf("module sums t=%0d exp %0d/%0d/%0d got %0d/%0d/%0d", t-4, st, sx, sy, et, ex, ey));
      end
      if (t >= 5) begin
        env_t x0, x1;
        int m0 [8], m1 [8], r, h [16];
        for (int e = 0; e < 5; e++)
          for (int f = 0; f < 11; f++) begin
            x0[e][f] = xet[t-5][e][f];
            x1[e][f] = xet[t-5][e+2][f];
          end
        ref_jet(x0, thr, wsel, m0, r, h);
        ref_jet(x1, thr, wsel, m1, r, h);
        for (int k = 0; k < 8; k++) begin
          int s;
          s = (m0[k] + m1[k] > 7) ? 7 : m0[k] + m1[k];
          check(int'(mult[k]) == s, $sformatf("mult t=%0d k=%0d exp %0d got %0d", t-5, k, s, mult[k]));
          if (s > 0) n_mult++;
        end
      end
      @(negedge clk);                       // second cycle
      ph = 1;
      if (t >= 2)
        for (int f = 0; f < 11; f++) begin
          dig_lo[f] = DIG_W'(xet[t-2][0][f] / 32);
          dig_hi[f][0] = DIG_W'(xet[t-2][5][f] / 32);
          dig_hi[f][1] = DIG_W'(xet[t-2][6][f] / 32);
        end
    end
    l1a = 0;
    // read the accept from Energy Sum FPGA 4 and Jet FPGA 1 (first slice,
    // then the accepted crossing in the middle)
    begin
      int c;
      env_t x1;
      int m1 [8], r, h [16];
      c = ACC - LATENCY - SLICES / 2;
      check(e_rd_valid[4] && j_rd_valid[1], "both FPGAs have an event");
      for (int k = 0; k < N_EL; k++)
        check(e_rd_data[4][2*EM_W*k +: 2*EM_W] == {EM_W'(ein[c][4][k]), EM_W'(hin[c][4][k])},
              "energy readout slice 0");
      for (int e = 0; e < 5; e++)
        for (int f = 0; f < 11; f++) x1[e][f] = xet[c][e+2][f];
      ref_jet(x1, thr, wsel, m1, r, h);
      check(int'(j_rd_data[1][15:0]) == r, $sformatf("jet readout slice 0 roi exp %h got %h", r, j_rd_data[1][15:0]));
    end
    check(!l1a_lost, "no accept lost");
    check(n_mult > 50, "jets found");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
