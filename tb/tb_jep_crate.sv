// tb_jep_crate: end-to-end test of one crate at its default size (eight
// modules, 32 x 8 core jet elements plus phi environment rows).
//
// The testbench programs every table and threshold over the configuration
// bus, then drives random calorimeter energies each bunch crossing.  An
// integer model computes, per crossing, the thresholded element ETs, the
// crate ET/EX/EY and energy trigger bits, and the jet multiplicities of all
// sixteen Jet FPGAs (using the neighbouring modules' columns, zeros beyond
// the ends) merged into crate counts; all are compared with the outputs at
// their documented latencies.  Level-1 Accepts are issued and the readout
// of every FPGA drained and partly compared; a final burst of accepts with
// the readout stopped must overflow the readout queues.
//
// Each mechanism is counted and must occur at least once: noise
// suppression, jets that depend on a neighbouring module's data, equal
// neighbouring windows (tie rule), hits with each window size, crate
// multiplicity saturation, total-ET and missing-ET bits both set and clear,
// events read out, and accepts lost to overflow.
module tb_jep_crate;
  import jep_pkg::*;
  import jep_ref_pkg::*;
  localparam int NJ = 8, LATENCY = 100, SLICES = 5, NT = 260;
  localparam int NETA = 4 * NJ;
  logic clk = 0, rst = 1;
  logic bc;
  logic [EM_W-1:0] em [NJ][11][N_EL], had [NJ][11][N_EL];
  cfg_wr_t cfg;
  logic [MULT_W-1:0] jet_mult [N_JTHR];
  logic [CR_ET_W-1:0] et;
  logic signed [CR_XY_W-1:0] ex, ey;
  logic [N_ETTHR-1:0] et_hits;
  logic [N_METHR-1:0] met_hits;
  logic l1a = 0;
  logic e_rd_valid [NJ][11], e_rd_ready [NJ][11], e_rd_last [NJ][11];
  logic [2*EM_W*N_EL-1:0] e_rd_data [NJ][11];
  logic j_rd_valid [NJ][2], j_rd_ready [NJ][2], j_rd_last [NJ][2];
  logic [16*(N_JTHR+1)-1:0] j_rd_data [NJ][2];
  logic l1a_lost;

  int checks = 0, failures = 0;
  int thr [8] = '{150, 500, 1200, 2000, 3000, 4000, 6000, 300};
  int wsel [8] = '{0, 1, 2, 0, 1, 2, 2, 1};
  int et_thr [4] = '{20000, 40000, 55000, 65000};
  int met_thr [4] = '{3000, 8000, 16000, 30000};

  // mechanism counters
  int c_noise = 0, c_neigh = 0, c_tie = 0, c_win [3] = '{0, 0, 0}, c_sat = 0;
  int c_et1 = 0, c_et0 = 0, c_met1 = 0, c_met0 = 0, c_words = 0, c_lost = 0, c_events = 0;

  always #5 clk = ~clk;

  jep_crate dut (.clk, .rst, .bc, .em, .had, .cfg, .jet_mult, .et, .ex, .ey,
    .et_hits, .met_hits, .l1a, .e_rd_valid, .e_rd_ready, .e_rd_data, .e_rd_last,
    .j_rd_valid, .j_rd_ready, .j_rd_data, .j_rd_last, .l1a_lost);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic wr(logic [3:0] jem, logic [3:0] chip, logic [3:0] sub, int addr, int data);
    @(negedge clk);
    cfg = '{we: 1'b1, jem: jem, chip: chip, sub: sub, addr: 12'(addr), data: 16'(data)};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ethr(int f, int k);
    return (f * 7 + k * 3) % 50;
  endfunction

  // model state per crossing
  int xg [NT][NETA][11];            // element ET, global eta, phi row
  int ein [NT][NJ][11][N_EL], hin [NT][NJ][11][N_EL];
  int r_et [NT], r_ex [NT], r_ey [NT];
  int r_mult [NT][8];
  int r_roi [NT][NJ][2];

  // accepted crossings of the main run, and readout positions of the two
  // streams whose contents are compared
  int acc [$];
  int ev_e = 0, sl_e = 0, ev_j = 0, sl_j = 0;

  // count readout words on every stream; compare module 3 Energy Sum FPGA 5
  // and module 5 Jet FPGA 0 word by word.  Sampled just after the falling
  // edge, when the inputs for the next rising edge are settled.
  always @(negedge clk) begin
    #1;
    if (e_rd_valid[3][5] && e_rd_ready[3][5]) begin
      if (ev_e < acc.size() && acc[ev_e] < NT) begin
        int c;
        c = acc[ev_e] - LATENCY - SLICES / 2 + sl_e;
        for (int k = 0; k < N_EL; k++)
          check(e_rd_data[3][5][2*EM_W*k +: 2*EM_W] == {EM_W'(ein[c][3][5][k]), EM_W'(hin[c][3][5][k])},
                $sformatf("energy readout event %0d slice %0d", ev_e, sl_e));
      end
      if (e_rd_last[3][5]) begin
        ev_e++;
        sl_e = 0;
      end else sl_e++;
    end
    if (j_rd_valid[5][0] && j_rd_ready[5][0]) begin
      if (ev_j < acc.size() && acc[ev_j] < NT) begin
        int c;
        c = acc[ev_j] - LATENCY - SLICES / 2 + sl_j;
        check(int'(j_rd_data[5][0][15:0]) == r_roi[c][5][0],
              $sformatf("jet readout event %0d slice %0d", ev_j, sl_j));
      end
      if (j_rd_last[5][0]) begin
        ev_j++;
        sl_j = 0;
      end else sl_j++;
    end
  end

  always @(negedge clk) begin
    #1;
    for (int m = 0; m < NJ + zero; m++) begin
      for (int f = 0; f < 11 + zero; f++)
        if (e_rd_valid[m][f] && e_rd_ready[m][f]) begin
          c_words++;
          if (e_rd_last[m][f]) c_events++;
        end
      for (int g = 0; g < 2 + zero; g++)
        if (j_rd_valid[m][g] && j_rd_ready[m][g]) begin
          c_words++;
          if (j_rd_last[m][g]) c_events++;
        end
    end
    if (!rst && l1a_lost) c_lost++;
  end

  task automatic set_ready(bit v);
    for (int m = 0; m < NJ + zero; m++) begin
      for (int f = 0; f < 11 + zero; f++) e_rd_ready[m][f] = v;
      for (int g = 0; g < 2 + zero; g++) j_rd_ready[m][g] = v;
    end
  endtask

  // jet environment of FPGA g of module m at crossing t
  function automatic env_t jenv(int t, int m, int g, bit no_neigh);
    env_t x;
    for (int e = 0; e < 5 + zero; e++) begin
      int ge, own_lo, own_hi;
      ge = 4 * m + e - 1 + 2 * g;
      own_lo = 4 * m; own_hi = 4 * m + 3;
      for (int f = 0; f < 11 + zero; f++) begin
        if (ge < 0 || ge >= NETA) x[e][f] = 0;
        else if (no_neigh && (ge < own_lo || ge > own_hi)) x[e][f] = 0;
        else x[e][f] = xg[t][ge][f];
      end
    end
    return x;
  endfunction

  task automatic model(int t);
    int st, sx, sy;
    st = 0; sx = 0; sy = 0;
    for (int k = 0; k < 8 + zero; k++) r_mult[t][k] = 0;
    for (int ge = 0; ge < NETA + zero; ge++)
      for (int f = 1; f <= 8 + zero; f++) begin
        st += lut_val(0, f, xg[t][ge][f]);
        sx += lut_val(1, f, xg[t][ge][f]);
        sy += lut_val(2, f, xg[t][ge][f]);
      end
    r_et[t] = st; r_ex[t] = sx; r_ey[t] = sy;
    for (int m = 0; m < NJ + zero; m++)
      for (int g = 0; g < 2 + zero; g++) begin
        env_t x, xn;
        int mm [8], mn [8], r, rn, h [16], hn [16];
        x = jenv(t, m, g, 0);
        xn = jenv(t, m, g, 1);
        ref_jet(x, thr, wsel, mm, r, h);
        ref_jet(xn, thr, wsel, mn, rn, hn);
        r_roi[t][m][g] = r;
        if (mm != mn || r != rn) c_neigh++;
        for (int k = 0; k < 8 + zero; k++) begin
          r_mult[t][k] += mm[k];
          if (mm[k] > 0) c_win[wsel[k]]++;
        end
        // equal neighbouring 0.4 windows with something in them
        for (int i = 1; i <= 2 + zero; i++)
          for (int j = 1; j <= 8 + zero; j++)
            if (win(x, i, j, 2) > 0 && (win(x, i, j, 2) == win(x, i + 1, j, 2) ||
                                        win(x, i, j, 2) == win(x, i, j + 1, 2))) c_tie++;
      end
    for (int k = 0; k < 8 + zero; k++)
      if (r_mult[t][k] > 7) begin
        r_mult[t][k] = 7;
        c_sat++;
      end
  endtask

  initial begin
    cfg = '0;
    set_ready(0);
    for (int m = 0; m < NJ + zero; m++)
      for (int f = 0; f < 11 + zero; f++)
        for (int k = 0; k < N_EL + zero; k++) begin
          em[m][f][k] = '0; had[m][f][k] = '0;
        end
    repeat (3) @(negedge clk);
    rst = 0;
    // configuration: tables are the same for all modules (same phi rows)
    for (int f = 0; f < 11 + zero; f++) begin
      for (int tab = 0; tab < 3 + zero; tab++)
        for (int v = 0; v < 1024 + zero; v++) wr(BCAST, 4'(f), BCAST, tab * 1024 + v, lut_val(tab, f, v));
      for (int k = 0; k < N_EL + zero; k++) begin
        wr(BCAST, 4'(f), SUB_REG, k, ethr(f, k));
        wr(BCAST, 4'(f), SUB_REG, k + N_EL, 20);
      end
    end
    for (int g = 0; g < 2 + zero; g++)
      for (int k = 0; k < 8 + zero; k++) begin
        wr(BCAST, CHIP_JET0 + 4'(g), SUB_REG, k, thr[k]);
        wr(BCAST, CHIP_JET0 + 4'(g), SUB_REG, k + 8, wsel[k]);
      end
    for (int k = 0; k < 4 + zero; k++) begin
      wr(MERGER_ID, CHIP_SMM, SUB_REG, k, et_thr[k]);
      wr(MERGER_ID, CHIP_SMM, SUB_REG, k + 4, met_thr[k]);
    end
    set_ready(1);
    // align: next negedge starts the first cycle of a crossing
    while (bc !== 1'b1) @(negedge clk);
    for (int t = 0; t < NT + zero; t++) begin
      int style;
      style = t % 5;
      for (int m = 0; m < NJ + zero; m++)
        for (int f = 0; f < 11 + zero; f++)
          for (int k = 0; k < N_EL + zero; k++) begin
            int e, h;
            case (style)
              0: begin e = $urandom_range(0, 60); h = $urandom_range(0, 60); end
              1: begin
                e = ($urandom_range(0, 9) == 0) ? $urandom_range(0, 511) : $urandom_range(0, 40);
                h = ($urandom_range(0, 9) == 0) ? $urandom_range(0, 511) : $urandom_range(0, 40);
              end
              2: begin e = ($urandom_range(0, 2) == 0) ? 300 : 0; h = 0; end
              3: begin e = $urandom_range(0, 511); h = $urandom_range(0, 511); end
              default: begin
                // one module-boundary jet per module pair, rest quiet
                e = (k == 0 && f == 4 && m % 2 == 1) ? 500 : $urandom_range(0, 20);
                h = (k == 0 && f == 4 && m % 2 == 1) ? 400 : 0;
              end
            endcase
            ein[t][m][f][k] = e; hin[t][m][f][k] = h;
            if ((e > 0 && e <= ethr(f, k)) || (h > 0 && h <= 20)) c_noise++;
            xg[t][4 * m + k][f] = ((e > ethr(f, k)) ? e : 0) + ((h > 20) ? h : 0);
          end
      model(t);
      @(negedge clk);                   // first cycle of crossing t
      for (int m = 0; m < NJ + zero; m++)
        for (int f = 0; f < 11 + zero; f++)
          for (int k = 0; k < N_EL + zero; k++) begin
            em[m][f][k] = EM_W'(ein[t][m][f][k]);
            had[m][f][k] = EM_W'(hin[t][m][f][k]);
          end
      l1a = (t > LATENCY + 10 && t % 37 == 0);
      if (l1a) acc.push_back(t);
      if (t >= 6) begin
        check(int'(et) == r_et[t-6] && int'(ex) == r_ex[t-6] && int'(ey) == r_ey[t-6],
              $sformatf("crate sums t=%0d exp %0d/%0d/%0d got %0d/%0d/%0d",
                        t-6, r_et[t-6], r_ex[t-6], r_ey[t-6], et, ex, ey));
        for (int k = 0; k < 8 + zero; k++)
          check(int'(jet_mult[k]) == r_mult[t-6][k],
                $sformatf("jet mult t=%0d k=%0d exp %0d got %0d", t-6, k, r_mult[t-6][k], jet_mult[k]));
      end
      if (t >= 7) begin
        longint msq;
        msq = longint'(r_ex[t-7]) * r_ex[t-7] + longint'(r_ey[t-7]) * r_ey[t-7];
        for (int k = 0; k < 4 + zero; k++) begin
          check(et_hits[k] == (r_et[t-7] > et_thr[k]), $sformatf("et hit %0d t=%0d", k, t-7));
          check(met_hits[k] == (msq > longint'(met_thr[k]) * met_thr[k]), $sformatf("met hit %0d", k));
          if (et_hits[k]) c_et1++; else c_et0++;
          if (met_hits[k]) c_met1++; else c_met0++;
        end
      end
      @(negedge clk);                   // second cycle
    end
    @(negedge clk);
    l1a = 0;
    // drain
    repeat (100) @(negedge clk);
    check(c_events == acc.size() * NJ * 13, $sformatf("events read %0d exp %0d", c_events, acc.size() * NJ * 13));
    check(ev_e == acc.size() && ev_j == acc.size(), "compared streams complete");
    // overflow: readout stopped, eleven accepts in a row
    set_ready(0);
    while (bc !== 1'b1) @(negedge clk);
    for (int a = 0; a < 11 + zero; a++) begin
      @(negedge clk);
      l1a = 1;
      acc.push_back(NT);
      @(negedge clk);
    end
    @(negedge clk);
    l1a = 0;
    repeat (4) @(negedge clk);
    set_ready(1);
    repeat (200) @(negedge clk);
    check(c_events == (acc.size() - 2) * NJ * 13, $sformatf("events after overflow %0d", c_events));
    $display("mechanisms: noise=%0d neighbour=%0d tie=%0d win04=%0d win06=%0d win08=%0d sat=%0d et=%0d/%0d met=%0d/%0d words=%0d lost=%0d",
             c_noise, c_neigh, c_tie, c_win[0], c_win[1], c_win[2], c_sat, c_et1, c_et0, c_met1, c_met0, c_words, c_lost);
    check(c_noise > 0, "noise suppression happened");
    check(c_neigh > 0, "neighbour data changed a jet result");
    check(c_tie > 0, "equal neighbouring windows occurred");
    check(c_win[0] > 0 && c_win[1] > 0 && c_win[2] > 0, "hits with all window sizes");
    check(c_sat > 0, "crate multiplicity saturated");
    check(c_et1 > 0 && c_et0 > 0, "total-ET bits set and clear");
    check(c_met1 > 0 && c_met0 > 0, "missing-ET bits set and clear");
    check(c_words > 0, "readout words");
    check(c_lost > 0, "accepts lost on overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
