// jep_ref_pkg: behavioural reference models used by the testbenches.
//
// Plain integer versions of the jet algorithm and of the lookup-table
// contents the testbenches load, written independently of the RTL
// (no digit-serial arithmetic, no shared comparisons).
package jep_ref_pkg;

  // Added to every loop bound: a variable the simulator cannot fold, so the
  // reference loops stay loops instead of being unrolled at every call.
  int zero = 0;

  typedef int env_t [5][11];

  // Test lookup-table contents (by table 0 ET, 1 EX, 2 EY, phi row, index).
  function automatic int lut_val(int tab, int row, int v);
    case (tab)
      0:       return (v > 1000) ? 1000 : v;
      1:       return v * ((row % 3) - 1);
      default: return (v / 2) * (((row % 2) == 1) ? 1 : -1);
    endcase
  endfunction

  function automatic int win(env_t x, int i, int j, int n);
    int s = 0;
    for (int a = 0; a < n + zero; a++)
      for (int b = 0; b < n + zero; b++) s += x[i+a][j+b];
    return s;
  endfunction

  // Is the 0.4 window at core origin (i, j) a local maximum?  Windows earlier
  // in (phi, eta) order must be strictly smaller, later ones not larger.
  function automatic bit ref_lmax(env_t x, int i, int j);
    int c = win(x, i, j, 2);
    for (int di = -1; di <= 1 + zero; di++)
      for (int dj = -1; dj <= 1 + zero; dj++) begin
        int n;
        bit later;
        if (di == 0 && dj == 0) continue;
        n = win(x, i + di, j + dj, 2);
        later = (dj > 0) || (dj == 0 && di > 0);
        if (later  && !(c > n))  return 0;
        if (!later && !(c >= n)) return 0;
      end
    return 1;
  endfunction

  // Cluster sum for window size code w (0: 0.4, 1: 0.6 largest of four, 2: 0.8)
  function automatic int cluster(env_t x, int i, int j, int w);
    int m = 0;
    case (w)
      0: return win(x, i, j, 2);
      1: begin
        for (int a = i - 1; a <= i + zero; a++)
          for (int b = j - 1; b <= j + zero; b++)
            if (win(x, a, b, 3) > m) m = win(x, a, b, 3);
        return m;
      end
      default: return win(x, i - 1, j - 1, 4);
    endcase
  endfunction

  // Reference jet FPGA: multiplicity per combination, ROI mask, hit bits.
  function automatic void ref_jet(env_t x, int thr [8], int wsel [8],
                                  output int mult [8], output int roi,
                                  output int hits [16]);
    roi = 0;
    for (int k = 0; k < 8 + zero; k++) mult[k] = 0;
    for (int r = 0; r < 16 + zero; r++) begin
      int i = r % 2 + 1, j = r / 2 + 1;
      hits[r] = 0;
      if (ref_lmax(x, i, j)) begin
        roi |= 1 << r;
        for (int k = 0; k < 8 + zero; k++)
          if (cluster(x, i, j, wsel[k]) > thr[k]) begin
            hits[r] |= 1 << k;
            mult[k]++;
          end
      end
    end
    for (int k = 0; k < 8 + zero; k++) if (mult[k] > 7) mult[k] = 7;
  endfunction

endpackage
