// jet_fpga: the jet algorithm for a 2 x 8 (eta x phi) core of jet elements.
//
// Input: the 10-bit ET of the 5 x 11 jet elements around the core, each on
// its own 5-bit 80 MHz link (low digit, then high digit).  Environment index
// (e, f): the core is e = 1..2, f = 1..8; e = 0 and f = 0 are the elements
// just below the core, e = 3..4 and f = 9..10 the two just above.
//
// How it works.  All arithmetic is "5-bit serial": every value travels as a
// low digit and an upper digit in two consecutive 80 MHz cycles, and every
// adder and comparator works on one digit per cycle (serial5_add,
// serial5_cmp), storing only a carry or a partial comparison in between.
//  * 0.4 x 0.4 window sums (2 x 2 elements) at every origin (i, j),
//    i = 0..3, j = 0..9, built from shared vertical pair sums.
//  * A core window (i = 1..2, j = 1..8) is a local maximum, i.e. an ROI,
//    when its sum beats all eight neighbouring 0.4 windows.  Each neighbour
//    pair is compared once and the one result serves both windows: the
//    window earlier in (phi, eta) order must be strictly greater, the later
//    one greater or equal, so that two equal windows never both win.
//  * For each ROI the cluster sums are formed: the 0.4 window itself; the
//    0.8 window (4 x 4, the ROI in its centre) as the sum of four 0.4
//    windows; and the four 0.6 windows (3 x 3) that contain the ROI.
//  * Eight programmable (threshold, window size) combinations.  A
//    combination is passed by an ROI when its selected cluster sum exceeds
//    the threshold; for 0.6, when any of the four 3 x 3 windows does (which
//    equals comparing the largest of them).  Only ROIs are counted.
//  * Output: per combination the number of passing ROIs, saturating at 7,
//    plus the ROI flags and per-ROI hit bits, which are also stored in a
//    readout pipeline for the Level-2 ROI Builder.
// The window geometry, local-maximum declustering, shared comparisons,
// 5-bit serial arithmetic and eight combinations follow the published
// algorithm.  The tie rule, the saturating 3-bit counts, the register map
// and the readout format are this design's choices.
//
// Readout: LATENCY counts crossings from the crossing whose digits arrive on
// `din` to its Level-1 Accept; the stored word is {hit bits of ROI 15..0,
// ROI mask}, SLICES crossings centred on the accepted one.
//
// Configuration (cfg, jem/chip match, sub = SUB_REG): addr k = 0..7 threshold of
// combination k (14 bits, reset to 0x3FFF = never passed), addr 8+k its
// window size (win_e, reset to 0.4).
//
// Timing: `ph` is the transmitter's phase.  The input registers hold the
// low digit in ph==1 cycles and the upper digit in ph==0 cycles.  ROI and
// hit results are registered at the end of the upper-digit cycle and the
// outputs on the following bunch-crossing edge (ph==1), i.e. three 80 MHz
// edges after the low digit is on `din`.
module jet_fpga
  import jep_pkg::*;
#(
  parameter logic [3:0] CHIP    = CHIP_JET0,
  parameter int         DEPTH   = 128,
  parameter int         LATENCY = 100,
  parameter int         SLICES  = 5
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ph,
  input  logic [3:0]        jem_id,
  input  logic [DIG_W-1:0]  din [5][11],
  input  cfg_wr_t           cfg,
  output logic [MULT_W-1:0] mult [N_JTHR],
  output logic [15:0]       roi,            // bit r = (f-1)*2 + (e-1)
  output logic [N_JTHR-1:0] roi_hits [16],
  input  logic              l1a,
  output logic              rd_valid,
  input  logic              rd_ready,
  output logic [16*(N_JTHR+1)-1:0] rd_data,
  output logic              rd_last,
  output logic              l1a_lost
);
  localparam int HW = HI_W;
  localparam int NE = 5, NF = 11;
  localparam int NR = 16;

  logic lo;
  assign lo = ph;

  // ---------------- configuration ----------------
  logic [WSUM_W-1:0] thr [N_JTHR];
  win_e              wsel [N_JTHR];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N_JTHR; k++) begin
        thr[k]  <= '1;
        wsel[k] <= WIN_04;
      end
    end else if (cfg_hit(cfg, jem_id, CHIP) && cfg.sub == SUB_REG) begin
      for (int k = 0; k < N_JTHR; k++) begin
        if (cfg.addr == 12'(k))          thr[k]  <= cfg.data[WSUM_W-1:0];
        if (cfg.addr == 12'(k + N_JTHR)) wsel[k] <= win_e'(cfg.data[1:0]);
      end
    end
  end

  // threshold digits for the current cycle
  logic [HW-1:0] thr_d [N_JTHR];
  always_comb
    for (int k = 0; k < N_JTHR; k++)
      thr_d[k] = lo ? HW'(thr[k][DIG_W-1:0]) : HW'(thr[k][WSUM_W-1:DIG_W]);

  // ---------------- input registers ----------------
  logic [DIG_W-1:0] rx [NE][NF];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int e = 0; e < NE; e++)
        for (int f = 0; f < NF; f++) rx[e][f] <= '0;
    end else begin
      rx <= din;
    end
  end

  // ---------------- window sums (serial) ----------------
  logic [HW-1:0] x   [NE][NF];
  logic [HW-1:0] vp  [NE-1][NF];   // x[e][f] + x[e+1][f]
  logic [HW-1:0] vt  [NE-2][NF];   // vp[e][f] + x[e+2][f]
  logic [HW-1:0] w4  [NE-1][NF-1]; // 0.4 windows, origin (i, j)
  logic [HW-1:0] w9a [NE-2][NF-2];
  logic [HW-1:0] w9  [NE-2][NF-2]; // 0.6 windows, origin (a, b)

  for (genvar e = 0; e < NE; e++) begin : g_x
    for (genvar f = 0; f < NF; f++) begin : g_xf
      assign x[e][f] = HW'(rx[e][f]);
    end
  end

  for (genvar e = 0; e < NE - 1; e++) begin : g_vp
    for (genvar f = 0; f < NF; f++) begin : g_vpf
      serial5_add #(.HW(HW)) u_add (.clk, .rst, .lo, .a(x[e][f]), .b(x[e+1][f]), .s(vp[e][f]));
    end
  end

  for (genvar e = 0; e < NE - 2; e++) begin : g_vt
    for (genvar f = 0; f < NF; f++) begin : g_vtf
      serial5_add #(.HW(HW)) u_add (.clk, .rst, .lo, .a(vp[e][f]), .b(x[e+2][f]), .s(vt[e][f]));
    end
  end

  for (genvar i = 0; i < NE - 1; i++) begin : g_w4
    for (genvar j = 0; j < NF - 1; j++) begin : g_w4f
      serial5_add #(.HW(HW)) u_add (.clk, .rst, .lo, .a(vp[i][j]), .b(vp[i][j+1]), .s(w4[i][j]));
    end
  end

  for (genvar a = 0; a < NE - 2; a++) begin : g_w9
    for (genvar b = 0; b < NF - 2; b++) begin : g_w9f
      serial5_add #(.HW(HW)) u_add1 (.clk, .rst, .lo, .a(vt[a][b]), .b(vt[a][b+1]), .s(w9a[a][b]));
      serial5_add #(.HW(HW)) u_add2 (.clk, .rst, .lo, .a(w9a[a][b]), .b(vt[a][b+2]), .s(w9[a][b]));
    end
  end

  // ---------------- local maxima with shared comparisons ----------------
  // gt[i][j][d] = w4[i][j] > w4 of the forward neighbour in direction d:
  // d=0 (+1,0)  d=1 (-1,+1)  d=2 (0,+1)  d=3 (+1,+1)
  localparam int DI [4] = '{1, -1, 0, 1};
  localparam int DJ [4] = '{0,  1, 1, 1};

  function automatic bit is_core(int i, int j);
    return i >= 1 && i <= 2 && j >= 1 && j <= 8;
  endfunction

  logic gt [NE-1][NF-1][4];

  for (genvar i = 0; i < NE - 1; i++) begin : g_cmp
    for (genvar j = 0; j < NF - 1; j++) begin : g_cmpj
      for (genvar d = 0; d < 4; d++) begin : g_cmpd
        if (i + DI[d] >= 0 && i + DI[d] < NE - 1 && j + DJ[d] < NF - 1 &&
            (is_core(i, j) || is_core(i + DI[d], j + DJ[d]))) begin : g_on
          serial5_cmp #(.HW(HW)) u_cmp (.clk, .rst, .lo,
            .a(w4[i][j]), .b(w4[i+DI[d]][j+DJ[d]]), .gt(gt[i][j][d]));
        end else begin : g_off
          assign gt[i][j][d] = 1'b0;
        end
      end
    end
  end

  logic lmax [NR];
  logic pass [NR][N_JTHR];

  for (genvar r = 0; r < NR; r++) begin : g_roi
    localparam int I = r % 2 + 1;
    localparam int J = r / 2 + 1;

    assign lmax[r] = gt[I][J][0] && gt[I][J][1] && gt[I][J][2] && gt[I][J][3] &&
                     !gt[I-1][J][0] && !gt[I+1][J-1][1] && !gt[I][J-1][2] && !gt[I-1][J-1][3];

    // 0.8 window: four 0.4 windows around the ROI
    logic [HW-1:0] s8a, s8b, w16;
    serial5_add #(.HW(HW)) u_a8a (.clk, .rst, .lo, .a(w4[I-1][J-1]), .b(w4[I+1][J-1]), .s(s8a));
    serial5_add #(.HW(HW)) u_a8b (.clk, .rst, .lo, .a(w4[I-1][J+1]), .b(w4[I+1][J+1]), .s(s8b));
    serial5_add #(.HW(HW)) u_a8  (.clk, .rst, .lo, .a(s8a), .b(s8b), .s(w16));

    for (genvar k = 0; k < N_JTHR; k++) begin : g_thr
      logic p4, p8, p6a, p6b, p6c, p6d;
      serial5_cmp #(.HW(HW)) u_c4  (.clk, .rst, .lo, .a(w4[I][J]),     .b(thr_d[k]), .gt(p4));
      serial5_cmp #(.HW(HW)) u_c8  (.clk, .rst, .lo, .a(w16),          .b(thr_d[k]), .gt(p8));
      serial5_cmp #(.HW(HW)) u_c6a (.clk, .rst, .lo, .a(w9[I-1][J-1]), .b(thr_d[k]), .gt(p6a));
      serial5_cmp #(.HW(HW)) u_c6b (.clk, .rst, .lo, .a(w9[I][J-1]),   .b(thr_d[k]), .gt(p6b));
      serial5_cmp #(.HW(HW)) u_c6c (.clk, .rst, .lo, .a(w9[I-1][J]),   .b(thr_d[k]), .gt(p6c));
      serial5_cmp #(.HW(HW)) u_c6d (.clk, .rst, .lo, .a(w9[I][J]),     .b(thr_d[k]), .gt(p6d));
      always_comb begin
        unique case (wsel[k])
          WIN_06:  pass[r][k] = p6a || p6b || p6c || p6d;
          WIN_08:  pass[r][k] = p8;
          default: pass[r][k] = p4;
        endcase
      end
    end
  end

  // ---------------- results ----------------
  logic [NR-1:0]     lmax_q;
  logic [N_JTHR-1:0] hit_q [NR];

  always_ff @(posedge clk) begin
    if (rst) begin
      lmax_q <= '0;
      for (int r = 0; r < NR; r++) hit_q[r] <= '0;
    end else if (!lo) begin
      for (int r = 0; r < NR; r++) begin
        lmax_q[r] <= lmax[r];
        for (int k = 0; k < N_JTHR; k++) hit_q[r][k] <= lmax[r] && pass[r][k];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      roi <= '0;
      for (int k = 0; k < N_JTHR; k++) mult[k] <= '0;
      for (int r = 0; r < NR; r++) roi_hits[r] <= '0;
    end else if (ph) begin
      roi <= lmax_q;
      roi_hits <= hit_q;
      for (int k = 0; k < N_JTHR; k++) begin
        int n;
        n = 0;
        for (int r = 0; r < NR; r++) n += int'(hit_q[r][k]);
        mult[k] <= (n > 7) ? MULT_W'(7) : MULT_W'(n);
      end
    end
  end

  // ---------------- readout ----------------
  logic [16*(N_JTHR+1)-1:0] ro_word;
  always_comb begin
    ro_word[15:0] = lmax_q;
    for (int r = 0; r < NR; r++) ro_word[16 + N_JTHR*r +: N_JTHR] = hit_q[r];
  end

  // The results are stored one crossing after their input digits, so the
  // pipeline looks back one crossing less.
  readout_pipeline #(.W(16*(N_JTHR+1)), .DEPTH(DEPTH), .LATENCY(LATENCY - 1), .SLICES(SLICES)) u_ro (
    .clk, .rst, .ce(ph), .din(ro_word), .l1a,
    .rd_valid, .rd_ready, .rd_data, .rd_last, .l1a_lost);
endmodule
