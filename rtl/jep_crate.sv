// jep_crate: one crate of the Jet/Energy-Sum Processor.
//
// N_JEM Jet/Energy Sum Modules side by side in eta, each covering 4 x 8
// jet elements of one phi quadrant, exchange their 80 MHz jet-element links
// with their eta neighbours over the backplane (the modules at either end
// of the row see zeros there).  Their module sums go to the Sum Merger
// Module, which forms the crate ET, EX, EY and the total- and missing-ET
// trigger bits; their jet multiplicities go to the Jet Merger Module, which
// forms the crate's jet trigger bits.  Every FPGA keeps its data in a
// readout pipeline that is read out on a Level-1 Accept (`l1a`).
//
// Clocking: one 80 MHz clock.  The crate generates the phase bit `ph`
// (0 after reset, then alternating) that every FPGA uses; the bunch-crossing
// (40 MHz) registers update on edges that end a ph==1 cycle.  `bc` is `ph`
// brought out: inputs `em`/`had`, `l1a` and the results change on edges
// where bc was 1.  Latency from the inputs: jet_mult and et/ex/ey six bunch
// crossings, et_hits/met_hits seven.
//
// Configuration: one write bus `cfg` addresses every FPGA by module number
// (jem = 0..N_JEM-1, or MERGER_ID for the merger modules) and chip number;
// see the module headers for the register maps.
module jep_crate
  import jep_pkg::*;
#(
  parameter int N_JEM   = 8,
  parameter int DEPTH   = 128,
  parameter int LATENCY = 100,
  parameter int SLICES  = 5
) (
  input  logic                      clk,
  input  logic                      rst,
  output logic                      bc,
  input  logic [EM_W-1:0]           em  [N_JEM][11][N_EL],
  input  logic [EM_W-1:0]           had [N_JEM][11][N_EL],
  input  cfg_wr_t                   cfg,
  // trigger outputs
  output logic [MULT_W-1:0]         jet_mult [N_JTHR],
  output logic [CR_ET_W-1:0]        et,
  output logic signed [CR_XY_W-1:0] ex,
  output logic signed [CR_XY_W-1:0] ey,
  output logic [N_ETTHR-1:0]        et_hits,
  output logic [N_METHR-1:0]        met_hits,
  // readout
  input  logic                      l1a,
  output logic                      e_rd_valid [N_JEM][11],
  input  logic                      e_rd_ready [N_JEM][11],
  output logic [2*EM_W*N_EL-1:0]    e_rd_data  [N_JEM][11],
  output logic                      e_rd_last  [N_JEM][11],
  output logic                      j_rd_valid [N_JEM][2],
  input  logic                      j_rd_ready [N_JEM][2],
  output logic [16*(N_JTHR+1)-1:0]  j_rd_data  [N_JEM][2],
  output logic                      j_rd_last  [N_JEM][2],
  output logic                      l1a_lost
);
  logic ph;
  always_ff @(posedge clk) begin
    if (rst) ph <= 1'b0;
    else     ph <= ~ph;
  end
  assign bc = ph;

  logic [DIG_W-1:0]           dig    [N_JEM][11][N_EL];
  logic [DIG_W-1:0]           dig_lo [N_JEM][11];
  logic [DIG_W-1:0]           dig_hi [N_JEM][11][2];
  logic [JEM_ET_W-1:0]        m_et   [N_JEM];
  logic signed [JEM_XY_W-1:0] m_ex   [N_JEM];
  logic signed [JEM_XY_W-1:0] m_ey   [N_JEM];
  logic [MULT_W-1:0]          m_mult [N_JEM][N_JTHR];
  logic                       m_lost [N_JEM];

  always_comb begin
    for (int m = 0; m < N_JEM; m++) begin
      for (int f = 0; f < 11; f++) begin
        dig_lo[m][f]    = (m > 0)         ? dig[m-1][f][3] : '0;
        dig_hi[m][f][0] = (m < N_JEM - 1) ? dig[m+1][f][0] : '0;
        dig_hi[m][f][1] = (m < N_JEM - 1) ? dig[m+1][f][1] : '0;
      end
    end
  end

  for (genvar m = 0; m < N_JEM; m++) begin : g_jem
    jem #(.DEPTH(DEPTH), .LATENCY(LATENCY), .SLICES(SLICES)) u_jem (
      .clk, .rst, .ph, .jem_id(4'(m)),
      .em(em[m]), .had(had[m]), .cfg,
      .dig_out(dig[m]), .dig_lo(dig_lo[m]), .dig_hi(dig_hi[m]),
      .et(m_et[m]), .ex(m_ex[m]), .ey(m_ey[m]), .mult(m_mult[m]),
      .l1a,
      .e_rd_valid(e_rd_valid[m]), .e_rd_ready(e_rd_ready[m]),
      .e_rd_data(e_rd_data[m]), .e_rd_last(e_rd_last[m]),
      .j_rd_valid(j_rd_valid[m]), .j_rd_ready(j_rd_ready[m]),
      .j_rd_data(j_rd_data[m]), .j_rd_last(j_rd_last[m]),
      .l1a_lost(m_lost[m]));
  end

  // The module sums are one crossing earlier than the multiplicities;
  // delay them so both merger outputs are aligned.
  logic [JEM_ET_W-1:0]        d_et [N_JEM];
  logic signed [JEM_XY_W-1:0] d_ex [N_JEM];
  logic signed [JEM_XY_W-1:0] d_ey [N_JEM];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int m = 0; m < N_JEM; m++) begin
        d_et[m] <= '0;
        d_ex[m] <= '0;
        d_ey[m] <= '0;
      end
    end else if (ph) begin
      d_et <= m_et;
      d_ex <= m_ex;
      d_ey <= m_ey;
    end
  end

  jet_merger_module #(.N_JEM(N_JEM)) u_jmm (
    .clk, .rst, .ph, .mult_in(m_mult), .mult(jet_mult));

  sum_merger_module #(.N_JEM(N_JEM)) u_smm (
    .clk, .rst, .ph, .cfg, .et_in(d_et), .ex_in(d_ex), .ey_in(d_ey),
    .et, .ex, .ey, .et_hits, .met_hits);

  always_comb begin
    l1a_lost = 1'b0;
    for (int m = 0; m < N_JEM; m++) l1a_lost |= m_lost[m];
  end

  initial assert (N_JEM >= 2 && N_JEM <= 8) else $error("N_JEM must be 2..8");
endmodule
