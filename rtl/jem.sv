// jem: one Jet/Energy Sum Module.
//
// The module covers a core of 4 (eta) x 8 (phi) jet elements.  It receives
// the EM and hadronic energies of 4 x 11 elements: the core rows plus one
// phi row below and two above, which neighbouring quadrants also receive.
// Eleven Energy Sum FPGAs (one per phi row, four eta elements each) apply
// thresholds and lookup tables; the eight that hold core rows feed the
// adder-tree FPGA (sum_merge_fpga), which produces the module ET, EX and EY.
// Every Energy Sum FPGA fans out its element ETs on 5-bit 80 MHz links to
// the two Jet FPGAs of this module and, over the backplane, to the
// neighbouring modules in eta: the module below needs this module's eta
// column 3, the module above needs columns 0 and 1.  Jet FPGA 0 processes
// core eta columns 0-1, Jet FPGA 1 columns 2-3; each sees a 5 x 11 window.
// The module's jet result is the saturating sum of the two FPGAs'
// multiplicities.
//
// The split into Energy Sum, adder-tree and Jet FPGAs, the four elements per
// Energy Sum FPGA, the 2 x 8 Jet FPGA core and the neighbour sharing follow
// the module description; the 4 x 8 module core (two Jet FPGAs per module),
// one Energy Sum FPGA per phi row including the environment rows, and the
// chip numbers (Energy Sum 0..10 by row, adder tree 11, Jet 12..13) are this
// design's choices.
//
// Timing in bunch crossings after the inputs: et/ex/ey +4, mult +5.
module jem
  import jep_pkg::*;
#(
  parameter int DEPTH   = 128,
  parameter int LATENCY = 100,
  parameter int SLICES  = 5
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       ph,
  input  logic [3:0]                 jem_id,
  input  logic [EM_W-1:0]            em      [11][N_EL],
  input  logic [EM_W-1:0]            had     [11][N_EL],
  input  cfg_wr_t                    cfg,
  // 80 MHz jet-element links
  output logic [DIG_W-1:0]           dig_out [11][N_EL],
  input  logic [DIG_W-1:0]           dig_lo  [11],      // eta column -1
  input  logic [DIG_W-1:0]           dig_hi  [11][2],   // eta columns 4, 5
  // results
  output logic [JEM_ET_W-1:0]        et,
  output logic signed [JEM_XY_W-1:0] ex,
  output logic signed [JEM_XY_W-1:0] ey,
  output logic [MULT_W-1:0]          mult [N_JTHR],
  // readout
  input  logic                       l1a,
  output logic                       e_rd_valid [11],
  input  logic                       e_rd_ready [11],
  output logic [2*EM_W*N_EL-1:0]     e_rd_data  [11],
  output logic                       e_rd_last  [11],
  output logic                       j_rd_valid [2],
  input  logic                       j_rd_ready [2],
  output logic [16*(N_JTHR+1)-1:0]   j_rd_data  [2],
  output logic                       j_rd_last  [2],
  output logic                       l1a_lost
);
  localparam int NROW = 11;

  logic [ESUM_ET_W-1:0]        e_et [NROW];
  logic signed [ESUM_XY_W-1:0] e_ex [NROW];
  logic signed [ESUM_XY_W-1:0] e_ey [NROW];
  logic                        e_lost [NROW];
  logic                        j_lost [2];

  for (genvar f = 0; f < NROW; f++) begin : g_esum
    energy_sum_fpga #(.CHIP(4'(f)), .DEPTH(DEPTH), .LATENCY(LATENCY), .SLICES(SLICES)) u_esum (
      .clk, .rst, .ph, .jem_id, .em(em[f]), .had(had[f]), .cfg,
      .et_sum(e_et[f]), .ex_sum(e_ex[f]), .ey_sum(e_ey[f]), .jet_dig(dig_out[f]),
      .l1a, .rd_valid(e_rd_valid[f]), .rd_ready(e_rd_ready[f]), .rd_data(e_rd_data[f]),
      .rd_last(e_rd_last[f]), .l1a_lost(e_lost[f]));
  end

  sum_merge_fpga #(.N_IN(8)) u_merge (
    .clk, .rst, .ph,
    .et_in(e_et[1:8]), .ex_in(e_ex[1:8]), .ey_in(e_ey[1:8]),
    .et, .ex, .ey);

  // Jet FPGA input maps
  logic [DIG_W-1:0] jdin [2][5][NROW];
  always_comb begin
    for (int f = 0; f < NROW; f++) begin
      for (int e = 0; e < 5; e++) begin
        // FPGA 0: module eta e-1
        jdin[0][e][f] = (e == 0) ? dig_lo[f] : dig_out[f][e-1];
        // FPGA 1: module eta e+1
        jdin[1][e][f] = (e < 3) ? dig_out[f][e+1] : dig_hi[f][e-3];
      end
    end
  end

  logic [MULT_W-1:0] jmult [2][N_JTHR];
  logic [15:0]       jroi  [2];
  logic [N_JTHR-1:0] jhits [2][16];

  for (genvar g = 0; g < 2; g++) begin : g_jet
    // The Jet FPGAs see the data two crossings after the Energy Sum FPGAs,
    // so their readout looks back two crossings less: an accept reads the
    // same bunch crossing from every FPGA.
    jet_fpga #(.CHIP(CHIP_JET0 + 4'(g)), .DEPTH(DEPTH), .LATENCY(LATENCY - 2), .SLICES(SLICES)) u_jet (
      .clk, .rst, .ph, .jem_id, .din(jdin[g]), .cfg,
      .mult(jmult[g]), .roi(jroi[g]), .roi_hits(jhits[g]),
      .l1a, .rd_valid(j_rd_valid[g]), .rd_ready(j_rd_ready[g]), .rd_data(j_rd_data[g]),
      .rd_last(j_rd_last[g]), .l1a_lost(j_lost[g]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N_JTHR; k++) mult[k] <= '0;
    end else if (ph) begin
      for (int k = 0; k < N_JTHR; k++) begin
        logic [MULT_W:0] s;
        s = {1'b0, jmult[0][k]} + {1'b0, jmult[1][k]};
        mult[k] <= s[MULT_W] ? '1 : s[MULT_W-1:0];
      end
    end
  end

  always_comb begin
    l1a_lost = j_lost[0] || j_lost[1];
    for (int f = 0; f < NROW; f++) l1a_lost |= e_lost[f];
  end
endmodule
