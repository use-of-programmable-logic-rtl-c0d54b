// jep_pkg: widths, types and configuration-bus helpers shared by the
// Jet/Energy-Sum Processor (JEP) RTL.
//
// Data widths follow the trigger's data format: 9-bit electromagnetic and
// hadronic jet-element energies, a 10-bit jet-element transverse energy (ET),
// and 5-bit digits for the 80 MHz links and the "5-bit serial" arithmetic of
// the Jet FPGAs.  Lookup-table output widths, sum widths, threshold counts and
// the configuration-bus layout are choices of this implementation.
//
// Clocking convention used everywhere: one 80 MHz clock and a phase bit `ph`
// that alternates 0,1,0,1.  The 40 MHz (bunch-crossing) logic updates on the
// clock edge that ends a ph==1 cycle.
package jep_pkg;

  // ---------------- data formats ----------------
  localparam int EM_W     = 9;    // EM or hadronic jet-element energy
  localparam int ET_W     = 10;   // jet-element ET (EM + HAD)
  localparam int DIG_W    = 5;    // digit of the 80 MHz links / serial arithmetic
  localparam int LET_W    = 10;   // ET lookup-table output
  localparam int EXY_W    = 11;   // EX / EY lookup-table output, signed

  localparam int N_EL     = 4;    // jet elements per Energy Sum FPGA
  localparam int ESUM_ET_W = LET_W + 2;      // sum of 4 elements
  localparam int ESUM_XY_W = EXY_W + 2;
  localparam int JEM_ET_W  = ESUM_ET_W + 3;  // sum of 8 Energy Sum FPGAs
  localparam int JEM_XY_W  = ESUM_XY_W + 3;
  localparam int CR_ET_W   = JEM_ET_W + 3;   // sum of up to 8 JEMs
  localparam int CR_XY_W   = JEM_XY_W + 3;

  // Jet algorithm
  localparam int WSUM_W   = 14;   // largest window sum: 16 x 1023 < 2^14
  localparam int HI_W     = WSUM_W - DIG_W;  // width of the upper serial digit
  localparam int N_JTHR   = 8;    // threshold / window-size combinations
  localparam int MULT_W   = 3;    // saturating multiplicity per threshold

  // Crate-level energy thresholds
  localparam int N_ETTHR  = 4;
  localparam int N_METHR  = 4;

  typedef enum logic [1:0] {WIN_04 = 2'd0, WIN_06 = 2'd1, WIN_08 = 2'd2} win_e;

  // ---------------- configuration bus ----------------
  // One write per 80 MHz cycle.  Any of the jem/chip/sub fields set to
  // BCAST addresses all targets at that level.
  typedef struct packed {
    logic        we;
    logic [3:0]  jem;    // module (slot) number; MERGER_ID = merger modules
    logic [3:0]  chip;   // FPGA on the module
    logic [3:0]  sub;    // jet element 0..3 (LUTs) or SUB_REG (registers)
    logic [11:0] addr;   // LUT: {table[1:0], index[9:0]};  registers: index
    logic [15:0] data;
  } cfg_wr_t;

  localparam logic [3:0] BCAST     = 4'hF;
  localparam logic [3:0] SUB_REG   = 4'hE;
  localparam logic [3:0] MERGER_ID = 4'hE;
  // chip numbers on a JEM
  localparam logic [3:0] CHIP_SUMMERGE = 4'd11;
  localparam logic [3:0] CHIP_JET0     = 4'd12;
  // chip numbers on the merger modules
  localparam logic [3:0] CHIP_SMM      = 4'd0;

  localparam logic [1:0] LUT_ET = 2'd0, LUT_EX = 2'd1, LUT_EY = 2'd2;

  function automatic logic field_hit(logic [3:0] f, logic [3:0] mine);
    return (f == mine) || (f == BCAST);
  endfunction

  function automatic logic cfg_hit(cfg_wr_t c, logic [3:0] jem, logic [3:0] chip);
    return c.we && field_hit(c.jem, jem) && field_hit(c.chip, chip);
  endfunction

endpackage
