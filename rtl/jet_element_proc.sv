// jet_element_proc: the per-jet-element part of the energy summation
// algorithm.
//
// Each bunch crossing (40 MHz, `ce`) it takes the 9-bit electromagnetic and
// hadronic energies of one 0.2x0.2 jet element, applies a separate
// noise-reduction threshold to each (a value not above its threshold is
// replaced by zero), adds the two into the 10-bit jet-element ET, and looks
// that ET up in three tables giving the ET, EX and EY contributions used for
// the global sums.  The thresholds-then-sum-then-lookup order follows the
// published algorithm; the "keep if strictly above threshold" rule, the
// table widths (10-bit ET, 11-bit signed EX/EY) and registering every stage
// are this design's choices.
//
// Timing: `et` is valid one bunch crossing after the inputs, `lut_*` two.
// The tables are written through the `lw_*` port at any time.
module jet_element_proc
  import jep_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ce,        // 40 MHz enable
  input  logic [EM_W-1:0]         em,
  input  logic [EM_W-1:0]         had,
  input  logic [EM_W-1:0]         em_thr,
  input  logic [EM_W-1:0]         had_thr,
  // table write port: table select (LUT_ET/LUT_EX/LUT_EY), index, value
  input  logic                    lw_en,
  input  logic [1:0]              lw_tab,
  input  logic [ET_W-1:0]         lw_idx,
  input  logic [15:0]             lw_data,
  output logic [ET_W-1:0]         et,        // jet-element ET, to the jet path
  output logic [LET_W-1:0]        lut_et,
  output logic signed [EXY_W-1:0] lut_ex,
  output logic signed [EXY_W-1:0] lut_ey
);
  logic [EM_W-1:0] em_c, had_c;

  always_comb begin
    em_c  = (em  > em_thr)  ? em  : '0;
    had_c = (had > had_thr) ? had : '0;
  end

  always_ff @(posedge clk) begin
    if (rst)     et <= '0;
    else if (ce) et <= ET_W'(em_c) + ET_W'(had_c);
  end

  lut_ram #(.AW(ET_W), .DW(LET_W)) u_et (
    .clk, .we(lw_en && lw_tab == LUT_ET), .waddr(lw_idx), .wdata(lw_data[LET_W-1:0]),
    .re(ce), .raddr(et), .rdata(lut_et));
  lut_ram #(.AW(ET_W), .DW(EXY_W)) u_ex (
    .clk, .we(lw_en && lw_tab == LUT_EX), .waddr(lw_idx), .wdata(lw_data[EXY_W-1:0]),
    .re(ce), .raddr(et), .rdata(lut_ex));
  lut_ram #(.AW(ET_W), .DW(EXY_W)) u_ey (
    .clk, .we(lw_en && lw_tab == LUT_EY), .waddr(lw_idx), .wdata(lw_data[EXY_W-1:0]),
    .re(ce), .raddr(et), .rdata(lut_ey));
endmodule
