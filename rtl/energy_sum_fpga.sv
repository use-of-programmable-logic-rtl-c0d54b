// energy_sum_fpga: one Energy Sum FPGA of a Jet/Energy Sum Module (JEM).
//
// It receives, every bunch crossing, the 9-bit electromagnetic and hadronic
// energies of N_EL (four) jet elements.  For each element a
// jet_element_proc applies the noise thresholds, forms the 10-bit ET and
// looks up ET, EX and EY; an adder tree sums the four elements' ET, EX and
// EY for the module sum.  The 10-bit element ETs are also sent out as 5-bit
// digits at 80 MHz (link80_tx) to the Jet FPGAs of this and the
// neighbouring modules.  The raw inputs are kept in a readout pipeline and
// sent to the DAQ on a Level-1 Accept.  All of this follows the JEM
// description; the register map and the readout format are this design's.
//
// Configuration (cfg, when jem/chip match this FPGA):
//   sub = 0..3 or BCAST : write lookup table addr[11:10] (0 ET, 1 EX, 2 EY)
//                         of that element (or all), index addr[9:0]
//   sub = SUB_REG       : addr 0..3 EM noise threshold of element addr,
//                         addr 4..7 hadronic noise threshold of element addr-4
// Thresholds reset to zero; tables must be written before use.
//
// Timing (bunch crossings after the inputs): jet_dig carries the element ET
// low digit in the ph==0 cycle and high digit in the ph==1 cycle of
// crossing +2; et_sum/ex_sum/ey_sum are valid at +3.
// Readout word: {em[3], had[3], ..., em[0], had[0]}.
module energy_sum_fpga
  import jep_pkg::*;
#(
  parameter logic [3:0] CHIP    = 4'd0,
  parameter int         DEPTH   = 128,
  parameter int         LATENCY = 100,
  parameter int         SLICES  = 5
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        ph,
  input  logic [3:0]                  jem_id,
  input  logic [EM_W-1:0]             em      [N_EL],
  input  logic [EM_W-1:0]             had     [N_EL],
  input  cfg_wr_t                     cfg,
  output logic [ESUM_ET_W-1:0]        et_sum,
  output logic signed [ESUM_XY_W-1:0] ex_sum,
  output logic signed [ESUM_XY_W-1:0] ey_sum,
  output logic [DIG_W-1:0]            jet_dig [N_EL],
  input  logic                        l1a,
  output logic                        rd_valid,
  input  logic                        rd_ready,
  output logic [2*EM_W*N_EL-1:0]      rd_data,
  output logic                        rd_last,
  output logic                        l1a_lost
);
  logic ce;
  assign ce = ph;

  logic            hit;
  logic [EM_W-1:0] em_thr  [N_EL];
  logic [EM_W-1:0] had_thr [N_EL];

  assign hit = cfg_hit(cfg, jem_id, CHIP);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N_EL; k++) begin
        em_thr[k]  <= '0;
        had_thr[k] <= '0;
      end
    end else if (hit && cfg.sub == SUB_REG) begin
      for (int k = 0; k < N_EL; k++) begin
        if (cfg.addr == 12'(k))        em_thr[k]  <= cfg.data[EM_W-1:0];
        if (cfg.addr == 12'(k + N_EL)) had_thr[k] <= cfg.data[EM_W-1:0];
      end
    end
  end

  logic [ET_W-1:0]         et     [N_EL];
  logic [LET_W-1:0]        lut_et [N_EL];
  logic signed [EXY_W-1:0] lut_ex [N_EL];
  logic signed [EXY_W-1:0] lut_ey [N_EL];

  for (genvar k = 0; k < N_EL; k++) begin : g_el
    jet_element_proc u_el (
      .clk, .rst, .ce,
      .em(em[k]), .had(had[k]), .em_thr(em_thr[k]), .had_thr(had_thr[k]),
      .lw_en(hit && cfg.sub != SUB_REG && field_hit(cfg.sub, 4'(k))),
      .lw_tab(cfg.addr[11:10]), .lw_idx(cfg.addr[9:0]), .lw_data(cfg.data),
      .et(et[k]), .lut_et(lut_et[k]), .lut_ex(lut_ex[k]), .lut_ey(lut_ey[k]));

    link80_tx u_tx (.clk, .rst, .ce, .din(et[k]), .dout(jet_dig[k]));
  end

  // adder tree over the elements
  always_ff @(posedge clk) begin
    if (rst) begin
      et_sum <= '0;
      ex_sum <= '0;
      ey_sum <= '0;
    end else if (ce) begin
      logic [ESUM_ET_W-1:0]        st;
      logic signed [ESUM_XY_W-1:0] sx, sy;
      st = '0; sx = '0; sy = '0;
      for (int k = 0; k < N_EL; k++) begin
        st += ESUM_ET_W'(lut_et[k]);
        sx += ESUM_XY_W'(lut_ex[k]);
        sy += ESUM_XY_W'(lut_ey[k]);
      end
      et_sum <= st;
      ex_sum <= sx;
      ey_sum <= sy;
    end
  end

  logic [2*EM_W*N_EL-1:0] ro_word;
  always_comb
    for (int k = 0; k < N_EL; k++)
      ro_word[2*EM_W*k +: 2*EM_W] = {em[k], had[k]};

  readout_pipeline #(.W(2*EM_W*N_EL), .DEPTH(DEPTH), .LATENCY(LATENCY), .SLICES(SLICES)) u_ro (
    .clk, .rst, .ce, .din(ro_word), .l1a,
    .rd_valid, .rd_ready, .rd_data, .rd_last, .l1a_lost);
endmodule
