// sum_merger_module: crate-level energy sums and energy trigger bits.
//
// Stage 1 adds the ET, EX and EY of N_JEM modules.  Stage 2 compares the
// total ET with N_ETTHR thresholds and the missing ET with N_METHR
// thresholds; missing ET is the length of the (EX, EY) vector, tested
// without a square root as EX^2 + EY^2 > threshold^2.  Both stages update
// once per bunch crossing (ph == 1): totals after one crossing, hit bits
// after two.  Computing total and missing ET and reducing them to trigger
// bits is the trigger's task; the number of thresholds and the
// squared-magnitude comparison are this design's choices.
//
// Configuration (cfg.jem == MERGER_ID, cfg.chip == CHIP_SMM, sub = SUB_REG): addr 0..3 ET
// thresholds, addr 4..7 missing-ET thresholds, 16 bits each, reset to
// 0xFFFF.
module sum_merger_module
  import jep_pkg::*;
#(
  parameter int N_JEM = 8
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       ph,
  input  cfg_wr_t                    cfg,
  input  logic [JEM_ET_W-1:0]        et_in [N_JEM],
  input  logic signed [JEM_XY_W-1:0] ex_in [N_JEM],
  input  logic signed [JEM_XY_W-1:0] ey_in [N_JEM],
  output logic [CR_ET_W-1:0]         et,
  output logic signed [CR_XY_W-1:0]  ex,
  output logic signed [CR_XY_W-1:0]  ey,
  output logic [N_ETTHR-1:0]         et_hits,
  output logic [N_METHR-1:0]         met_hits
);
  localparam int SQW = 2 * CR_XY_W;

  logic [15:0] et_thr  [N_ETTHR];
  logic [15:0] met_thr [N_METHR];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N_ETTHR; k++) et_thr[k]  <= '1;
      for (int k = 0; k < N_METHR; k++) met_thr[k] <= '1;
    end else if (cfg_hit(cfg, MERGER_ID, CHIP_SMM) && cfg.sub == SUB_REG) begin
      for (int k = 0; k < N_ETTHR; k++)
        if (cfg.addr == 12'(k)) et_thr[k] <= cfg.data;
      for (int k = 0; k < N_METHR; k++)
        if (cfg.addr == 12'(k + N_ETTHR)) met_thr[k] <= cfg.data;
    end
  end

  logic signed [SQW-1:0] ex_w, ey_w;
  logic [SQW-1:0]        msq;
  always_comb begin
    ex_w = SQW'(ex);
    ey_w = SQW'(ey);
    msq  = $unsigned(ex_w * ex_w) + $unsigned(ey_w * ey_w);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      et       <= '0;
      ex       <= '0;
      ey       <= '0;
      et_hits  <= '0;
      met_hits <= '0;
    end else if (ph) begin
      logic [CR_ET_W-1:0]        st;
      logic signed [CR_XY_W-1:0] sx, sy;
      st = '0; sx = '0; sy = '0;
      for (int m = 0; m < N_JEM; m++) begin
        st += CR_ET_W'(et_in[m]);
        sx += CR_XY_W'(ex_in[m]);
        sy += CR_XY_W'(ey_in[m]);
      end
      et <= st;
      ex <= sx;
      ey <= sy;
      for (int k = 0; k < N_ETTHR; k++) et_hits[k] <= et > CR_ET_W'(et_thr[k]);
      for (int k = 0; k < N_METHR; k++)
        met_hits[k] <= msq > SQW'(32'(met_thr[k]) * 32'(met_thr[k]));
    end
  end

  initial assert (N_JEM <= 8) else $error("crate sum widths assume at most 8 modules");
endmodule
