// jet_merger_module: crate-level merging of the jet results.
//
// Adds the per-threshold jet multiplicities of N_JEM modules, saturating at
// the largest value the 3-bit field can hold, and registers them once per
// bunch crossing (ph == 1).  The eight 3-bit counts are the crate's jet
// trigger bits for the Central Trigger Processor.  The trigger describes
// only that crate results are merged and reduced to trigger bits; the
// saturating-sum format is this design's choice.  Latency: one crossing.
module jet_merger_module
  import jep_pkg::*;
#(
  parameter int N_JEM = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ph,
  input  logic [MULT_W-1:0] mult_in [N_JEM][N_JTHR],
  output logic [MULT_W-1:0] mult    [N_JTHR]
);
  localparam int SW = MULT_W + $clog2(N_JEM + 1);
  localparam logic [SW-1:0] MAXV = SW'(2**MULT_W - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N_JTHR; k++) mult[k] <= '0;
    end else if (ph) begin
      for (int k = 0; k < N_JTHR; k++) begin
        logic [SW-1:0] s;
        s = '0;
        for (int m = 0; m < N_JEM; m++) s += SW'(mult_in[m][k]);
        mult[k] <= (s > MAXV) ? MAXV[MULT_W-1:0] : s[MULT_W-1:0];
      end
    end
  end
endmodule
