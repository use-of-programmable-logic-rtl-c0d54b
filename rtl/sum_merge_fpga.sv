// sum_merge_fpga: the adder-tree FPGA of a JEM.
//
// It adds the ET, EX and EY partial sums of N_IN Energy Sum FPGAs into the
// module totals that go to the crate's Sum Merger Module.  The JEM's
// Energy Sum FPGAs feed it their own four-element sums; this FPGA finishes
// the tree.  One register stage, updated once per bunch crossing
// (ph == 1): outputs are valid one crossing after the inputs.
module sum_merge_fpga
  import jep_pkg::*;
#(
  parameter int N_IN = 8
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        ph,
  input  logic [ESUM_ET_W-1:0]        et_in [N_IN],
  input  logic signed [ESUM_XY_W-1:0] ex_in [N_IN],
  input  logic signed [ESUM_XY_W-1:0] ey_in [N_IN],
  output logic [JEM_ET_W-1:0]         et,
  output logic signed [JEM_XY_W-1:0]  ex,
  output logic signed [JEM_XY_W-1:0]  ey
);
  always_ff @(posedge clk) begin
    if (rst) begin
      et <= '0;
      ex <= '0;
      ey <= '0;
    end else if (ph) begin
      logic [JEM_ET_W-1:0]        st;
      logic signed [JEM_XY_W-1:0] sx, sy;
      st = '0; sx = '0; sy = '0;
      for (int k = 0; k < N_IN; k++) begin
        st += JEM_ET_W'(et_in[k]);
        sx += JEM_XY_W'(ex_in[k]);
        sy += JEM_XY_W'(ey_in[k]);
      end
      et <= st;
      ex <= sx;
      ey <= sy;
    end
  end

  initial assert (N_IN <= 8) else $error("JEM sum widths assume at most 8 inputs");
endmodule
