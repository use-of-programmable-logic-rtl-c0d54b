// serial5_cmp: one "5-bit serial" magnitude comparator, a > b.
//
// Works on the same two-digit stream as serial5_add.  In the low-digit cycle
// it compares the 5-bit low digits and stores the result; in the upper-digit
// cycle `gt` is the full comparison: upper digits greater, or upper digits
// equal and low digits greater.  `gt` is only meaningful while `lo` is low.
module serial5_cmp #(
  parameter int HW = 9
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          lo,
  input  logic [HW-1:0] a,
  input  logic [HW-1:0] b,
  output logic          gt
);
  localparam int D = 5;
  logic lo_gt;

  assign gt = (a > b) || ((a == b) && lo_gt);

  always_ff @(posedge clk) begin
    if (rst)     lo_gt <= 1'b0;
    else if (lo) lo_gt <= a[D-1:0] > b[D-1:0];
  end
endmodule
