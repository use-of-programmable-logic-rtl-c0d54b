// serial5_add: one "5-bit serial" adder.
//
// A number is carried as two digits on consecutive 80 MHz cycles: the low
// 5 bits in the cycle where `lo` is high, then the remaining upper bits.
// In the low cycle the adder adds the two 5-bit digits, outputs the 5-bit
// result and stores the carry; in the high cycle it adds the upper digits
// plus the stored carry.  The carry chain is therefore only 5 bits long in
// the first step, which is what keeps the logic small and fast enough for
// 80 MHz.  The adder itself is combinational apart from the carry flip-flop,
// so trees of these adders work on the digit stream without extra latency.
//
// Ports: `a`, `b` and `s` are HW bits wide; in the low cycle only bits
// [4:0] are meaningful (upper bits of `s` are zero).  The upper digit must be
// wide enough for the sum (no overflow detection).
module serial5_add #(
  parameter int HW = 9
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          lo,    // 1: low digit present, 0: upper digit
  input  logic [HW-1:0] a,
  input  logic [HW-1:0] b,
  output logic [HW-1:0] s
);
  localparam int D = 5;
  logic [D:0] lsum;
  logic       cy;

  assign lsum = {1'b0, a[D-1:0]} + {1'b0, b[D-1:0]};

  always_comb begin
    if (lo) s = HW'(lsum[D-1:0]);
    else    s = a + b + HW'(cy);
  end

  always_ff @(posedge clk) begin
    if (rst)     cy <= 1'b0;
    else if (lo) cy <= lsum[D];
  end
endmodule
