// link80_tx: 80 MHz 5-bit multiplexer for the jet-element ET fan-out.
//
// A 10-bit value captured once per bunch crossing is sent as two 5-bit
// digits on a point-to-point link clocked at 80 MHz: the low digit first,
// the high digit second.  Halving the width halves the pins a Jet FPGA needs
// for its 55 inputs, and lets the Jet FPGA start its "5-bit serial"
// arithmetic on the low digit at once.
//
// Timing: on the 40 MHz edge (ce, end of a ph==1 cycle) `dout` takes the low
// digit of `din`; on the following edge it takes the high digit.  So `dout`
// carries the low digit during ph==0 and the high digit during ph==1.
// Low-digit-first order is this design's choice.
module link80_tx
  import jep_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             ce,       // 40 MHz enable (ph == 1)
  input  logic [ET_W-1:0]  din,
  output logic [DIG_W-1:0] dout
);
  logic [DIG_W-1:0] hi_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      dout <= '0;
      hi_q <= '0;
    end else if (ce) begin
      dout <= din[DIG_W-1:0];
      hi_q <= din[ET_W-1:DIG_W];
    end else begin
      dout <= hi_q;
    end
  end
endmodule
