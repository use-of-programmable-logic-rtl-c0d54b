// readout_pipeline: Level-1 pipeline memory with time-slice readout.
//
// Every bunch crossing (`ce`) the word `din` is written into a circular
// buffer of DEPTH words.  The Level-1 Accept (`l1a`, sampled with `ce`)
// arrives LATENCY bunch crossings after the data it accepts.  For each
// accept the buffer position of the accepted crossing is queued, and a
// readout engine later sends SLICES consecutive words centred on it
// (SLICES/2 crossings before, the crossing itself, the rest after) over a
// valid/ready stream; `rd_last` marks the final slice of an event.  Up to
// EVQ accepts can wait; an accept that finds the queue full is dropped and
// flagged on `l1a_lost` for one cycle.
//
// Storing the FPGAs' input and output data and reading it out on an accept
// is the trigger's scheme; the depth, latency, number of slices, queue size
// and the stream handshake are this design's choices.  A slow consumer must
// drain an event within DEPTH-LATENCY-SLICES crossings or its words are
// overwritten.
module readout_pipeline #(
  parameter int W       = 72,
  parameter int DEPTH   = 128,
  parameter int LATENCY = 100,
  parameter int SLICES  = 5,
  parameter int EVQ     = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce,
  input  logic [W-1:0] din,
  input  logic         l1a,
  output logic         rd_valid,
  input  logic         rd_ready,
  output logic [W-1:0] rd_data,
  output logic         rd_last,
  output logic         l1a_lost
);
  localparam int AW = $clog2(DEPTH);
  localparam int QW = $clog2(EVQ);
  localparam int SW = $clog2(SLICES + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr;

  logic [AW-1:0] q [EVQ];
  logic [QW-1:0] q_wr, q_rd;
  logic [QW:0]   q_cnt;

  logic          busy;
  logic [AW-1:0] rptr;
  logic [SW-1:0] scnt;

  logic push, pop, take;
  assign push = ce && l1a && (q_cnt != (QW+1)'(EVQ));
  assign pop  = !busy && (q_cnt != '0);
  assign take = rd_valid && rd_ready;

  assign rd_valid = busy;
  assign rd_data  = mem[rptr];
  assign rd_last  = busy && (scnt == SW'(SLICES - 1));

  always_ff @(posedge clk) begin
    if (ce) mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr     <= '0;
      q_wr     <= '0;
      q_rd     <= '0;
      q_cnt    <= '0;
      busy     <= 1'b0;
      rptr     <= '0;
      scnt     <= '0;
      l1a_lost <= 1'b0;
    end else begin
      l1a_lost <= ce && l1a && !push;
      if (ce) wptr <= wptr + 1'b1;
      if (push) begin
        q[q_wr] <= wptr - AW'(LATENCY) - AW'(SLICES / 2);
        q_wr    <= q_wr + 1'b1;
      end
      if (pop) begin
        rptr <= q[q_rd];
        q_rd <= q_rd + 1'b1;
        scnt <= '0;
        busy <= 1'b1;
      end else if (take) begin
        rptr <= rptr + 1'b1;
        scnt <= scnt + 1'b1;
        if (rd_last) busy <= 1'b0;
      end
      q_cnt <= q_cnt + (QW+1)'(push) - (QW+1)'(pop);
    end
  end

  initial begin
    assert (DEPTH == 2**AW) else $error("DEPTH must be a power of two");
    assert (EVQ == 2**QW) else $error("EVQ must be a power of two");
    assert (DEPTH > LATENCY + SLICES) else $error("DEPTH too small for LATENCY");
  end

  // A word must not be taken while no word is offered.
  a_stable: assert property (@(posedge clk) disable iff (rst)
    rd_valid && !rd_ready |=> rd_valid && $stable(rptr));
endmodule
