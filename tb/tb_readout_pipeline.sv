// tb_readout_pipeline: writes the crossing number into the pipeline every
// bunch crossing and issues Level-1 Accepts at random, with a randomly
// stalling consumer.  Every read word must be the crossing number of the
// expected time slice (LATENCY crossings before the accept, SLICES words
// centred on it), in order, with rd_last on the last slice.  A final burst
// of accepts with the consumer stopped must overflow the event queue:
// exactly the accept that finds the queue full is reported lost.
module tb_readout_pipeline;
  localparam int W = 16, DEPTH = 64, LATENCY = 20, SLICES = 5, EVQ = 8;
  logic clk = 0, rst = 1, ce = 0, l1a = 0, rd_ready = 0;
  logic [W-1:0] din;
  logic rd_valid, rd_last, l1a_lost;
  logic [W-1:0] rd_data;
  int checks = 0, failures = 0;
  int exp_q [$];
  int lost = 0, outstanding = 0, words = 0, expect_lost = 0;

  always #5 clk = ~clk;

  readout_pipeline #(.W(W), .DEPTH(DEPTH), .LATENCY(LATENCY), .SLICES(SLICES), .EVQ(EVQ)) dut (
    .clk, .rst, .ce, .din, .l1a, .rd_valid, .rd_ready, .rd_data, .rd_last, .l1a_lost);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer
  always @(posedge clk) begin
    if (!rst) begin
      if (rd_valid && rd_ready) begin
        int e;
        e = exp_q.pop_front();
        check(int'(rd_data) == e, $sformatf("word exp %0d got %0d", e, rd_data));
        check(rd_last == (exp_q.size() % SLICES == 0), "rd_last");
        words++;
        if (rd_last) outstanding--;
      end
      if (l1a_lost) lost++;
    end
  end

  task automatic crossing(int t, bit acc);
    @(negedge clk);
    ce = 1; din = W'(t); l1a = acc;
    if (acc) begin
      if (outstanding == EVQ + 1) expect_lost++;
      else begin
        outstanding++;
        for (int s = 0; s < SLICES; s++) exp_q.push_back(t - LATENCY - SLICES / 2 + s);
      end
    end
    @(negedge clk);
    ce = 0; l1a = 0; din = $urandom;
  endtask

  initial begin
    int t;
    din = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    t = 0;
    fork
      forever begin
        @(negedge clk);
        rd_ready = $urandom_range(0, 3) != 0;
      end
    join_none
    for (; t < 2000; t++) crossing(t, t > LATENCY + 5 && $urandom_range(0, 19) == 0);
    repeat (40) crossing(t++, 0);
    check(exp_q.size() == 0, "all events read");
    // overflow: consumer stopped, eleven accepts in a row
    disable fork;
    rd_ready = 0;
    for (int k = 0; k < 11; k++) crossing(t++, 1);
    crossing(t++, 0);
    check(lost == expect_lost && lost == 2, $sformatf("lost %0d expected %0d", lost, expect_lost));
    rd_ready = 1;
    repeat (40) crossing(t++, 0);
    check(exp_q.size() == 0, "queued events drained after overflow");
    check(words > 300, "enough words read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
