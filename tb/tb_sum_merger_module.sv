// tb_sum_merger_module: programs four total-ET and four missing-ET
// thresholds, then sends random module sums from eight modules.  Checks the
// crate ET/EX/EY one crossing later and the threshold bits two crossings
// later against integer arithmetic (missing ET tested as EX^2+EY^2 > T^2).
module tb_sum_merger_module;
  import jep_pkg::*;
  logic clk = 0, rst = 1, ph = 0;
  cfg_wr_t cfg;
  logic [JEM_ET_W-1:0] et_in [8];
  logic signed [JEM_XY_W-1:0] ex_in [8], ey_in [8];
  logic [CR_ET_W-1:0] et;
  logic signed [CR_XY_W-1:0] ex, ey;
  logic [N_ETTHR-1:0] et_hits;
  logic [N_METHR-1:0] met_hits;
  int checks = 0, failures = 0;
  int et_thr [N_ETTHR] = '{20000, 60000, 100000 / 2, 65535};
  int met_thr [N_METHR] = '{5000, 20000, 40000, 60000};

  always #5 clk = ~clk;

  sum_merger_module #(.N_JEM(8)) dut (.clk, .rst, .ph, .cfg, .et_in, .ex_in, .ey_in,
    .et, .ex, .ey, .et_hits, .met_hits);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wr(logic [3:0] jem, int addr, int data);
    @(negedge clk);
    cfg = '{we: 1'b1, jem: jem, chip: CHIP_SMM, sub: SUB_REG, addr: 12'(addr), data: 16'(data)};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint pst, psx, psy;
    int hit_seen = 0, miss_seen = 0;
    cfg = '0;
    for (int m = 0; m < 8; m++) begin
      et_in[m] = '0; ex_in[m] = '0; ey_in[m] = '0;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < N_ETTHR; k++) wr(MERGER_ID, k, et_thr[k]);
    for (int k = 0; k < N_METHR; k++) wr(MERGER_ID, k + N_ETTHR, met_thr[k]);
    wr(4'd0, 0, 0);                      // not for the merger: ignored
    pst = -1;
    for (int t = 0; t < 1000; t++) begin
      longint st, sx, sy;
      int scale;
      @(negedge clk);
      ph = 1;
      scale = (t % 3 == 0) ? 32767 : (t % 3 == 1) ? 8000 : 1000;
      st = 0; sx = 0; sy = 0;
      for (int m = 0; m < 8; m++) begin
        int a, b, c;
        a = $urandom_range(0, scale);
        b = int'($urandom_range(0, 2 * scale)) - scale;
        c = int'($urandom_range(0, 2 * scale)) - scale;
        et_in[m] = JEM_ET_W'(a); ex_in[m] = JEM_XY_W'(b); ey_in[m] = JEM_XY_W'(c);
        st += a; sx += b; sy += c;
      end
      @(negedge clk);
      ph = 0;
      check(longint'(et) == st && longint'(ex) == sx && longint'(ey) == sy,
            $sformatf("t=%0d crate sums", t));
      if (pst >= 0) begin
        for (int k = 0; k < N_ETTHR; k++) begin
          check(et_hits[k] == (pst > et_thr[k]), $sformatf("et hit %0d", k));
          if (et_hits[k]) hit_seen++; else miss_seen++;
        end
        for (int k = 0; k < N_METHR; k++)
          check(met_hits[k] == (psx * psx + psy * psy > longint'(met_thr[k]) * met_thr[k]),
                $sformatf("met hit %0d", k));
      end
      pst = st; psx = sx; psy = sy;
    end
    check(hit_seen > 0 && miss_seen > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
