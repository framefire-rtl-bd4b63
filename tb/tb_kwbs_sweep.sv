// tb_kwbs_sweep: frame time against the keyframe interval K, the experiment
// behind KWBS, on a small scale.
//
// One layer (16 input channels of 16 neurons, 32 output neurons) processes a
// video of FRAMES frames, one timestep each. Channel firing rates follow a
// skewed pattern that drifts by one channel every DRIFT frames, so a
// schedule made on a keyframe slowly goes out of date. For each K, every K-th
// frame is a keyframe: the record table is cleared, the frame is recorded,
// and the testbench (as host) sorts and regroups the channels and writes the
// schedule. K = 0 is the baseline: identity schedule, no recording. The
// average cycles per frame are printed for each K, the output spikes of
// every frame are checked against a model, and every K > 0 must beat the
// baseline. The video is the same for every K (same seed).
module tb_kwbs_sweep;
  import framefire_pkg::*;
  localparam int N = 4, M = 4, LW = 16;
  localparam int C = 16, G = 4, OUT = 32, P = OUT / N, FAN = C * LW;
  localparam int VTH = 200, FRAMES = 60, DRIFT = 6, NK = 8;
  localparam int KS [NK] = '{0, 1, 2, 4, 8, 24, 40, 50};

  logic clk = 0, rst_n = 0;
  logic host_we, host_re, host_rvalid, busy, done;
  logic [23:0] host_addr;
  logic [31:0] host_wdata, host_rdata;

  framefire_top dut (.*);
  always #5 clk = ~clk;

  int w [OUT][FAN];
  int v [OUT];
  int sched [C];
  int base_rate [C];
  int words [FRAMES][C];
  int avg [NK];
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  task automatic wr(input host_target_e t, input int bank, input int a, input int d);
    @(negedge clk); host_we = 1; host_addr = {t, 4'(bank), 16'(a)}; host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask
  task automatic rd(input host_target_e t, input int bank, input int a, output int d);
    @(negedge clk); host_re = 1; host_addr = {t, 4'(bank), 16'(a)};
    @(negedge clk); host_re = 0; d = int'(host_rdata);
  endtask
  function automatic int sext16(input int x);
    return (x & 32'h8000) != 0 ? (x | 32'hFFFF_0000) : (x & 32'hFFFF);
  endfunction

  task automatic rebalance();
    int wl [C], order [C], gsum [M], gcnt [M], d;
    for (int c = 0; c < C; c++) begin rd(TGT_RECORD, 0, c, d); wl[c] = d; order[c] = c; end
    for (int i = 0; i < C; i++)
      for (int j = i + 1; j < C; j++)
        if (wl[order[j]] > wl[order[i]]) begin int x; x = order[i]; order[i] = order[j]; order[j] = x; end
    for (int m = 0; m < M; m++) begin gsum[m] = 0; gcnt[m] = 0; end
    for (int i = 0; i < C; i++) begin
      int best; best = -1;
      for (int m = 0; m < M; m++) if (gcnt[m] < G && (best < 0 || gsum[m] < gsum[best])) best = m;
      sched[best * G + gcnt[best]] = order[i];
      gsum[best] += wl[order[i]]; gcnt[best]++;
    end
    for (int s = 0; s < C; s++) wr(TGT_SCHED, 0, s, sched[s]);
  endtask

  initial begin
    repeat (10000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int d, cyc, total;
    host_we = 0; host_re = 0; host_addr = 0; host_wdata = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    base_rate = '{15, 14, 12, 10, 8, 6, 5, 4, 3, 2, 2, 1, 1, 1, 0, 0};
    // the video: the rate pattern shifts by one channel every DRIFT frames
    for (int f = 0; f < FRAMES; f++)
      for (int c = 0; c < C; c++) begin
        int r; r = base_rate[(c + C - (f / DRIFT)) % C];
        words[f][c] = 0;
        for (int b = 0; b < LW; b++) if ($urandom_range(0, 15) < r) words[f][c] |= (1 << b);
      end
    for (int o = 0; o < OUT; o++)
      for (int i = 0; i < FAN; i++) begin
        w[o][i] = $urandom_range(0, 30) - 10;
        wr(TGT_WEIGHT, o % N, (o / N) * FAN + i, w[o][i]);
      end
    // layer configuration (layer 0, one list per channel)
    wr(TGT_REG, 0, int'(REG_LAYER), 0);  wr(TGT_REG, 0, int'(REG_GROUP), G);
    wr(TGT_REG, 0, int'(REG_LPC), 1);    wr(TGT_REG, 0, int'(REG_NPASS), P);
    wr(TGT_REG, 0, int'(REG_INB), 0);    wr(TGT_REG, 0, int'(REG_OUTB), 64);
    wr(TGT_REG, 0, int'(REG_WB), 0);     wr(TGT_REG, 0, int'(REG_VMB), 0);
    wr(TGT_REG, 0, int'(REG_VTH), VTH);

    for (int ki = 0; ki < NK; ki++) begin
      int K; K = KS[ki];
      total = 0;
      for (int o = 0; o < OUT; o++) begin v[o] = 0; wr(TGT_VMEM, o % N, o / N, 0); end
      for (int c = 0; c < C; c++) begin sched[c] = c; wr(TGT_SCHED, 0, c, c); end
      for (int f = 0; f < FRAMES; f++) begin
        bit key; key = (K > 0) && (f % K == 0);
        for (int c = 0; c < C; c++) wr(TGT_STATE, 0, c, words[f][c]);
        if (key) wr(TGT_REG, 0, int'(REG_CTRL), 2);
        wr(TGT_REG, 0, int'(REG_FLAGS), key ? 2 : 0);
        wr(TGT_REG, 0, int'(REG_CTRL), 1);
        while (!done) @(negedge clk);
        rd(TGT_REG, 0, int'(REG_CYCLES), cyc);
        total += cyc;
        // model and compare the output spikes
        for (int o = 0; o < OUT; o++) begin
          int x; bit s;
          x = v[o];
          for (int c = 0; c < C; c++) for (int b = 0; b < LW; b++) if (words[f][c] & (1 << b)) x += w[o][c*LW+b];
          x = sext16(x);
          s = x > VTH;
          v[o] = s ? x - VTH : x;
          if (o % LW == 0) rd(TGT_STATE, 0, 64 + o / LW, d);
          check(d[o % LW] == s, $sformatf("K=%0d frame %0d spike %0d", K, f, o));
        end
        if (key) rebalance();
      end
      avg[ki] = total / FRAMES;
      $display("K=%0d: %0d cycles per frame", K, avg[ki]);
    end
    for (int ki = 1; ki < NK; ki++)
      check(avg[ki] < avg[0], $sformatf("K=%0d faster than the baseline", KS[ki]));
    $display("speed-up at K=%0d: %0d.%02d", KS[2], avg[0] / avg[2], (avg[0] * 100 / avg[2]) % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
