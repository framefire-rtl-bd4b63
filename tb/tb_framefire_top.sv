// tb_framefire_top: end-to-end run of the accelerator at its default size,
// driven through the host port as the host processor would.
//
// Network: layer 0 has 8 input channels of 16 neurons (one neuron state list
// each) fully connected to 64 output neurons; layer 1 takes those 64 spikes as
// 4 channels of 16 and has 16 outputs. Input spikes are random with strongly
// different firing rates per channel, so the identity schedule (channels 0-1
// on scheduler 0, ...) is unbalanced. A video of FRAMES frames, TSTEPS
// timesteps each, is processed:
//   frame 0  keyframe: record table cleared and recording on, identity
//            schedule;
//   then     the testbench (as host) reads the record table, sorts the
//            channels by workload and deals them out to the M groups, and
//            writes the new schedule table;
//   frames 1.. use the balanced schedule; the last frame applies the global
//            interval reset.
// After every layer run all output spikes and membrane potentials are read
// back and compared with a model of the network in the testbench; the record
// table is compared with the spike counts of the keyframe. The layer-0 run
// must be faster with the balanced schedule than on the keyframe. Counted
// mechanisms: workload recording, schedule change, speed-up, regular reset,
// global reset, empty lists skipped, adder-tree waits for a late PE,
// partial-sum credit stalls, neuron state FIFO full.
module tb_framefire_top;
  import framefire_pkg::*;
  localparam int N = 4, M = 4, LW = 16;
  localparam int FRAMES = 4, TSTEPS = 3;
  // layer 0
  localparam int C0 = 8, G0 = 2, OUT0 = 64, P0 = OUT0 / N, FAN0 = C0 * LW;
  localparam int IN0_BASE = 0, OUT0_BASE = 16, W0_BASE = 0, VM0_BASE = 0;
  // layer 1
  localparam int C1 = 4, G1 = 1, OUT1 = 16, P1 = OUT1 / N, FAN1 = C1 * LW;
  localparam int OUT1_BASE = 32, W1_BASE = 2048, VM1_BASE = 16;
  localparam int VTH0 = 150, VTH1 = 60;

  logic clk = 0, rst_n = 0;
  logic host_we, host_re, host_rvalid, busy, done;
  logic [23:0] host_addr;
  logic [31:0] host_wdata, host_rdata;

  framefire_top dut (.*);
  always #5 clk = ~clk;

  // ---------------- model of the network ----------------
  int w0 [OUT0][FAN0];
  int w1 [OUT1][FAN1];
  int v0 [OUT0], v1 [OUT1];
  bit in0 [FAN0];
  bit s0 [OUT0], s1 [OUT1];
  int rate [C0];
  int rec_model [C0];
  int sched0 [C0];

  int checks = 0, failures = 0;
  int n_record = 0, n_sched = 0, n_fire = 0, n_global = 0, n_zero = 0,
      n_wait = 0, n_credit = 0, n_ffull = 0, n_speed = 0;
  int key_cycles = 0, bal_cycles = 0, bal_runs = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic wr(input host_target_e t, input int bank, input int a, input int d);
    @(negedge clk); host_we = 1; host_addr = {t, 4'(bank), 16'(a)}; host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask
  task automatic rd(input host_target_e t, input int bank, input int a, output int d);
    @(negedge clk); host_re = 1; host_addr = {t, 4'(bank), 16'(a)};
    @(negedge clk); host_re = 0; d = int'(host_rdata);
  endtask
  task automatic reg_wr(input host_reg_e r, input int d);
    wr(TGT_REG, 0, int'(r), d);
  endtask

  // spike of one neuron of the model, layer in, weights, thresholds
  function automatic int sext16(input int v);
    return (v & 32'h8000) != 0 ? (v | 32'hFFFF_0000) : (v & 32'hFFFF);
  endfunction

  task automatic run_layer(input int layer, input int grp, input int lpc, input int npass,
                           input int inb, input int outb, input int wb, input int vmb,
                           input int vth, input int flags, output int cycles);
    int d;
    reg_wr(REG_LAYER, layer); reg_wr(REG_GROUP, grp); reg_wr(REG_LPC, lpc);
    reg_wr(REG_NPASS, npass); reg_wr(REG_INB, inb); reg_wr(REG_OUTB, outb);
    reg_wr(REG_WB, wb); reg_wr(REG_VMB, vmb); reg_wr(REG_VTH, vth); reg_wr(REG_FLAGS, flags);
    reg_wr(REG_CTRL, 1);
    while (!done) @(negedge clk);
    rd(TGT_REG, 0, int'(REG_CYCLES), cycles);
    rd(TGT_REG, 0, int'(REG_CTRL), d);
    check(d == 0, "idle after done");
  endtask

  // model of one layer: v = v + sum of weights of active inputs, fire, reset
  task automatic model_layer0(input bit vreset);
    for (int o = 0; o < OUT0; o++) begin
      int v; v = v0[o];
      for (int i = 0; i < FAN0; i++) if (in0[i]) v += w0[o][i];
      v = sext16(v);
      s0[o] = v > VTH0;
      if (s0[o] && !vreset) n_fire++;
      v0[o] = vreset ? 0 : (s0[o] ? v - VTH0 : v);
    end
  endtask
  task automatic model_layer1(input bit vreset);
    for (int o = 0; o < OUT1; o++) begin
      int v; v = v1[o];
      for (int i = 0; i < FAN1; i++) if (s0[i]) v += w1[o][i];
      v = sext16(v);
      s1[o] = v > VTH1;
      if (s1[o] && !vreset) n_fire++;
      v1[o] = vreset ? 0 : (s1[o] ? v - VTH1 : v);
    end
  endtask

  task automatic compare_outputs(input int layer);
    int d;
    int nout, outb, vmb;
    nout = (layer == 0) ? OUT0 : OUT1;
    outb = (layer == 0) ? OUT0_BASE : OUT1_BASE;
    vmb  = (layer == 0) ? VM0_BASE : VM1_BASE;
    for (int w = 0; w < nout / LW; w++) begin
      rd(TGT_STATE, 0, outb + w, d);
      for (int b = 0; b < LW; b++)
        check(d[b] == ((layer == 0) ? s0[w*LW+b] : s1[w*LW+b]), $sformatf("layer %0d spike %0d", layer, w*LW+b));
    end
    for (int o = 0; o < nout; o++) begin
      rd(TGT_VMEM, o % N, vmb + o / N, d);
      check(sext16(d) == ((layer == 0) ? v0[o] : v1[o]), $sformatf("layer %0d vmem %0d: %0d vs %0d", layer, o, sext16(d), (layer == 0) ? v0[o] : v1[o]));
    end
  endtask

  // ---------------- mechanism probes ----------------
  for (genvar m = 0; m < M; m++) begin : g_probe
    always @(negedge clk) if (rst_n && busy) begin
      if (dut.u_dc.g_sched[m].u_sched.running && dut.u_dc.g_sched[m].u_sched.need_load &&
          dut.u_dc.g_sched[m].u_sched.k == 0 && dut.u_dc.g_sched[m].u_sched.credits == 0) n_credit++;
      if (dut.u_dc.g_sched[m].u_sched.fifo_full) n_ffull++;
      if (dut.u_dc.g_sched[m].u_sched.det_pop && !dut.u_dc.g_sched[m].u_sched.det_hit &&
          dut.u_dc.g_sched[m].u_sched.det_first) n_zero++;
    end
  end
  always @(negedge clk) if (rst_n && busy)
    if (dut.u_cu.g_cluster[0].u_cluster.psum_valid != '0 && !dut.u_cu.pass_pop) n_wait++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc, d;
    host_we = 0; host_re = 0; host_addr = 0; host_wdata = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    // weights: mostly positive, some negative
    for (int o = 0; o < OUT0; o++)
      for (int i = 0; i < FAN0; i++) w0[o][i] = $urandom_range(0, 40) - 12;
    for (int o = 0; o < OUT1; o++)
      for (int i = 0; i < FAN1; i++) w1[o][i] = $urandom_range(0, 40) - 10;
    for (int o = 0; o < OUT0; o++)
      for (int i = 0; i < FAN0; i++) wr(TGT_WEIGHT, o % N, W0_BASE + (o / N) * FAN0 + i, w0[o][i]);
    for (int o = 0; o < OUT1; o++)
      for (int i = 0; i < FAN1; i++) wr(TGT_WEIGHT, o % N, W1_BASE + (o / N) * FAN1 + i, w1[o][i]);
    for (int o = 0; o < OUT0; o++) begin v0[o] = 0; wr(TGT_VMEM, o % N, VM0_BASE + o / N, 0); end
    for (int o = 0; o < OUT1; o++) begin v1[o] = 0; wr(TGT_VMEM, o % N, VM1_BASE + o / N, 0); end
    // identity schedules
    for (int c = 0; c < C0; c++) begin sched0[c] = c; wr(TGT_SCHED, 0, 0 * 32 + c, c); end
    for (int c = 0; c < C1; c++) wr(TGT_SCHED, 0, 1 * 32 + c, c);
    // per-channel firing probability in 1/16: channels 0 and 1 busy
    rate = '{15, 13, 6, 4, 3, 2, 1, 1};
    for (int c = 0; c < C0; c++) rec_model[c] = 0;
    reg_wr(REG_CTRL, 2);   // clear the record table

    for (int f = 0; f < FRAMES; f++) begin
      bit key, vres;
      key = (f == 0);
      vres = (f == FRAMES - 1);
      for (int t = 0; t < TSTEPS; t++) begin
        bit vr;
        vr = vres && (t == TSTEPS - 1);
        // input spikes of this timestep
        for (int c = 0; c < C0; c++) begin
          int word; word = 0;
          for (int b = 0; b < LW; b++) begin
            in0[c*LW+b] = ($urandom_range(0, 15) < rate[c]);
            if (in0[c*LW+b]) word |= (1 << b);
          end
          if (c == 7 && t == 1) begin word = 0; for (int b = 0; b < LW; b++) in0[c*LW+b] = 0; end
          if (key) rec_model[c] += $countones(word);
          wr(TGT_STATE, 0, IN0_BASE + c, word);
        end
        run_layer(0, G0, 1, P0, IN0_BASE, OUT0_BASE, W0_BASE, VM0_BASE, VTH0,
                  (key ? 2 : 0) | (vr ? 1 : 0), cyc);
        if (key) key_cycles += cyc; else begin bal_cycles += cyc; bal_runs++; end
        model_layer0(vr);
        compare_outputs(0);
        run_layer(1, G1, 1, P1, OUT0_BASE, OUT1_BASE, W1_BASE, VM1_BASE, VTH1,
                  (key ? 2 : 0) | (vr ? 1 : 0), cyc);
        model_layer1(vr);
        compare_outputs(1);
        if (vr) n_global++;
      end
      if (key) begin
        // host: read the record table, sort, regroup, write the schedule
        int wlv [C0];
        int order [C0];
        int gsum [M], gcnt [M];
        for (int c = 0; c < C0; c++) begin
          rd(TGT_RECORD, 0, 0 * 32 + c, d);
          wlv[c] = d;
          check(d == rec_model[c], $sformatf("record ch %0d: %0d vs %0d", c, d, rec_model[c]));
          if (d != 0) n_record++;
        end
        for (int c = 0; c < C0; c++) order[c] = c;
        for (int i = 0; i < C0; i++)
          for (int j = i + 1; j < C0; j++)
            if (wlv[order[j]] > wlv[order[i]]) begin int x; x = order[i]; order[i] = order[j]; order[j] = x; end
        for (int m = 0; m < M; m++) begin gsum[m] = 0; gcnt[m] = 0; end
        for (int i = 0; i < C0; i++) begin
          int best; best = -1;
          for (int m = 0; m < M; m++)
            if (gcnt[m] < G0 && (best < 0 || gsum[m] < gsum[best])) best = m;
          sched0[best * G0 + gcnt[best]] = order[i];
          gsum[best] += wlv[order[i]];
          gcnt[best]++;
        end
        for (int s = 0; s < C0; s++) wr(TGT_SCHED, 0, 0 * 32 + s, sched0[s]);
        n_sched++;
        $display("balanced schedule: %p", sched0);
      end
    end

    $display("layer-0 cycles per timestep: keyframe %0d, balanced frames %0d",
             key_cycles / TSTEPS, bal_cycles / bal_runs);
    check(bal_cycles / bal_runs * 5 < key_cycles / TSTEPS * 4, "balanced schedule at least 1.25x faster");
    if (bal_cycles / bal_runs < key_cycles / TSTEPS) n_speed++;
    $display("mechanisms: record=%0d schedule=%0d speedup=%0d fire=%0d global_reset=%0d empty_list=%0d adder_wait=%0d credit_stall=%0d state_fifo_full=%0d",
             n_record, n_sched, n_speed, n_fire, n_global, n_zero, n_wait, n_credit, n_ffull);
    check(n_record > 0, "workload recorded");
    check(n_sched > 0, "schedule changed");
    check(n_speed > 0, "speed-up");
    check(n_fire > 0, "regular reset");
    check(n_global > 0, "global interval reset");
    check(n_zero > 0, "empty list skipped");
    check(n_wait > 0, "adder tree waited");
    check(n_credit > 0, "credit stall");
    check(n_ffull > 0, "state FIFO full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
