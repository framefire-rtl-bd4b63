// tb_data_collection: the workload interpreter and M spike schedulers on a
// layer whose channels are spread over the schedulers by a permuted schedule
// table. Checks, per scheduler, the ordered weight addresses of all active
// connections of its group, one init and one last per pass, the workload
// reports of every channel, and one done pulse after the last beat. Pops are
// given only when every scheduler has finished a pass, as the adder trees do.
module tb_data_collection;
  import framefire_pkg::*;
  localparam int M = 4, C = 32, L = 6, LW = 16, TW = $clog2(L*C);
  localparam int G = 4, LPC = 2, NPASS = 5;
  logic clk = 0, rst_n = 0;
  logic start, pass_pop, busy, done;
  layer_cfg_t cfg;
  logic [ADDR_W-1:0] fan_in;
  logic [TW-1:0] sched_addr [M];
  logic [CH_W-1:0] sched_ch [M];
  logic sb_rd_en [M];
  logic [ADDR_W-1:0] sb_rd_addr [M];
  logic [LW-1:0] sb_rd_data [M];
  pe_item_t item [M];
  workload_t wl [M];
  logic [LW-1:0] smem [512];
  logic [CH_W-1:0] tbl [L*C];
  int exp_q [M][$];
  int exp_wl [C];
  int inits [M], lasts [M];
  int checks = 0, failures = 0, pops = 0, dones = 0, wl_seen = 0, cyc = 0;

  data_collection #(.M(M), .C_MAX(C), .L_MAX(L), .LIST_W(LW), .FIFO_DEPTH(4), .PSUM_CREDITS(4)) dut (.*);
  always #5 clk = ~clk;

  always_comb for (int m = 0; m < M; m++) sched_ch[m] = tbl[sched_addr[m]];
  always_ff @(posedge clk)
    for (int m = 0; m < M; m++) if (sb_rd_en[m]) sb_rd_data[m] <= smem[sb_rd_addr[m][8:0]];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (rst_n) begin
    int minl;
    for (int m = 0; m < M; m++) begin
      if (item[m].valid && item[m].add) begin
        check(exp_q[m].size() > 0 && exp_q[m][0] == 32'(item[m].waddr), $sformatf("sched %0d waddr %0d", m, item[m].waddr));
        if (exp_q[m].size() > 0) void'(exp_q[m].pop_front());
      end
      if (item[m].valid && item[m].init) inits[m]++;
      if (item[m].valid && item[m].last) lasts[m]++;
      if (wl[m].valid) begin
        check(int'(wl[m].count) == exp_wl[wl[m].ch], "workload");
        wl_seen++;
      end
    end
    if (done) dones++;
    minl = lasts[0];
    for (int m = 1; m < M; m++) if (lasts[m] < minl) minl = lasts[m];
    pass_pop = 0;
    if (minl > pops) begin pass_pop = 1; pops++; end
  end

  initial begin
    start = 0; pass_pop = 0; cfg = '0;
    for (int m = 0; m < M; m++) begin inits[m] = 0; lasts[m] = 0; end
    for (int i = 0; i < 512; i++) smem[i] = LW'($urandom) & LW'($urandom) & LW'($urandom);
    // layer 2: channel (slot*5+1) mod 16 in slot order
    for (int e = 0; e < L*C; e++) tbl[e] = '0;
    for (int s = 0; s < M*G; s++) tbl[2*C + s] = CH_W'((s * 5 + 1) % (M*G));
    cfg.layer = 3'd2; cfg.group_size = 8'(G); cfg.lists_per_ch = 8'(LPC); cfg.n_pass = PASS_W'(NPASS);
    cfg.in_base = 16'd40; cfg.w_base = 16'd7; cfg.record_en = 1;
    fan_in = ADDR_W'(M * G * LPC * LW);
    for (int c = 0; c < C; c++) exp_wl[c] = 0;
    for (int m = 0; m < M; m++)
      for (int p = 0; p < NPASS; p++)
        for (int k = 0; k < G; k++) begin
          int ch; ch = int'(tbl[2*C + m*G + k]);
          for (int l = 0; l < LPC; l++) begin
            logic [LW-1:0] w; w = smem[40 + ch * LPC + l];
            if (p == 0) exp_wl[ch] += $countones(w);
            for (int b = 0; b < LW; b++) if (w[b]) exp_q[m].push_back(7 + p * 32'(fan_in) + (ch * LPC + l) * LW + b);
          end
        end
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (dones == 0) begin @(negedge clk); cyc++; end
    repeat (5) @(negedge clk);
    for (int m = 0; m < M; m++) begin
      check(exp_q[m].size() == 0, "all spikes delivered");
      check(inits[m] == NPASS && lasts[m] == NPASS, "init/last per pass");
    end
    check(wl_seen == M * G, "one workload report per channel");
    check(dones == 1 && !busy, "single done, idle");
    $display("cycles=%0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
