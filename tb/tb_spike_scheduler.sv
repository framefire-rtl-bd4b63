// tb_spike_scheduler: one spike scheduler on a random layer (state buffer
// and interpreter modelled in the testbench). Checks the exact beat stream
// of every pass (weight address of every spike, in channel, list and bit
// order; init and last flags), the per-channel workload reports of pass 0,
// the credit stall when partial sums are not popped, and the cycle count
// against the spike count (one spike per cycle, an empty list in one cycle).
module tb_spike_scheduler;
  import framefire_pkg::*;
  localparam int LW = 16, FD = 4, PC = 2;
  localparam int G = 5, LPC = 3, NPASS = 6, NCH = 20;
  logic clk = 0, rst_n = 0;
  logic start, pass_pop, busy, done;
  layer_cfg_t cfg;
  logic [ADDR_W-1:0] fan_in;
  logic [7:0] slot;
  logic [CH_W-1:0] slot_ch;
  logic [ADDR_W-1:0] slot_addr;
  logic sb_rd_en;
  logic [ADDR_W-1:0] sb_rd_addr;
  logic [LW-1:0] sb_rd_data;
  pe_item_t item;
  workload_t wl;
  logic [LW-1:0] smem [256];
  int group [G];
  int exp_addr [$];
  int exp_flags [$];
  int exp_wl [G];
  int checks = 0, failures = 0, lasts = 0, pops = 0, wl_seen = 0, stalls = 0;
  int cyc, cost;

  spike_scheduler #(.LIST_W(LW), .FIFO_DEPTH(FD), .PSUM_CREDITS(PC)) dut (.*);
  always #5 clk = ~clk;

  // models: interpreter (combinational) and state buffer (one-cycle read)
  assign slot_ch   = CH_W'(group[slot]);
  assign slot_addr = cfg.in_base + ADDR_W'(group[slot] * LPC);
  always_ff @(posedge clk) if (sb_rd_en) sb_rd_data <= smem[sb_rd_addr[7:0]];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // beat checker
  always @(negedge clk) if (rst_n && item.valid) begin
    check(exp_addr.size() > 0, "unexpected beat");
    if (exp_addr.size() > 0) begin
      int fl; int a;
      a = exp_addr.pop_front(); fl = exp_flags.pop_front();
      check({item.init, item.add, item.last} == 3'(fl), $sformatf("flags %b exp %b", {item.init, item.add, item.last}, 3'(fl)));
      if (item.add) check(32'(item.waddr) == a, $sformatf("waddr %0d exp %0d", item.waddr, a));
    end
    if (item.last) lasts++;
  end
  always @(negedge clk) if (rst_n && wl.valid) begin
    int k; k = -1;
    for (int i = 0; i < G; i++) if (group[i] == int'(wl.ch)) k = i;
    check(k >= 0 && int'(wl.count) == exp_wl[k], $sformatf("workload ch %0d = %0d", wl.ch, wl.count));
    wl_seen++;
  end

  // credit rule: passes finished never run ahead of pops by more than PC
  always @(negedge clk) if (rst_n) begin
    if (lasts - pops > PC) begin failures++; $display("FAIL credit"); end
    if (busy && lasts - pops == PC && !item.valid) stalls++;
  end

  task automatic build_expect();
    exp_addr.delete(); exp_flags.delete(); cost = 0;
    for (int k = 0; k < G; k++) exp_wl[k] = 0;
    for (int p = 0; p < NPASS; p++) begin
      int n0; n0 = exp_addr.size();
      for (int k = 0; k < G; k++)
        for (int l = 0; l < LPC; l++) begin
          logic [LW-1:0] w;
          w = smem[32'(cfg.in_base) + group[k] * LPC + l];
          cost += ($countones(w) == 0) ? 1 : $countones(w);
          if (p == 0) exp_wl[k] += $countones(w);
          for (int b = 0; b < LW; b++) if (w[b]) begin
            exp_addr.push_back(32'(cfg.w_base) + p * 32'(fan_in) + (group[k] * LPC + l) * LW + b);
            exp_flags.push_back(3'b010);
          end
        end
      // init goes on the first beat, last on the final one; add-less beats
      // appear when the first or last list has no spike
      begin
        logic [LW-1:0] wf, wlst;
        wf = smem[32'(cfg.in_base) + group[0] * LPC];
        wlst = smem[32'(cfg.in_base) + group[G-1] * LPC + LPC - 1];
        if (wf == 0) begin exp_addr.insert(n0, 0); exp_flags.insert(n0, 3'b100); end
        else exp_flags[n0] |= 3'b100;
        if (wlst == 0) begin exp_addr.push_back(0); exp_flags.push_back(3'b001); end
        else exp_flags[exp_flags.size()-1] |= 3'b001;
        // a single beat can carry init and last when the pass has one beat
        if (exp_addr.size() - n0 == 2 && exp_flags[n0] == 3'b100 && exp_flags[n0+1] == 3'b001) begin
          exp_flags[n0] = 3'b101; exp_addr.delete(n0 + 1); exp_flags.delete(n0 + 1);
        end
      end
    end
  endtask

  task automatic run(input bit slow_pop, input int rec);
    lasts = 0; pops = 0; wl_seen = 0;
    cfg.record_en = rec;
    build_expect();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk); cyc++;
      pass_pop = 0;
      if (lasts > pops && (!slow_pop || $urandom_range(0, 15) == 0)) begin pass_pop = 1; pops++; end
    end
    @(negedge clk); pass_pop = 0;
    while (pops < lasts) begin pass_pop = 1; pops++; @(negedge clk); end
    pass_pop = 0;
    check(exp_addr.size() == 0, "all beats delivered");
    check(lasts == NPASS, "one last beat per pass");
    check(wl_seen == (rec ? G : 0), "workload reports");
    $display("cycles=%0d spike cost=%0d", cyc, cost);
  endtask

  initial begin
    start = 0; pass_pop = 0; cfg = '0;
    for (int i = 0; i < 256; i++) begin
      smem[i] = LW'($urandom) & LW'($urandom) & LW'($urandom);
      if (i % 7 == 0) smem[i] = '0;
    end
    cfg.in_base = 16'd10; cfg.lists_per_ch = 8'(LPC); cfg.group_size = 8'(G);
    cfg.n_pass = PASS_W'(NPASS); cfg.w_base = 16'd100; cfg.layer = 0;
    fan_in = ADDR_W'(NCH * LPC * LW);
    for (int k = 0; k < G; k++) group[k] = (k * 7 + 3) % NCH;
    repeat (2) @(posedge clk); rst_n = 1;
    run(1'b0, 1);
    check(cyc <= cost + NPASS * G + 12, "throughput: about one spike per cycle");
    check(cyc >= cost, "cannot beat one spike per cycle");
    // slow consumer: credits must stall the scheduler
    for (int k = 0; k < G; k++) group[k] = (k * 3 + 1) % NCH;
    run(1'b1, 0);
    check(stalls > 0, "credit stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
