// tb_record_and_schedule: workload reports from M schedulers at once
// accumulate per (layer, channel); clear empties the record table; the host
// reads it back. Schedule entries written by the host appear on the M
// interpreter ports.
module tb_record_and_schedule;
  import framefire_pkg::*;
  localparam int M = 4, C = 32, L = 6, TW = $clog2(L*C);
  logic clk = 0, rst_n = 0;
  logic [LAYER_W-1:0] layer;
  workload_t wl [M];
  logic clear, host_rec_rd, host_sched_we;
  logic [TW-1:0] host_rec_addr, host_sched_addr;
  logic [CNT_W-1:0] host_rec_data;
  logic [CH_W-1:0] host_sched_data;
  logic [TW-1:0] sched_addr [M];
  logic [CH_W-1:0] sched_ch [M];
  int rec_model [L*C];
  int sch_model [L*C];
  int checks = 0, failures = 0;

  record_and_schedule #(.M(M), .C_MAX(C), .L_MAX(L)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic read_all();
    for (int e = 0; e < L*C; e++) begin
      @(negedge clk); host_rec_rd = 1; host_rec_addr = TW'(e);
      @(negedge clk); host_rec_rd = 0;
      check(32'(host_rec_data) == rec_model[e], $sformatf("record %0d", e));
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    layer = 0; clear = 0; host_rec_rd = 0; host_sched_we = 0; host_rec_addr = 0; host_sched_addr = 0; host_sched_data = 0;
    for (int m = 0; m < M; m++) begin wl[m] = '0; sched_addr[m] = 0; end
    for (int e = 0; e < L*C; e++) rec_model[e] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // schedule table
    for (int e = 0; e < L*C; e++) begin
      @(negedge clk); host_sched_we = 1; host_sched_addr = TW'(e);
      host_sched_data = CH_W'($urandom_range(0, C-1)); sch_model[e] = host_sched_data;
    end
    @(negedge clk); host_sched_we = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int m = 0; m < M; m++) sched_addr[m] = TW'($urandom_range(0, L*C-1));
      #1;
      for (int m = 0; m < M; m++) check(32'(sched_ch[m]) == sch_model[sched_addr[m]], "schedule port");
    end
    // workload reports, disjoint channels per cycle
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      layer = LAYER_W'($urandom_range(0, L-1));
      for (int m = 0; m < M; m++) begin
        wl[m].valid = $urandom_range(0, 1);
        wl[m].ch    = CH_W'(m * 8 + $urandom_range(0, 7));
        wl[m].count = CNT_W'($urandom_range(0, 300));
        if (wl[m].valid) rec_model[32'(layer) * C + 32'(wl[m].ch)] += 32'(wl[m].count);
      end
    end
    @(negedge clk);
    for (int m = 0; m < M; m++) wl[m] = '0;
    read_all();
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int e = 0; e < L*C; e++) rec_model[e] = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
