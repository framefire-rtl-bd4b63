// tb_computing_unit: N clusters of M PEs fed by M independent beat streams
// of random length and timing (so PEs finish a pass at different times).
// Each cluster has its own weight bank and Vmem(t). Checks, in pass order,
// every cluster's spike and Vmem(t+1) against a model of
// Vmem(t) + sum of weights, threshold and reset, with both reset modes.
// Counts passes where the adder tree had to wait for a late PE.
module tb_computing_unit;
  import framefire_pkg::*;
  localparam int N = 4, M = 4, VW = 16, WW = 8, PD = 4, P = 200;
  logic clk = 0, rst_n = 0;
  pe_item_t item [M];
  logic signed [WW-1:0] weight [N][M];
  logic signed [VW-1:0] vmem [N];
  logic signed [VW-1:0] vth;
  logic v_reset, pass_pop, out_valid;
  logic [N-1:0] spike;
  logic signed [VW-1:0] vmem_next [N];
  logic signed [WW-1:0] wmem [N][256];
  logic signed [VW-1:0] vmodel [N][P];
  int psum_m [N][P];
  int pass_started [M];
  int pops = 0, outs = 0, checks = 0, failures = 0, waits = 0, fires = 0;

  computing_unit #(.N(N), .M(M), .VM_W(VW), .W_W(WW), .PSUM_DEPTH(PD)) dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    for (int n = 0; n < N; n++) begin
      for (int m = 0; m < M; m++) weight[n][m] <= wmem[n][item[m].waddr[7:0]];
      vmem[n] <= vmodel[n][item[0].pass];
    end
    if (!rst_n) pops <= 0;
    else if (pass_pop) pops <= pops + 1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  for (genvar m = 0; m < M; m++) begin : g_drv
    initial begin
      item[m] = '0;
      pass_started[m] = 0;
      wait (rst_n);
      for (int p = 0; p < P; p++) begin
        int nb;
        nb = $urandom_range(1, 3 + 6 * m);
        @(negedge clk);
        while (p - pops >= PD) @(negedge clk);
        pass_started[m]++;
        for (int b = 0; b < nb; b++) begin
          item[m] = '0;
          item[m].valid = 1;
          item[m].init = (b == 0);
          item[m].last = (b == nb - 1);
          item[m].add = $urandom_range(0, 3) != 0;
          item[m].waddr = ADDR_W'($urandom_range(0, 255));
          item[m].pass = PASS_W'(p);
          if (item[m].add)
            for (int n = 0; n < N; n++) psum_m[n][p] += int'(wmem[n][item[m].waddr[7:0]]);
          @(negedge clk);
          item[m] = '0;
          if ($urandom_range(0, 3) == 0) @(negedge clk);
        end
      end
    end
  end

  // the adder tree waits when at least one PE has no sum queued
  always @(negedge clk) if (rst_n && !pass_pop && (dut.g_cluster[0].u_cluster.psum_valid != '0)) waits++;

  initial begin
    vth = 16'sd150; v_reset = 0;
    for (int n = 0; n < N; n++)
      for (int a = 0; a < 256; a++) wmem[n][a] = WW'($urandom_range(0, 80) - 20);
    for (int n = 0; n < N; n++)
      for (int p = 0; p < P; p++) begin vmodel[n][p] = VW'($urandom_range(0, 300) - 100); psum_m[n][p] = int'(vmodel[n][p]); end
    repeat (2) @(posedge clk); rst_n = 1;
    while (outs < P) begin
      @(negedge clk);
      v_reset = (outs >= P - 20);
      if (out_valid) begin
        for (int n = 0; n < N; n++) begin
          int v; bit f; int e;
          v = int'(VW'(psum_m[n][outs]));
          v = (v >= 32768) ? v - 65536 : v;
          f = v > 150;
          e = v_reset ? 0 : (f ? v - 150 : v);
          fires += f;
          checks += 2;
          if (spike[n] != f) begin failures++; $display("FAIL spike n=%0d p=%0d", n, outs); end
          if (vmem_next[n] != VW'(e)) begin failures++; $display("FAIL vmem n=%0d p=%0d got %0d exp %0d", n, outs, vmem_next[n], e); end
        end
        outs++;
      end
    end
    checks++;
    if (waits == 0 || fires == 0) begin failures++; $display("FAIL no waits/fires"); end
    $display("adder tree waits=%0d fires=%0d", waits, fires);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
