// tb_pe: drives passes of random length (init on the first beat, last on the
// final one, add beats with random gaps), answers weight and Vmem reads one
// cycle late like the buffers, pops the partial-sum FIFO at random and
// checks every partial sum: Vmem(t) plus the weights of the pass.
module tb_pe;
  import framefire_pkg::*;
  localparam int VW = 16, WW = 8, PD = 4;
  logic clk = 0, rst_n = 0;
  pe_item_t item;
  logic signed [WW-1:0] weight;
  logic signed [VW-1:0] vmem;
  logic psum_pop, psum_valid, psum_full;
  logic signed [VW-1:0] psum;
  logic signed [WW-1:0] wmem [256];
  logic signed [VW-1:0] vmodel [64];
  int expect_q[$];
  int checks = 0, failures = 0, popped = 0, pushed_passes = 0, full_seen = 0;

  pe #(.VM_W(VW), .W_W(WW), .PSUM_DEPTH(PD), .USE_VMEM(1'b1)) dut (.*);
  always #5 clk = ~clk;

  // buffer models: one-cycle read latency
  always_ff @(posedge clk) begin
    weight <= wmem[item.waddr[7:0]];
    vmem   <= vmodel[item.pass[5:0]];
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // consumer
  initial begin
    psum_pop = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      psum_pop = 0;
      if (psum_full) full_seen++;
      if (psum_valid && $urandom_range(0, 3) == 0) begin
        checks++;
        if (expect_q.size() == 0 || VW'(expect_q[0]) != psum) begin
          failures++; $display("FAIL psum %0d", psum);
        end
        if (expect_q.size() > 0) void'(expect_q.pop_front());
        psum_pop = 1; popped++;
      end
    end
  end

  initial begin
    item = '0;
    for (int a = 0; a < 256; a++) wmem[a] = WW'($urandom);
    for (int a = 0; a < 64; a++) vmodel[a] = VW'($urandom_range(0, 2000) - 1000);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int p = 0; p < 300; p++) begin
      int nb, sum;
      nb = $urandom_range(1, 12);
      sum = int'(vmodel[p % 64]);
      for (int b = 0; b < nb; b++) begin
        @(negedge clk);
        while ((pushed_passes - popped) >= PD) begin item = '0; @(negedge clk); end
        if ($urandom_range(0, 2) == 0) begin item = '0; @(negedge clk); end
        item = '0;
        item.valid = 1;
        item.init  = (b == 0);
        item.last  = (b == nb - 1);
        item.add   = (b != 0 && b != nb - 1) ? 1'b1 : ($urandom_range(0, 1) == 1);
        item.waddr = ADDR_W'($urandom_range(0, 255));
        item.pass  = PASS_W'(p % 64);
        if (item.add) sum += int'(wmem[item.waddr[7:0]]);
        if (item.last) begin expect_q.push_back(sum); pushed_passes++; end
      end
      @(negedge clk); item = '0;
    end
    wait (popped == pushed_passes);
    if (full_seen == 0) begin failures++; $display("FAIL FIFO never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
