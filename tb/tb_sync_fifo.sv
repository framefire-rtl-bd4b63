// tb_sync_fifo: random pushes and pops against a queue model; checks head
// word, empty, full and count every cycle, and that a full FIFO accepts a
// push when popped in the same cycle.
module tb_sync_fifo;
  localparam int W = 12, D = 4;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, saw_full = 0, both_full = 0;
  logic [W-1:0] q[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == D), "full");
      check(count == q.size(), "count");
      if (q.size() > 0) check(dout == q[0], "head");
      if (full) saw_full++;
      pop  = (q.size() > 0) && ($urandom_range(0, 2) == 0 || (i % 200) > 150);
      push = ((q.size() < D) || pop) && ((i % 200) < 100 ? $urandom_range(0, 1) == 1 : $urandom_range(0, 3) == 0);
      if (full && push && pop) both_full++;
      din  = W'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    check(saw_full > 0, "FIFO never became full");
    $display("full=%0d push+pop on full=%0d", saw_full, both_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
