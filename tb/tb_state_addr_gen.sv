// tb_state_addr_gen: loads random start addresses and list counts, steps
// with random stalls and checks the address sequence, list index and last.
module tb_state_addr_gen;
  import framefire_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load, step, busy, rd_en, last;
  logic [ADDR_W-1:0] start_addr, rd_addr;
  logic [7:0] n_lists, list_idx;
  int checks = 0, failures = 0;

  state_addr_gen dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load = 0; step = 0; start_addr = 0; n_lists = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); check(!busy, "idle after reset");
    for (int t = 0; t < 200; t++) begin
      logic [ADDR_W-1:0] a;
      int n, got;
      a = ADDR_W'($urandom); n = $urandom_range(1, 12); got = 0;
      load = 1; start_addr = a; n_lists = 8'(n); step = 0;
      @(negedge clk); load = 0;
      while (got < n) begin
        step = $urandom_range(0, 3) != 0;
        #1;
        check(busy, "busy while issuing");
        if (step) begin
          check(rd_en, "rd_en");
          check(rd_addr == a + ADDR_W'(got), "address");
          check(list_idx == 8'(got), "list index");
          check(last == (got == n - 1), "last");
          got++;
        end else check(!rd_en, "no read while stalled");
        @(negedge clk);
      end
      check(!busy, "done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
