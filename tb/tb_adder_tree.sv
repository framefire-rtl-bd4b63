// tb_adder_tree: random partial sums with random availability; checks that
// the tree pops only when every input is valid and that the registered sum
// appears one cycle later.
module tb_adder_tree;
  localparam int M = 4, VW = 16;
  logic clk = 0, rst_n = 0;
  logic signed [VW-1:0] in_sum [M];
  logic [M-1:0] in_valid;
  logic pop, out_valid;
  logic signed [VW-1:0] out_sum;
  int checks = 0, failures = 0, pops = 0;

  adder_tree #(.M(M), .VM_W(VW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0;
    for (int m = 0; m < M; m++) in_sum[m] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      logic signed [VW-1:0] exp_sum;
      bit exp_pop;
      @(negedge clk);
      exp_sum = 0;
      for (int m = 0; m < M; m++) begin
        in_sum[m] = VW'($urandom_range(0, 4000) - 2000);
        exp_sum += in_sum[m];
      end
      in_valid = M'($urandom) | ((t % 3 == 0) ? '1 : '0);
      exp_pop = &in_valid;
      #1 check(pop == exp_pop, "pop when all valid");
      @(negedge clk);
      check(out_valid == exp_pop, "out_valid one cycle after pop");
      if (exp_pop) begin check(out_sum == exp_sum, "sum"); pops++; end
      in_valid = 0;
    end
    check(pops > 100, "enough pops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
