// tb_index2addr: random spike positions and layer geometry; checks the
// registered weight address against w_base + pass*fan_in + neuron number.
module tb_index2addr;
  import framefire_pkg::*;
  localparam int LW = 16;
  logic clk = 0;
  logic [CH_W-1:0] ch;
  logic [7:0] list_idx, lists_per_ch;
  logic [$clog2(LW)-1:0] index;
  logic [PASS_W-1:0] pass;
  logic [ADDR_W-1:0] fan_in, w_base, waddr;
  int checks = 0, failures = 0;

  index2addr #(.LIST_W(LW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int unsigned exp;
      @(negedge clk);
      lists_per_ch = 8'($urandom_range(1, 8));
      ch = CH_W'($urandom_range(0, 31));
      list_idx = 8'($urandom_range(0, lists_per_ch - 1));
      index = 4'($urandom);
      fan_in = ADDR_W'($urandom_range(16, 4096));
      pass = PASS_W'($urandom_range(0, 15));
      w_base = ADDR_W'($urandom);
      exp = (32'(w_base) + 32'(pass) * 32'(fan_in) + (32'(ch) * 32'(lists_per_ch) + 32'(list_idx)) * LW + 32'(index)) & 32'hFFFF;
      @(negedge clk);
      checks++;
      if (32'(waddr) != exp) begin failures++; $display("FAIL %h vs %h", waddr, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
