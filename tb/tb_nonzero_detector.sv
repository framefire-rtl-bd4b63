// tb_nonzero_detector: feeds random neuron state lists (including all-zero
// and all-one words) and checks that every set bit is reported once, lowest
// first, that a word takes max(popcount,1) cycles, and that en stalls it.
module tb_nonzero_detector;
  localparam int LW = 16;
  logic clk = 0, rst_n = 0;
  logic en, head_valid, pop, hit, first;
  logic [LW-1:0] head_word;
  logic [$clog2(LW)-1:0] index;
  int checks = 0, failures = 0;

  nonzero_detector #(.LIST_W(LW)) dut (.*);
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
    en = 1; head_valid = 0; head_word = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int w = 0; w < 400; w++) begin
      logic [LW-1:0] word, seen;
      int cyc, expect_cyc, nbits;
      word = (w == 0) ? '0 : (w == 1) ? '1 : LW'($urandom) & LW'($urandom);
      nbits = $countones(word);
      expect_cyc = (nbits == 0) ? 1 : nbits;
      seen = '0; cyc = 0;
      @(negedge clk);
      head_valid = 1; head_word = word;
      forever begin
        en = ($urandom_range(0, 4) != 0);
        #1;
        if (en) begin
          cyc++;
          check(first == (cyc == 1), "first flag");
          if (nbits != 0) begin
            check(hit, "hit expected");
            check(word[index] && !seen[index], "index is a new set bit");
            check((word & ~seen & ((LW'(1) << index) - 1)) == 0, "lowest first");
            seen[index] = 1'b1;
          end else check(!hit, "no hit on zero word");
        end else check(!hit && !pop, "stalled");
        if (pop) break;
        @(negedge clk);
      end
      check(seen == word, "all bits reported");
      check(cyc == expect_cyc, $sformatf("cycles %0d vs %0d", cyc, expect_cyc));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
