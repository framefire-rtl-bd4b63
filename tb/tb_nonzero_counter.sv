// tb_nonzero_counter: random enable pulses over channels of random length;
// checks each reported channel total and that report gates the output.
module tb_nonzero_counter;
  import framefire_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en, chan_end, report;
  logic [CH_W-1:0] ch;
  workload_t wl;
  int checks = 0, failures = 0;

  nonzero_counter dut (.*);
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
    en = 0; chan_end = 0; report = 0; ch = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 200; c++) begin
      int len, total;
      bit rep;
      len = $urandom_range(1, 40); total = 0;
      rep = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        en = $urandom_range(0, 1); ch = CH_W'(c); report = rep;
        chan_end = (i == len - 1);
        total += en;
      end
      @(negedge clk);
      en = 0; chan_end = 0;
      check(wl.valid == rep, "valid follows report");
      if (rep) begin
        check(wl.count == CNT_W'(total), $sformatf("count %0d vs %0d", wl.count, total));
        check(wl.ch == CH_W'(c), "channel");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
