// tb_reset_and_spike: random potentials around the threshold, both reset
// modes; checks spike (strictly above Vth), Vmem(t+1) and the one-cycle
// latency. Counts regular resets, global resets and quiet neurons.
module tb_reset_and_spike;
  localparam int VW = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid, v_reset, out_valid, spike;
  logic signed [VW-1:0] vtemp, vth, vmem_next;
  int checks = 0, failures = 0, n_fire = 0, n_global = 0, n_quiet = 0;

  reset_and_spike #(.VM_W(VW)) dut (.*);
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
    in_valid = 0; v_reset = 0; vtemp = 0; vth = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      int v, th; bit gr, f; int expv;
      th = $urandom_range(1, 200);
      v  = (t % 7 == 0) ? th : (t % 7 == 1) ? th + 1 : $urandom_range(0, 600) - 300;
      gr = ($urandom_range(0, 4) == 0);
      @(negedge clk);
      in_valid = 1; vtemp = VW'(v); vth = VW'(th); v_reset = gr;
      f = v > th;
      expv = gr ? 0 : (f ? v - th : v);
      @(negedge clk);
      in_valid = 0;
      check(out_valid, "latency one cycle");
      check(spike == f, $sformatf("spike v=%0d th=%0d", v, th));
      check(vmem_next == VW'(expv), $sformatf("vmem v=%0d th=%0d gr=%0d got %0d", v, th, gr, vmem_next));
      if (gr) n_global++; else if (f) n_fire++; else n_quiet++;
      @(negedge clk);
      check(!out_valid, "single pulse");
    end
    check(n_global > 0 && n_fire > 0 && n_quiet > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
