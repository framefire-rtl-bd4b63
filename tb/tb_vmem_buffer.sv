// tb_vmem_buffer: host loads and reads, compute writes of N potentials at a
// time and reads of all banks; checked against an array model.
module tb_vmem_buffer;
  import framefire_pkg::*;
  localparam int N = 4, D = 128, VW = 16;
  logic clk = 0;
  logic [ADDR_W-1:0] rd_addr, wr_addr, host_addr;
  logic signed [VW-1:0] rd_data [N], wr_data [N];
  logic wr_en, host_we, host_re;
  logic [3:0] host_bank;
  logic signed [VW-1:0] host_wdata, host_rdata;
  logic signed [VW-1:0] model [N][D];
  int checks = 0, failures = 0;

  vmem_buffer #(.N(N), .DEPTH(D), .VM_W(VW)) dut (.*);
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
    rd_addr = 0; wr_addr = 0; host_addr = 0; wr_en = 0; host_we = 0; host_re = 0; host_bank = 0; host_wdata = 0;
    for (int n = 0; n < N; n++) wr_data[n] = 0;
    for (int n = 0; n < N; n++)
      for (int a = 0; a < D; a++) begin
        @(negedge clk); host_we = 1; host_bank = 4'(n); host_addr = ADDR_W'(a);
        host_wdata = VW'($urandom); model[n][a] = host_wdata;
      end
    @(negedge clk); host_we = 0;
    for (int t = 0; t < 1000; t++) begin
      logic [ADDR_W-1:0] ra, ha; logic [3:0] hb;
      @(negedge clk);
      rd_addr = ADDR_W'($urandom_range(0, D-1)); ra = rd_addr;
      host_re = 1; host_bank = 4'($urandom_range(0, N-1)); host_addr = ADDR_W'($urandom_range(0, D-1));
      hb = host_bank; ha = host_addr;
      wr_en = $urandom_range(0, 1); wr_addr = ADDR_W'($urandom_range(0, D-1));
      for (int n = 0; n < N; n++) wr_data[n] = VW'($urandom);
      @(negedge clk);
      for (int n = 0; n < N; n++) check(rd_data[n] == model[n][ra], "compute read");
      check(host_rdata == model[hb][ha], "host read");
      if (wr_en) for (int n = 0; n < N; n++) model[n][wr_addr] = wr_data[n];
      wr_en = 0; host_re = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
