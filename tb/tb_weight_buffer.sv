// tb_weight_buffer: fills every bank through the host port, then reads all
// M ports of all N banks at random addresses and checks the data one cycle
// later.
module tb_weight_buffer;
  import framefire_pkg::*;
  localparam int N = 4, M = 4, D = 256, WW = 8;
  logic clk = 0;
  logic [ADDR_W-1:0] rd_addr [M];
  logic signed [WW-1:0] rd_data [N][M];
  logic host_we;
  logic [3:0] host_bank;
  logic [ADDR_W-1:0] host_addr;
  logic signed [WW-1:0] host_wdata;
  logic signed [WW-1:0] model [N][D];
  int checks = 0, failures = 0;

  weight_buffer #(.N(N), .M(M), .DEPTH(D), .W_W(WW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    host_we = 0; host_bank = 0; host_addr = 0; host_wdata = 0;
    for (int m = 0; m < M; m++) rd_addr[m] = 0;
    for (int n = 0; n < N; n++)
      for (int a = 0; a < D; a++) begin
        @(negedge clk); host_we = 1; host_bank = 4'(n); host_addr = ADDR_W'(a);
        host_wdata = WW'($urandom); model[n][a] = host_wdata;
      end
    @(negedge clk); host_we = 0;
    for (int t = 0; t < 1000; t++) begin
      logic [ADDR_W-1:0] ra [M];
      @(negedge clk);
      for (int m = 0; m < M; m++) begin rd_addr[m] = ADDR_W'($urandom_range(0, D-1)); ra[m] = rd_addr[m]; end
      @(negedge clk);
      for (int n = 0; n < N; n++)
        for (int m = 0; m < M; m++) begin
          checks++;
          if (rd_data[n][m] != model[n][ra[m]]) begin failures++; $display("FAIL bank %0d port %0d", n, m); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
