// tb_state_buffer: host writes, masked output-state writes and reads on all
// M ports against an array model; checks one-cycle read latency and that a
// masked write leaves the other bits alone.
module tb_state_buffer;
  import framefire_pkg::*;
  localparam int D = 256, LW = 16, M = 4;
  logic clk = 0;
  logic rd_en [M];
  logic [ADDR_W-1:0] rd_addr [M];
  logic [LW-1:0] rd_data [M];
  logic wr_en, host_we, host_re;
  logic [ADDR_W-1:0] wr_addr, host_addr;
  logic [LW-1:0] wr_mask, wr_data, host_wdata, host_rdata;
  logic [LW-1:0] model [D];
  int checks = 0, failures = 0;

  state_buffer #(.DEPTH(D), .LIST_W(LW), .M(M)) dut (.*);
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
    wr_en = 0; host_we = 0; host_re = 0; wr_addr = 0; host_addr = 0; wr_mask = 0; wr_data = 0; host_wdata = 0;
    for (int m = 0; m < M; m++) begin rd_en[m] = 0; rd_addr[m] = 0; end
    for (int a = 0; a < D; a++) begin
      @(negedge clk); host_we = 1; host_addr = ADDR_W'(a); host_wdata = LW'($urandom); model[a] = host_wdata;
    end
    @(negedge clk); host_we = 0;
    for (int t = 0; t < 2000; t++) begin
      logic [ADDR_W-1:0] ra [M];
      @(negedge clk);
      for (int m = 0; m < M; m++) begin rd_en[m] = 1; rd_addr[m] = ADDR_W'($urandom_range(0, D-1)); ra[m] = rd_addr[m]; end
      host_re = 1; host_addr = ADDR_W'($urandom_range(0, D-1));
      wr_en = $urandom_range(0, 1); wr_addr = ADDR_W'($urandom_range(0, D-1));
      wr_mask = LW'(4'hF) << (4 * $urandom_range(0, 3)); wr_data = LW'($urandom);
      @(negedge clk);
      for (int m = 0; m < M; m++) check(rd_data[m] == model[ra[m]], "read port");
      check(host_rdata == model[host_addr], "host read");
      if (wr_en) model[wr_addr] = (model[wr_addr] & ~wr_mask) | (wr_data & wr_mask);
      wr_en = 0; host_re = 0;
      for (int m = 0; m < M; m++) rd_en[m] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
