// tb_controller: writes and reads back every configuration register, checks
// the decoding of host accesses to each target (and that buffer writes are
// blocked during a run), then runs a layer: start pulse, busy, the state and
// vmem write-back address, mask and data of every result, done, and the
// cycle count register.
module tb_controller;
  import framefire_pkg::*;
  localparam int N = 4, M = 4, LW = 16, VW = 16, WW = 8;
  logic clk = 0, rst_n = 0;
  logic host_we, host_re, host_rvalid, busy, done, start, rec_clear;
  logic [23:0] host_addr;
  logic [31:0] host_wdata, host_rdata;
  layer_cfg_t cfg;
  logic [ADDR_W-1:0] fan_in;
  logic res_valid;
  logic [N-1:0] res_spike;
  logic sb_wr_en, vm_wr_en;
  logic [ADDR_W-1:0] sb_wr_addr, vm_wr_addr;
  logic [LW-1:0] sb_wr_mask, sb_wr_data;
  logic sb_host_we, sb_host_re, wb_host_we, vm_host_we, vm_host_re, sched_we, rec_rd;
  logic [LW-1:0] sb_host_wdata, sb_host_rdata;
  logic signed [WW-1:0] wb_host_wdata;
  logic signed [VW-1:0] vm_host_wdata, vm_host_rdata;
  logic [CH_W-1:0] sched_data;
  logic [CNT_W-1:0] rec_data;
  logic [3:0] host_bank;
  logic [ADDR_W-1:0] host_word;
  int checks = 0, failures = 0, starts = 0;

  controller #(.N(N), .M(M), .LIST_W(LW), .VM_W(VW), .W_W(WW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [23:0] a, input logic [31:0] d);
    @(negedge clk); host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask
  task automatic rd(input logic [23:0] a, output logic [31:0] d);
    @(negedge clk); host_re = 1; host_addr = a;
    @(negedge clk); host_re = 0;
    check(host_rvalid, "rvalid"); d = host_rdata;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d;
    host_we = 0; host_re = 0; host_addr = 0; host_wdata = 0; res_valid = 0; res_spike = 0;
    sb_host_rdata = 16'hBEEF; vm_host_rdata = -16'sd5; rec_data = 16'd777;
    repeat (2) @(posedge clk); rst_n = 1;
    wr({TGT_REG, 16'h0, 4'(REG_LAYER)}, 3);
    wr({TGT_REG, 16'h0, 4'(REG_GROUP)}, 2);
    wr({TGT_REG, 16'h0, 4'(REG_LPC)}, 3);
    wr({TGT_REG, 16'h0, 4'(REG_NPASS)}, 10);
    wr({TGT_REG, 16'h0, 4'(REG_INB)}, 100);
    wr({TGT_REG, 16'h0, 4'(REG_OUTB)}, 500);
    wr({TGT_REG, 16'h0, 4'(REG_WB)}, 64);
    wr({TGT_REG, 16'h0, 4'(REG_VMB)}, 32);
    wr({TGT_REG, 16'h0, 4'(REG_VTH)}, 32'hFFFF_FF00);
    wr({TGT_REG, 16'h0, 4'(REG_FLAGS)}, 3);
    check(cfg.layer == 3 && cfg.group_size == 2 && cfg.lists_per_ch == 3 && cfg.n_pass == 10, "cfg a");
    check(cfg.in_base == 100 && cfg.out_base == 500 && cfg.w_base == 64 && cfg.vm_base == 32, "cfg b");
    check(cfg.vth == -16'sd256 && cfg.v_reset && cfg.record_en, "cfg c");
    check(fan_in == 16'(2 * M * 3 * LW), "fan_in");
    rd({TGT_REG, 16'h0, 4'(REG_OUTB)}, d); check(d == 500, "read OUTB");
    rd({TGT_REG, 16'h0, 4'(REG_FLAGS)}, d); check(d == 3, "read FLAGS");
    rd({TGT_STATE, 4'h0, 16'h5}, d); check(d == 32'hBEEF, "read state");
    rd({TGT_VMEM, 4'h2, 16'h5}, d); check(d == 32'h0000_FFFB, "read vmem");
    rd({TGT_RECORD, 4'h0, 16'h9}, d); check(d == 777, "read record");
    // decoding of forwarded writes
    @(negedge clk); host_we = 1; host_addr = {TGT_WEIGHT, 4'h3, 16'h12}; host_wdata = 32'h5A;
    #1 check(wb_host_we && !sb_host_we && !vm_host_we && !sched_we && host_bank == 3 && host_word == 16'h12, "weight write decode");
    host_addr = {TGT_SCHED, 4'h0, 16'h21};
    #1 check(sched_we && !wb_host_we && sched_data == CH_W'(32'h5A), "schedule write decode");
    host_addr = {TGT_STATE, 4'h0, 16'h1};
    #1 check(sb_host_we, "state write decode");
    host_addr = {TGT_VMEM, 4'h1, 16'h1};
    #1 check(vm_host_we, "vmem write decode");
    @(negedge clk); host_we = 0;
    // clear record table
    wr({TGT_REG, 16'h0, 4'(REG_CTRL)}, 2);
    // run
    @(negedge clk); host_we = 1; host_addr = {TGT_REG, 16'h0, 4'(REG_CTRL)}; host_wdata = 1;
    @(negedge clk); host_we = 0;
    check(busy && starts == 1, "start and busy");
    @(negedge clk); host_we = 1; host_addr = {TGT_STATE, 4'h0, 16'h1};
    #1 check(!sb_host_we, "buffer write blocked while busy");
    @(negedge clk); host_we = 0;
    for (int p = 0; p < 10; p++) begin
      repeat ($urandom_range(0, 4)) @(negedge clk);
      res_valid = 1; res_spike = N'(p + 5);
      #1;
      check(sb_wr_en && vm_wr_en, "write enables");
      check(sb_wr_addr == 16'(500 + (p * N) / LW), "state word");
      check(sb_wr_mask == 16'(16'hF << ((p * N) % LW)), "state mask");
      begin
        logic [15:0] e;
        e = 16'((p + 5) % 16) << ((p * N) % LW);
        check(sb_wr_data == e, $sformatf("state data %h p=%0d", sb_wr_data, p));
      end
      check(vm_wr_addr == 16'(32 + p), "vmem address");
      @(negedge clk); res_valid = 0;
      if (p < 9) check(busy, "still busy");
    end
    check(!busy, "idle after last result");
    rd({TGT_REG, 16'h0, 4'(REG_CYCLES)}, d); check(d > 10 && d < 60, $sformatf("cycles %0d", d));
    rd({TGT_REG, 16'h0, 4'(REG_CTRL)}, d); check(d == 0, "busy bit low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rec_clear) checks++;
endmodule
