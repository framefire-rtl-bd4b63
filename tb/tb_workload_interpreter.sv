// tb_workload_interpreter: random layer, group size, base and slot numbers
// with a table model answering the read ports; checks table addresses,
// channel numbers and start addresses.
module tb_workload_interpreter;
  import framefire_pkg::*;
  localparam int M = 4, C = 32, L = 6, TW = $clog2(L*C);
  layer_cfg_t cfg;
  logic [7:0] slot [M];
  logic [TW-1:0] tbl_addr [M];
  logic [CH_W-1:0] tbl_ch [M];
  logic [CH_W-1:0] slot_ch [M];
  logic [ADDR_W-1:0] slot_addr [M];
  logic [CH_W-1:0] table_m [L*C];
  int checks = 0, failures = 0;

  workload_interpreter #(.M(M), .C_MAX(C), .L_MAX(L)) dut (.*);

  always_comb for (int m = 0; m < M; m++) tbl_ch[m] = table_m[tbl_addr[m]];

  initial begin
    for (int e = 0; e < L*C; e++) table_m[e] = CH_W'($urandom_range(0, C-1));
    cfg = '0;
    for (int t = 0; t < 500; t++) begin
      cfg.layer = LAYER_W'($urandom_range(0, L-1));
      cfg.group_size = 8'($urandom_range(1, C/M));
      cfg.lists_per_ch = 8'($urandom_range(1, 8));
      cfg.in_base = ADDR_W'($urandom);
      for (int m = 0; m < M; m++) slot[m] = 8'($urandom_range(0, cfg.group_size - 1));
      #1;
      for (int m = 0; m < M; m++) begin
        int e;
        e = 32'(cfg.layer) * C + m * 32'(cfg.group_size) + 32'(slot[m]);
        checks += 3;
        if (32'(tbl_addr[m]) != e) failures++;
        if (slot_ch[m] != table_m[e]) failures++;
        if (slot_addr[m] != cfg.in_base + ADDR_W'(table_m[e]) * ADDR_W'(cfg.lists_per_ch)) failures++;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
