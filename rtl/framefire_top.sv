// framefire_top: FrameFire, an event-driven spiking neural network
// accelerator for video that balances the work of its PEs with the
// Keyframe-dominated Workload Balance Schedule (KWBS).
//
// Blocks: controller; neuron state buffer, membrane potential buffer and
// weight buffers; workload record-and-schedule unit; data collection unit
// (workload interpreter and M spike schedulers); computing unit (N clusters
// of M PEs, adder tree and reset-and-spike unit). Spike scheduler m scans the
// input channels listed in group m of the schedule table and drives PE m of
// every cluster with the weight addresses of the active connections, so the
// time of an output pass is set by the busiest group. On a keyframe the
// schedulers also record the active connections of every channel; the host
// reads that record, sorts and regroups the channels into M balanced groups
// and writes them back to the schedule table, which then steers the
// following frames.
//
// Interface: a simple host bus (host_we / host_re, 24-bit address, 32-bit
// data, read data one cycle later with host_rvalid) reaches every buffer and
// table and the control registers; busy is high during a layer run and done
// pulses at its end. The document's DMA and DDR sit outside this port. The
// block structure follows the document; sizes where it gives none (N, M,
// buffer depths, widths) and all interfaces are this implementation's
// choice, see the README.
module framefire_top
  import framefire_pkg::*;
#(
  parameter int unsigned N          = 4,     // PE clusters
  parameter int unsigned M          = 4,     // PEs per cluster = spike schedulers
  parameter int unsigned C_MAX      = 32,    // channels per layer, table width
  parameter int unsigned L_MAX      = 6,     // layers, table height
  parameter int unsigned LIST_W     = 16,    // bits per neuron state list
  parameter int unsigned SB_DEPTH   = 4096,  // state buffer words
  parameter int unsigned WB_DEPTH   = 4096,  // weight words per cluster bank
  parameter int unsigned VM_DEPTH   = 1024,  // potentials per cluster bank
  parameter int unsigned VM_W       = 16,
  parameter int unsigned W_W        = 8,
  parameter int unsigned FIFO_DEPTH = 4,     // neuron state list FIFO
  parameter int unsigned PSUM_DEPTH = 4      // PE partial-sum FIFO
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        host_we,
  input  logic        host_re,
  input  logic [23:0] host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  output logic        host_rvalid,
  output logic        busy,
  output logic        done
);
  localparam int unsigned TW = $clog2(L_MAX * C_MAX);

  layer_cfg_t        cfg;
  logic [ADDR_W-1:0] fan_in;
  logic              start, rec_clear;

  // host forwarding
  logic                   sb_host_we, sb_host_re, wb_host_we, vm_host_we, vm_host_re;
  logic                   sched_we, rec_rd;
  logic [LIST_W-1:0]      sb_host_wdata, sb_host_rdata;
  logic signed [W_W-1:0]  wb_host_wdata;
  logic signed [VM_W-1:0] vm_host_wdata, vm_host_rdata;
  logic [CH_W-1:0]        sched_data;
  logic [CNT_W-1:0]       rec_data;
  logic [3:0]             host_bank;
  logic [ADDR_W-1:0]      host_word;

  // data collection
  logic [TW-1:0]     sched_addr [M];
  logic [CH_W-1:0]   sched_ch   [M];
  logic              sb_rd_en   [M];
  logic [ADDR_W-1:0] sb_rd_addr [M];
  logic [LIST_W-1:0] sb_rd_data [M];
  pe_item_t          item       [M];
  workload_t         wl         [M];
  logic              dc_busy, dc_done;
  logic [ADDR_W-1:0] w_rd_addr  [M];

  // computing unit
  logic signed [W_W-1:0]  weight    [N][M];
  logic signed [VM_W-1:0] vmem_rd   [N];
  logic signed [VM_W-1:0] vmem_next [N];
  logic                   pass_pop, res_valid;
  logic [N-1:0]           res_spike;

  // write-back
  logic              sb_wr_en, vm_wr_en;
  logic [ADDR_W-1:0] sb_wr_addr, vm_wr_addr;
  logic [LIST_W-1:0] sb_wr_mask, sb_wr_data;

  controller #(
    .N(N), .M(M), .LIST_W(LIST_W), .VM_W(VM_W), .W_W(W_W)
  ) u_ctrl (
    .clk, .rst_n, .host_we, .host_re, .host_addr, .host_wdata, .host_rdata, .host_rvalid,
    .busy, .done, .cfg, .fan_in, .start, .rec_clear,
    .res_valid, .res_spike,
    .sb_wr_en, .sb_wr_addr, .sb_wr_mask, .sb_wr_data, .vm_wr_en, .vm_wr_addr,
    .sb_host_we, .sb_host_re, .sb_host_wdata, .sb_host_rdata,
    .wb_host_we, .wb_host_wdata,
    .vm_host_we, .vm_host_re, .vm_host_wdata, .vm_host_rdata,
    .sched_we, .sched_data, .rec_rd, .rec_data, .host_bank, .host_word
  );

  state_buffer #(.DEPTH(SB_DEPTH), .LIST_W(LIST_W), .M(M)) u_sb (
    .clk, .rd_en(sb_rd_en), .rd_addr(sb_rd_addr), .rd_data(sb_rd_data),
    .wr_en(sb_wr_en), .wr_addr(sb_wr_addr), .wr_mask(sb_wr_mask), .wr_data(sb_wr_data),
    .host_we(sb_host_we), .host_re(sb_host_re), .host_addr(host_word),
    .host_wdata(sb_host_wdata), .host_rdata(sb_host_rdata)
  );

  record_and_schedule #(.M(M), .C_MAX(C_MAX), .L_MAX(L_MAX)) u_rs (
    .clk, .rst_n, .layer(cfg.layer), .wl, .clear(rec_clear),
    .host_rec_rd(rec_rd), .host_rec_addr(TW'(host_word)), .host_rec_data(rec_data),
    .host_sched_we(sched_we), .host_sched_addr(TW'(host_word)), .host_sched_data(sched_data),
    .sched_addr, .sched_ch
  );

  data_collection #(
    .M(M), .C_MAX(C_MAX), .L_MAX(L_MAX), .LIST_W(LIST_W),
    .FIFO_DEPTH(FIFO_DEPTH), .PSUM_CREDITS(PSUM_DEPTH)
  ) u_dc (
    .clk, .rst_n, .start, .cfg, .fan_in,
    .sched_addr, .sched_ch, .sb_rd_en, .sb_rd_addr, .sb_rd_data,
    .pass_pop, .item, .wl, .busy(dc_busy), .done(dc_done)
  );

  always_comb begin
    for (int m = 0; m < M; m++) w_rd_addr[m] = item[m].waddr;
  end

  weight_buffer #(.N(N), .M(M), .DEPTH(WB_DEPTH), .W_W(W_W)) u_wb (
    .clk, .rd_addr(w_rd_addr), .rd_data(weight),
    .host_we(wb_host_we), .host_bank, .host_addr(host_word), .host_wdata(wb_host_wdata)
  );

  vmem_buffer #(.N(N), .DEPTH(VM_DEPTH), .VM_W(VM_W)) u_vm (
    .clk, .rd_addr(cfg.vm_base + ADDR_W'(item[0].pass)), .rd_data(vmem_rd),
    .wr_en(vm_wr_en), .wr_addr(vm_wr_addr), .wr_data(vmem_next),
    .host_we(vm_host_we), .host_re(vm_host_re), .host_bank, .host_addr(host_word),
    .host_wdata(vm_host_wdata), .host_rdata(vm_host_rdata)
  );

  computing_unit #(
    .N(N), .M(M), .VM_W(VM_W), .W_W(W_W), .PSUM_DEPTH(PSUM_DEPTH)
  ) u_cu (
    .clk, .rst_n, .item, .weight, .vmem(vmem_rd), .vth(cfg.vth), .v_reset(cfg.v_reset),
    .pass_pop, .out_valid(res_valid), .spike(res_spike), .vmem_next
  );

  // the data collection unit has finished by the time the last result is in
  a_dc_idle_at_done: assert property (@(posedge clk) disable iff (!rst_n)
                                      done |-> !dc_busy);
  // a pass must fit in one state word
  initial assert (LIST_W % N == 0) else $error("LIST_W must be a multiple of N");
endmodule
