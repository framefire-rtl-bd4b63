// data_collection: the data collection unit, a workload interpreter and M
// spike schedulers started together.
//
// Scheduler m serves channel group m of the current layer and drives PE m of
// every cluster. Each scheduler has its own read port on the neuron state
// buffer and its own port on the workload schedule table (through the
// interpreter), so the M groups are scanned in parallel and independently;
// balance between the groups decides how long a pass takes. done pulses once
// every scheduler has delivered its last beat. Composition follows the
// document's figures; port shapes are this implementation's choice.
module data_collection
  import framefire_pkg::*;
#(
  parameter int unsigned M            = 4,
  parameter int unsigned C_MAX        = 32,
  parameter int unsigned L_MAX        = 6,
  parameter int unsigned LIST_W       = 16,
  parameter int unsigned FIFO_DEPTH   = 4,
  parameter int unsigned PSUM_CREDITS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  layer_cfg_t        cfg,
  input  logic [ADDR_W-1:0] fan_in,
  // workload schedule table ports
  output logic [$clog2(L_MAX*C_MAX)-1:0] sched_addr [M],
  input  logic [CH_W-1:0]   sched_ch   [M],
  // neuron state buffer read ports
  output logic              sb_rd_en   [M],
  output logic [ADDR_W-1:0] sb_rd_addr [M],
  input  logic [LIST_W-1:0] sb_rd_data [M],
  // PEs and record table
  input  logic              pass_pop,
  output pe_item_t          item [M],
  output workload_t         wl   [M],
  output logic              busy,
  output logic              done
);
  logic [7:0]        slot      [M];
  logic [CH_W-1:0]   slot_ch   [M];
  logic [ADDR_W-1:0] slot_addr [M];
  logic [M-1:0]      s_busy, s_done, finished;

  workload_interpreter #(.M(M), .C_MAX(C_MAX), .L_MAX(L_MAX)) u_interp (
    .cfg, .slot, .tbl_addr(sched_addr), .tbl_ch(sched_ch), .slot_ch, .slot_addr
  );

  for (genvar m = 0; m < M; m++) begin : g_sched
    spike_scheduler #(
      .LIST_W(LIST_W), .FIFO_DEPTH(FIFO_DEPTH), .PSUM_CREDITS(PSUM_CREDITS)
    ) u_sched (
      .clk, .rst_n, .start, .cfg, .fan_in,
      .slot(slot[m]), .slot_ch(slot_ch[m]), .slot_addr(slot_addr[m]),
      .sb_rd_en(sb_rd_en[m]), .sb_rd_addr(sb_rd_addr[m]), .sb_rd_data(sb_rd_data[m]),
      .pass_pop, .item(item[m]), .wl(wl[m]), .busy(s_busy[m]), .done(s_done[m])
    );
  end

  // remember which schedulers have finished since start
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     finished <= '0;
    else if (start) finished <= '0;
    else            finished <= finished | s_done;
  end

  assign busy = |s_busy;
  assign done = ((finished | s_done) == '1) && (finished != '1);
endmodule
