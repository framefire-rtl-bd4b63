// record_and_schedule: the workload record-and-schedule unit.
//
// Two tables, both L_MAX layers by C_MAX channels:
//  * workload record table: number of active connections per (layer,
//    channel). Each of the M spike schedulers may report one channel total
//    per cycle (groups are disjoint, so reports never hit the same entry);
//    totals of one keyframe accumulate over its timesteps. clear empties the
//    table before a keyframe. The host reads it (one cycle latency).
//  * workload schedule table: channel numbers written by the host; entry
//    (layer, m*G + k) is the k-th channel of scheduler m's group. The
//    interpreter reads it through M combinational ports.
// The two tables and their purpose follow the document; accumulation over
// timesteps, the clear command and the port shapes are this implementation's
// choice.
module record_and_schedule
  import framefire_pkg::*;
#(
  parameter int unsigned M     = 4,
  parameter int unsigned C_MAX = 32,
  parameter int unsigned L_MAX = 6
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // from the spike schedulers
  input  logic [LAYER_W-1:0]    layer,
  input  workload_t             wl [M],
  input  logic                  clear,
  // host: record read, schedule write
  input  logic                  host_rec_rd,
  input  logic [$clog2(L_MAX*C_MAX)-1:0] host_rec_addr,
  output logic [CNT_W-1:0]      host_rec_data,
  input  logic                  host_sched_we,
  input  logic [$clog2(L_MAX*C_MAX)-1:0] host_sched_addr,
  input  logic [CH_W-1:0]       host_sched_data,
  // workload interpreter
  input  logic [$clog2(L_MAX*C_MAX)-1:0] sched_addr [M],
  output logic [CH_W-1:0]       sched_ch   [M]
);
  localparam int unsigned ENTRIES = L_MAX * C_MAX;
  localparam int unsigned TW      = $clog2(ENTRIES);

  logic [CNT_W-1:0] record_tbl [ENTRIES];
  logic [CH_W-1:0]  sched_tbl  [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) record_tbl[e] <= '0;
    end else if (clear) begin
      for (int e = 0; e < ENTRIES; e++) record_tbl[e] <= '0;
    end else begin
      for (int m = 0; m < M; m++) begin
        if (wl[m].valid) begin
          record_tbl[TW'(32'(layer) * C_MAX + 32'(wl[m].ch))] <=
            record_tbl[TW'(32'(layer) * C_MAX + 32'(wl[m].ch))] + wl[m].count;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (host_rec_rd) host_rec_data <= record_tbl[host_rec_addr];
  end

  always_ff @(posedge clk) begin
    if (host_sched_we) sched_tbl[host_sched_addr] <= host_sched_data;
  end

  always_comb begin
    for (int m = 0; m < M; m++) sched_ch[m] = sched_tbl[sched_addr[m]];
  end
endmodule
