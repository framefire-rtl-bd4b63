// vmem_buffer: the membrane potential buffer. It keeps every membrane
// potential on chip between timesteps and frames.
//
// One bank per PE cluster; bank n holds the potentials of the output neurons
// of cluster n. All banks are read at one address (synchronous, data the
// next cycle) to give the first PE of each cluster Vmem(t), and written at
// one address with the N updated potentials Vmem(t+1). The host can load and
// read any word (one cycle read latency); a host write wins over a compute
// write. Widths and banking are this implementation's choice.
module vmem_buffer
  import framefire_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned VM_W  = 16
) (
  input  logic                   clk,
  input  logic [ADDR_W-1:0]      rd_addr,
  output logic signed [VM_W-1:0] rd_data [N],
  input  logic                   wr_en,
  input  logic [ADDR_W-1:0]      wr_addr,
  input  logic signed [VM_W-1:0] wr_data [N],
  input  logic                   host_we,
  input  logic                   host_re,
  input  logic [3:0]             host_bank,
  input  logic [ADDR_W-1:0]      host_addr,
  input  logic signed [VM_W-1:0] host_wdata,
  output logic signed [VM_W-1:0] host_rdata
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic signed [VM_W-1:0] bank_host_q [N];
  logic [3:0]             host_bank_q;

  for (genvar n = 0; n < N; n++) begin : g_bank
    logic signed [VM_W-1:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      if (host_we && host_bank == 4'(n)) mem[AW'(host_addr)] <= host_wdata;
      else if (wr_en)                    mem[AW'(wr_addr)]   <= wr_data[n];
    end

    always_ff @(posedge clk) begin
      rd_data[n] <= mem[AW'(rd_addr)];
      if (host_re) bank_host_q[n] <= mem[AW'(host_addr)];
    end
  end

  always_ff @(posedge clk) if (host_re) host_bank_q <= host_bank;

  always_comb begin
    host_rdata = '0;
    for (int n = 0; n < N; n++) if (32'(host_bank_q) == n) host_rdata = bank_host_q[n];
  end
endmodule
