// state_buffer: the neuron state buffer. It holds binary neuron states
// (spikes) as LIST_W-bit neuron state lists.
//
// M synchronous read ports (one per spike scheduler): data appears one cycle
// after rd_en. One masked write port stores the output states produced by the
// reset-and-spike units (a pass writes N adjacent bits of one word). A host
// port loads input spikes and reads results, one cycle read latency; a host
// write takes priority over a compute write to the same cycle. Word width,
// depth and port shapes are this implementation's choice; the document gives
// the buffer's role only.
module state_buffer
  import framefire_pkg::*;
#(
  parameter int unsigned DEPTH  = 4096,
  parameter int unsigned LIST_W = 16,
  parameter int unsigned M      = 4
) (
  input  logic              clk,
  // spike scheduler read ports
  input  logic              rd_en   [M],
  input  logic [ADDR_W-1:0] rd_addr [M],
  output logic [LIST_W-1:0] rd_data [M],
  // output-state write port
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [LIST_W-1:0] wr_mask,
  input  logic [LIST_W-1:0] wr_data,
  // host port
  input  logic              host_we,
  input  logic              host_re,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [LIST_W-1:0] host_wdata,
  output logic [LIST_W-1:0] host_rdata
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [LIST_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (host_we) begin
      mem[AW'(host_addr)] <= host_wdata;
    end else if (wr_en) begin
      mem[AW'(wr_addr)] <= (mem[AW'(wr_addr)] & ~wr_mask) | (wr_data & wr_mask);
    end
  end

  always_ff @(posedge clk) begin
    for (int m = 0; m < M; m++) begin
      if (rd_en[m]) rd_data[m] <= mem[AW'(rd_addr[m])];
    end
    if (host_re) host_rdata <= mem[AW'(host_addr)];
  end
endmodule
