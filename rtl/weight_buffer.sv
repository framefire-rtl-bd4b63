// weight_buffer: synaptic weight buffers of the computing unit.
//
// One bank per PE cluster; bank n holds the weight rows of the output neurons
// that cluster n computes (output neuron p*N + n is row p of bank n). Each
// bank has M synchronous read ports, one per spike scheduler, so every PE
// receives the weight of its own active connection in the cycle after the
// scheduler presents the address. All banks are read at the same M
// addresses. The host writes one word at a time. Signed W_W-bit weights,
// the banking and the port count are this implementation's choice; the
// document only states that weights are loaded from the weight buffers
// straight to the PEs.
module weight_buffer
  import framefire_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter int unsigned M     = 4,
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned W_W   = 8
) (
  input  logic                  clk,
  input  logic [ADDR_W-1:0]     rd_addr [M],
  output logic signed [W_W-1:0] rd_data [N][M],
  input  logic                  host_we,
  input  logic [3:0]            host_bank,
  input  logic [ADDR_W-1:0]     host_addr,
  input  logic signed [W_W-1:0] host_wdata
);
  localparam int unsigned AW = $clog2(DEPTH);

  for (genvar n = 0; n < N; n++) begin : g_bank
    logic signed [W_W-1:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      if (host_we && host_bank == 4'(n)) mem[AW'(host_addr)] <= host_wdata;
    end

    always_ff @(posedge clk) begin
      for (int m = 0; m < M; m++) rd_data[n][m] <= mem[AW'(rd_addr[m])];
    end
  end
endmodule
