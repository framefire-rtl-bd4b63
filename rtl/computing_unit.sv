// computing_unit: N PE clusters working on N output neurons at once.
//
// All clusters see the same M beat streams from the spike schedulers; each
// has its own weight bank and its own Vmem(t), so cluster n computes output
// neuron pass*N + n. Because their inputs move in lockstep, all clusters pop
// their partial sums and produce results in the same cycles; pass_pop and
// out_valid are taken from cluster 0 and an assertion checks the lockstep.
module computing_unit
  import framefire_pkg::*;
#(
  parameter int unsigned N          = 4,
  parameter int unsigned M          = 4,
  parameter int unsigned VM_W       = 16,
  parameter int unsigned W_W        = 8,
  parameter int unsigned PSUM_DEPTH = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  pe_item_t               item   [M],
  input  logic signed [W_W-1:0]  weight [N][M],
  input  logic signed [VM_W-1:0] vmem   [N],
  input  logic signed [VM_W-1:0] vth,
  input  logic                   v_reset,
  output logic                   pass_pop,
  output logic                   out_valid,
  output logic [N-1:0]           spike,
  output logic signed [VM_W-1:0] vmem_next [N]
);
  logic [N-1:0] pops, valids;

  for (genvar n = 0; n < N; n++) begin : g_cluster
    pe_cluster #(.M(M), .VM_W(VM_W), .W_W(W_W), .PSUM_DEPTH(PSUM_DEPTH)) u_cluster (
      .clk, .rst_n, .item, .weight(weight[n]), .vmem(vmem[n]), .vth, .v_reset,
      .pass_pop(pops[n]), .out_valid(valids[n]), .spike(spike[n]),
      .vmem_next(vmem_next[n])
    );
  end

  assign pass_pop  = pops[0];
  assign out_valid = valids[0];

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               (pops == '0 || pops == '1) && (valids == '0 || valids == '1));
endmodule
