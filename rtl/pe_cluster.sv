// pe_cluster: one PE cluster, computing one output neuron per pass out of the
// slice of output channels assigned to it.
//
// M PEs each take the beat stream of one spike scheduler and the weight read
// for it from this cluster's weight bank; PE 0 also adds Vmem(t). Each PE
// queues one partial sum per pass. The adder tree pops all M FIFOs together
// as soon as each holds a sum (so the slowest PE sets the pace), and the
// reset-and-spike unit turns the total into State(t+1) and Vmem(t+1).
// Latency from the pop to out_valid is two cycles. pass_pop is the adder
// tree's pop; it returns credits to the spike schedulers. Structure follows
// the document; the latencies are this implementation's.
module pe_cluster
  import framefire_pkg::*;
#(
  parameter int unsigned M          = 4,
  parameter int unsigned VM_W       = 16,
  parameter int unsigned W_W        = 8,
  parameter int unsigned PSUM_DEPTH = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  pe_item_t               item   [M],
  input  logic signed [W_W-1:0]  weight [M],
  input  logic signed [VM_W-1:0] vmem,
  input  logic signed [VM_W-1:0] vth,
  input  logic                   v_reset,
  output logic                   pass_pop,
  output logic                   out_valid,
  output logic                   spike,
  output logic signed [VM_W-1:0] vmem_next
);
  logic signed [VM_W-1:0] psum [M];
  logic [M-1:0]           psum_valid, psum_full;
  logic                   tree_valid;
  logic signed [VM_W-1:0] tree_sum;

  for (genvar m = 0; m < M; m++) begin : g_pe
    pe #(.VM_W(VM_W), .W_W(W_W), .PSUM_DEPTH(PSUM_DEPTH), .USE_VMEM(m == 0)) u_pe (
      .clk, .rst_n, .item(item[m]), .weight(weight[m]), .vmem,
      .psum_pop(pass_pop), .psum(psum[m]), .psum_valid(psum_valid[m]),
      .psum_full(psum_full[m])
    );
  end

  adder_tree #(.M(M), .VM_W(VM_W)) u_tree (
    .clk, .rst_n, .in_sum(psum), .in_valid(psum_valid),
    .pop(pass_pop), .out_valid(tree_valid), .out_sum(tree_sum)
  );

  reset_and_spike #(.VM_W(VM_W)) u_rs (
    .clk, .rst_n, .in_valid(tree_valid), .vtemp(tree_sum), .vth, .v_reset,
    .out_valid, .spike, .vmem_next
  );
endmodule
