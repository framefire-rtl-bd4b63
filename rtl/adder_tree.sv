// adder_tree: sums the partial sums of the M PEs of a cluster that belong to
// the same output neuron, giving the temporary membrane potential.
//
// The tree waits until every PE's partial-sum FIFO holds an entry, pops all M
// in the same cycle (pop) and registers the sum: out_valid and out_sum follow
// one cycle after pop. The sum is built as a balanced binary tree of
// two-input adders (M is padded with zeros to a power of two). One pipeline
// register at the output is this implementation's choice; arithmetic wraps at
// VM_W bits.
module adder_tree #(
  parameter int unsigned M    = 4,
  parameter int unsigned VM_W = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [VM_W-1:0] in_sum   [M],
  input  logic [M-1:0]           in_valid,
  output logic                   pop,
  output logic                   out_valid,
  output logic signed [VM_W-1:0] out_sum
);
  localparam int unsigned LEVELS = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned P2     = 1 << LEVELS;

  logic signed [VM_W-1:0] node [LEVELS+1][P2];
  logic signed [VM_W-1:0] total;

  always_comb begin
    for (int l = 0; l <= LEVELS; l++)
      for (int i = 0; i < P2; i++) node[l][i] = '0;
    for (int i = 0; i < M; i++) node[0][i] = in_sum[i];
    for (int l = 0; l < LEVELS; l++)
      for (int i = 0; i < (P2 >> (l + 1)); i++)
        node[l+1][i] = node[l][2*i] + node[l][2*i+1];
    total = node[LEVELS][0];
  end

  assign pop = &in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sum   <= '0;
    end else begin
      out_valid <= pop;
      if (pop) out_sum <= total;
    end
  end
endmodule
