// reset_and_spike: decides whether an output neuron fires and how its
// membrane potential is reset.
//
// A comparator tests the temporary membrane potential against Vth; the
// neuron fires (state = 1) when it is strictly higher. The comparator output
// ORed with V_Reset selects the reset path: with V_Reset = 0 a neuron that
// fired has Vth subtracted (regular reset) and one that did not keeps its
// potential; with V_Reset = 1 (global interval reset, every few frames) every
// potential becomes zero. The spike itself is produced either way. The
// result is registered: out_valid follows in_valid by one cycle. Comparator,
// OR, multiplexer and both reset kinds follow the document.
module reset_and_spike #(
  parameter int unsigned VM_W = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [VM_W-1:0] vtemp,
  input  logic signed [VM_W-1:0] vth,
  input  logic                   v_reset,
  output logic                   out_valid,
  output logic                   spike,      // State(t+1)
  output logic signed [VM_W-1:0] vmem_next   // Vmem(t+1)
);
  logic                   fire, sel;
  logic signed [VM_W-1:0] reset_val, next;

  always_comb begin
    fire      = vtemp > vth;
    sel       = fire | v_reset;
    reset_val = v_reset ? '0 : (vtemp - vth);
    next      = sel ? reset_val : vtemp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      spike     <= 1'b0;
      vmem_next <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        spike     <= fire;
        vmem_next <= next;
      end
    end
  end
endmodule
