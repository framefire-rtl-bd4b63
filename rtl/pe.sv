// pe: processing element, the unit of workload scheduling.
//
// A PE accumulates, for one output neuron at a time, the weights of the
// active connections found by its spike scheduler in its slice of input
// channels. Beats arrive as pe_item_t from the scheduler; the weight (and
// Vmem(t)) addressed by a beat arrive from the buffers one cycle later, so
// the PE registers the beat and does the addition in the next cycle. The
// adder's second input is a multiplexer: on the first beat of a pass it
// takes Vmem(t) (when USE_VMEM is set) or zero instead of the running partial
// sum; on add beats it adds the sign-extended weight. On the last beat the
// finished partial sum is pushed into the PE's FIFO, from which the adder tree
// pops it. Arithmetic wraps at VM_W bits.
//
// Accumulator, multiplexer with Vmem(t), Psum register and FIFO follow the
// document's PE drawing. That only the first PE of a cluster adds Vmem(t)
// (so the potential is counted once) is this implementation's reading.
module pe
  import framefire_pkg::*;
#(
  parameter int unsigned VM_W       = 16,
  parameter int unsigned W_W        = 8,
  parameter int unsigned PSUM_DEPTH = 4,
  parameter bit          USE_VMEM   = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  pe_item_t               item,      // beat from the spike scheduler
  input  logic signed [W_W-1:0]  weight,    // weight of the previous beat
  input  logic signed [VM_W-1:0] vmem,      // Vmem(t) of the previous beat
  input  logic                   psum_pop,
  output logic signed [VM_W-1:0] psum,      // FIFO head
  output logic                   psum_valid,
  output logic                   psum_full
);
  logic                   v_q, init_q, add_q, last_q;
  logic signed [VM_W-1:0] acc, base, sum;
  logic                   fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q    <= 1'b0;
      init_q <= 1'b0;
      add_q  <= 1'b0;
      last_q <= 1'b0;
    end else begin
      v_q    <= item.valid;
      init_q <= item.init;
      add_q  <= item.add;
      last_q <= item.last;
    end
  end

  always_comb begin
    base = init_q ? (USE_VMEM ? vmem : '0) : acc;
    sum  = base + (add_q ? VM_W'(weight) : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (v_q) acc <= sum;
  end

  sync_fifo #(.WIDTH(VM_W), .DEPTH(PSUM_DEPTH)) u_psum_fifo (
    .clk, .rst_n,
    .push(v_q && last_q), .din(sum), .pop(psum_pop), .dout(psum),
    .empty(fifo_empty), .full(psum_full), .count()
  );
  assign psum_valid = !fifo_empty;
endmodule
