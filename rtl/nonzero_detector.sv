// nonzero_detector: finds the active connections in a neuron state list.
//
// A neuron state list is a word of spike bits (1 = the input neuron fired).
// The detector looks at the head word of the neuron state FIFO and reports one
// set bit per cycle, lowest index first, remembering the bits already reported
// in a mask register. In the cycle it reports the last set bit it pops the
// word; a word without set bits is popped in one cycle without a hit. So a
// word with k spikes takes max(k,1) cycles, and zero states cost no PE work.
// hit (the "enable" towards the non-zero counter) and index are
// combinational from the head word and the mask; en stalls the detector.
// The one-bit-per-cycle rate is this implementation's choice.
module nonzero_detector #(
  parameter int unsigned LIST_W = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,         // may work this cycle
  input  logic                      head_valid, // FIFO not empty
  input  logic [LIST_W-1:0]         head_word,
  output logic                      pop,        // word finished, pop FIFO
  output logic                      hit,        // a spike was found
  output logic [$clog2(LIST_W)-1:0] index,      // its bit position
  output logic                      first       // first cycle spent on this word
);
  logic [LIST_W-1:0] done_mask;
  logic [LIST_W-1:0] remaining, rest;

  always_comb begin
    remaining = head_word & ~done_mask;
    index     = '0;
    for (int i = LIST_W - 1; i >= 0; i--) begin
      if (remaining[i]) index = ($clog2(LIST_W))'(i);
    end
    hit  = en && head_valid && (remaining != '0);
    rest = remaining & ~(LIST_W'(1) << index);
    pop  = en && head_valid && ((remaining == '0) || (rest == '0));
    first = (done_mask == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   done_mask <= '0;
    else if (pop) done_mask <= '0;
    else if (hit) done_mask <= done_mask | (LIST_W'(1) << index);
  end
endmodule
