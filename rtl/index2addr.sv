// index2addr: turns the position of a spike into the address of the weight
// that connects it to the output neuron of the current pass.
//
// The input neuron number inside the layer is
//   neuron = (ch * lists_per_ch + list) * LIST_W + index
// and the weights of one output neuron are stored as a row of fan_in words,
// so  waddr = w_base + pass * fan_in + neuron.  The result is registered:
// waddr is valid one cycle after the inputs. The weight layout is this
// implementation's choice; the document says only that the index is decoded
// to a weight address.
module index2addr
  import framefire_pkg::*;
#(
  parameter int unsigned LIST_W = 16
) (
  input  logic                      clk,
  input  logic [CH_W-1:0]           ch,
  input  logic [7:0]                list_idx,
  input  logic [$clog2(LIST_W)-1:0] index,
  input  logic [7:0]                lists_per_ch,
  input  logic [PASS_W-1:0]         pass,
  input  logic [ADDR_W-1:0]         fan_in,
  input  logic [ADDR_W-1:0]         w_base,
  output logic [ADDR_W-1:0]         waddr
);
  logic [ADDR_W-1:0] neuron;
  logic [ADDR_W-1:0] row;

  always_comb begin
    neuron = ((ADDR_W'(ch) * ADDR_W'(lists_per_ch)) + ADDR_W'(list_idx)) * ADDR_W'(LIST_W)
             + ADDR_W'(index);
    row    = ADDR_W'(pass) * fan_in;
  end

  always_ff @(posedge clk) waddr <= w_base + row + neuron;
endmodule
