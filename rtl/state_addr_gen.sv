// state_addr_gen: state address generator of a spike scheduler.
//
// Given the start address of an input channel's neuron state lists (from the
// workload interpreter) and the number of list words per channel, it issues
// the addresses start, start+1, ... start+n-1 to the neuron state buffer, one
// per cycle when step is high. load starts a channel; busy stays high until
// the last address has been issued, which is marked by last. The lists of a
// channel are stored contiguously: this layout is this implementation's
// choice.
module state_addr_gen
  import framefire_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,       // start a new channel
  input  logic [ADDR_W-1:0] start_addr,
  input  logic [7:0]        n_lists,    // lists per channel, >= 1
  input  logic              step,       // issue one address this cycle
  output logic              busy,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  output logic [7:0]        list_idx,   // list number of rd_addr
  output logic              last        // rd_addr is the channel's last list
);
  logic [ADDR_W-1:0] base;
  logic [7:0]        idx, n;

  assign rd_en    = busy && step;
  assign rd_addr  = base + ADDR_W'(idx);
  assign list_idx = idx;
  assign last     = (idx == n - 8'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      base <= '0;
      idx  <= '0;
      n    <= 8'd1;
    end else if (load) begin
      busy <= 1'b1;
      base <= start_addr;
      idx  <= '0;
      n    <= n_lists;
    end else if (rd_en) begin
      if (last) busy <= 1'b0;
      else      idx  <= idx + 8'd1;
    end
  end
endmodule
