// nonzero_counter: workload counter of a spike scheduler.
//
// Every enable pulse from the non-zero detector (one active connection)
// increments a running count. When the last list word of an input channel is
// finished (chan_end), the channel's total, including an enable in that same
// cycle, is presented for one cycle on wl together with the channel number,
// and the count restarts at zero. report gates whether the total is sent to
// the workload record table (keyframe, first output pass); counting goes on
// either way so that the count always restarts cleanly.
module nonzero_counter
  import framefire_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,       // one active connection found
  input  logic            chan_end, // last list of the channel finished
  input  logic [CH_W-1:0] ch,       // channel of the current list
  input  logic            report,   // forward the total to the record table
  output workload_t       wl
);
  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] total;

  assign total = cnt + (en ? CNT_W'(1) : CNT_W'(0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      wl  <= '0;
    end else begin
      cnt      <= chan_end ? '0 : total;
      wl.valid <= chan_end && report;
      wl.ch    <= ch;
      wl.count <= total;
    end
  end
endmodule
