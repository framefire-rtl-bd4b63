// workload_interpreter: turns the scheduling instructions of the workload
// schedule table into input start addresses for the spike schedulers.
//
// The schedule table of a layer is a list of C_MAX channel numbers; group m
// (served by spike scheduler m) is the slice [m*G, m*G+G). For each
// scheduler the interpreter reads entry (layer, m*G + slot) and returns the
// channel number and the address of the channel's first neuron state list,
//   start = in_base + ch * lists_per_ch.
// It is purely combinational between the scheduler's slot number and the
// table read port. Equal-size contiguous groups follow the regrouping of the
// document's figure (16 channels in 4 groups of 4); the table layout and the
// address formula are this implementation's choice.
module workload_interpreter
  import framefire_pkg::*;
#(
  parameter int unsigned M     = 4,
  parameter int unsigned C_MAX = 32,
  parameter int unsigned L_MAX = 6
) (
  input  layer_cfg_t        cfg,
  input  logic [7:0]        slot      [M],
  output logic [$clog2(L_MAX*C_MAX)-1:0] tbl_addr [M],
  input  logic [CH_W-1:0]   tbl_ch    [M],
  output logic [CH_W-1:0]   slot_ch   [M],
  output logic [ADDR_W-1:0] slot_addr [M]
);
  localparam int unsigned TW = $clog2(L_MAX*C_MAX);

  always_comb begin
    for (int m = 0; m < M; m++) begin
      tbl_addr[m]  = TW'(32'(cfg.layer) * C_MAX + 32'(m) * 32'(cfg.group_size) + 32'(slot[m]));
      slot_ch[m]   = tbl_ch[m];
      slot_addr[m] = cfg.in_base + ADDR_W'(tbl_ch[m]) * ADDR_W'(cfg.lists_per_ch);
    end
  end
endmodule
