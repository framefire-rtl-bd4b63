// framefire_pkg: types and constants shared by the FrameFire spiking-network
// accelerator. Address and field widths are fixed here so that structs can
// cross module boundaries; the depths of the memories are module parameters
// and must fit these widths (16-bit buffer addresses, up to 64 channels, up
// to 8 layers). None of these widths is given by the original design; they
// are this implementation's choice.
package framefire_pkg;

  localparam int ADDR_W  = 16;  // buffer word address width
  localparam int CH_W    = 6;   // input channel index width (up to 64)
  localparam int LAYER_W = 3;   // layer index width (up to 8)
  localparam int CNT_W   = 16;  // workload counter width
  localparam int PASS_W  = 16;  // output-pass index width

  // Per-layer configuration written by the host before a layer run.
  typedef struct packed {
    logic [LAYER_W-1:0] layer;       // index into record / schedule tables
    logic [7:0]         group_size;  // channels per spike scheduler (G)
    logic [7:0]         lists_per_ch;// neuron state list words per channel
    logic [PASS_W-1:0]  n_pass;      // output passes = output neurons / clusters
    logic [ADDR_W-1:0]  in_base;     // state buffer: first input list word
    logic [ADDR_W-1:0]  out_base;    // state buffer: first output word
    logic [ADDR_W-1:0]  w_base;      // weight buffer: first weight of the layer
    logic [ADDR_W-1:0]  vm_base;     // vmem buffer: first potential of the layer
    logic signed [15:0] vth;         // firing threshold
    logic               v_reset;     // 1: global interval reset (to zero)
    logic               record_en;   // 1: keyframe, record workload
  } layer_cfg_t;

  // One beat from a spike scheduler to the PEs it feeds.
  //   init : first beat of an output pass (PE restarts its accumulator)
  //   add  : an active connection, weight at waddr is to be added
  //   last : last beat of the pass (PE queues its partial sum)
  typedef struct packed {
    logic              valid;
    logic              init;
    logic              add;
    logic              last;
    logic [ADDR_W-1:0] waddr;
    logic [PASS_W-1:0] pass;
  } pe_item_t;

  // Workload report of one input channel from a spike scheduler.
  typedef struct packed {
    logic             valid;
    logic [CH_W-1:0]  ch;
    logic [CNT_W-1:0] count;
  } workload_t;

  // Host address map: bits [23:20] select the target, [19:16] a bank,
  // [15:0] the word inside it.
  typedef enum logic [3:0] {
    TGT_REG    = 4'd0,
    TGT_STATE  = 4'd1,
    TGT_WEIGHT = 4'd2,
    TGT_VMEM   = 4'd3,
    TGT_SCHED  = 4'd4,
    TGT_RECORD = 4'd5
  } host_target_e;

  // Register offsets inside TGT_REG.
  typedef enum logic [3:0] {
    REG_CTRL   = 4'd0,   // write: bit0 start, bit1 clear record table; read: bit0 busy
    REG_LAYER  = 4'd1,
    REG_GROUP  = 4'd2,
    REG_LPC    = 4'd3,
    REG_NPASS  = 4'd4,
    REG_INB    = 4'd5,
    REG_OUTB   = 4'd6,
    REG_WB     = 4'd7,
    REG_VMB    = 4'd8,
    REG_VTH    = 4'd9,
    REG_FLAGS  = 4'd10,  // bit0 v_reset, bit1 record_en
    REG_CYCLES = 4'd11   // read: cycles taken by the last layer run
  } host_reg_e;

endpackage
