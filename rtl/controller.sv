// controller: decodes the host's accesses, holds the layer configuration and
// sequences one layer run (one timestep of one layer).
//
// Host bus: a write (host_we) or read (host_re) names a 24-bit address whose
// bits [23:20] select the target (registers, state, weight, vmem, schedule
// or record table, see framefire_pkg), [19:16] a bank and [15:0] a word.
// Read data returns one cycle later with host_rvalid. Buffer and table
// accesses are forwarded only while the accelerator is idle.
//
// A write of bit 0 to REG_CTRL starts a run: the controller pulses start to
// the data collection unit and then counts the results of the computing
// unit. Result p (one output neuron per cluster) has its N potentials
// written to vmem word vm_base + p and its N spikes written as adjacent bits
// of state word out_base + p*N/LIST_W. When n_pass results are stored the
// run ends, done pulses for one cycle and REG_CYCLES holds the run's length
// in cycles. Bit 1 of REG_CTRL clears the workload record table (before a
// keyframe). The register map and the run protocol are this implementation's
// choice; the document only says the controller updates the accelerator's
// state and decodes what the host sends.
module controller
  import framefire_pkg::*;
#(
  parameter int unsigned N      = 4,
  parameter int unsigned M      = 4,
  parameter int unsigned LIST_W = 16,
  parameter int unsigned VM_W   = 16,
  parameter int unsigned W_W    = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // host bus
  input  logic                   host_we,
  input  logic                   host_re,
  input  logic [23:0]            host_addr,
  input  logic [31:0]            host_wdata,
  output logic [31:0]            host_rdata,
  output logic                   host_rvalid,
  output logic                   busy,
  output logic                   done,
  // configuration and run control
  output layer_cfg_t             cfg,
  output logic [ADDR_W-1:0]      fan_in,
  output logic                   start,
  output logic                   rec_clear,
  // results of the computing unit
  input  logic                   res_valid,
  input  logic [N-1:0]           res_spike,
  output logic                   sb_wr_en,
  output logic [ADDR_W-1:0]      sb_wr_addr,
  output logic [LIST_W-1:0]      sb_wr_mask,
  output logic [LIST_W-1:0]      sb_wr_data,
  output logic                   vm_wr_en,
  output logic [ADDR_W-1:0]      vm_wr_addr,
  // forwarded host accesses
  output logic                   sb_host_we,
  output logic                   sb_host_re,
  output logic [LIST_W-1:0]      sb_host_wdata,
  input  logic [LIST_W-1:0]      sb_host_rdata,
  output logic                   wb_host_we,
  output logic signed [W_W-1:0]  wb_host_wdata,
  output logic                   vm_host_we,
  output logic                   vm_host_re,
  output logic signed [VM_W-1:0] vm_host_wdata,
  input  logic signed [VM_W-1:0] vm_host_rdata,
  output logic                   sched_we,
  output logic [CH_W-1:0]        sched_data,
  output logic                   rec_rd,
  input  logic [CNT_W-1:0]       rec_data,
  output logic [3:0]             host_bank,
  output logic [ADDR_W-1:0]      host_word
);
  host_target_e      tgt, rd_tgt_q;
  logic [3:0]        reg_q;
  logic [PASS_W-1:0] opass;
  logic [31:0]       cycles, last_cycles;
  logic [31:0]       bitpos;
  logic              idle_access;

  assign tgt         = host_target_e'(host_addr[23:20]);
  assign host_bank   = host_addr[19:16];
  assign host_word   = host_addr[15:0];
  assign idle_access = !busy;

  assign sb_host_we    = host_we && idle_access && tgt == TGT_STATE;
  assign sb_host_re    = host_re && tgt == TGT_STATE;
  assign sb_host_wdata = host_wdata[LIST_W-1:0];
  assign wb_host_we    = host_we && idle_access && tgt == TGT_WEIGHT;
  assign wb_host_wdata = host_wdata[W_W-1:0];
  assign vm_host_we    = host_we && idle_access && tgt == TGT_VMEM;
  assign vm_host_re    = host_re && tgt == TGT_VMEM;
  assign vm_host_wdata = host_wdata[VM_W-1:0];
  assign sched_we      = host_we && idle_access && tgt == TGT_SCHED;
  assign sched_data    = host_wdata[CH_W-1:0];
  assign rec_rd        = host_re && tgt == TGT_RECORD;

  assign fan_in = ADDR_W'(32'(cfg.group_size) * M * 32'(cfg.lists_per_ch) * LIST_W);

  // ---------------- registers and run sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg         <= '0;
      start       <= 1'b0;
      rec_clear   <= 1'b0;
      busy        <= 1'b0;
      done        <= 1'b0;
      opass       <= '0;
      cycles      <= '0;
      last_cycles <= '0;
    end else begin
      start     <= 1'b0;
      rec_clear <= 1'b0;
      done      <= 1'b0;
      if (host_we && tgt == TGT_REG && !busy) begin
        case (host_reg_e'(host_addr[3:0]))
          REG_CTRL: begin
            start     <= host_wdata[0];
            busy      <= host_wdata[0];
            rec_clear <= host_wdata[1];
            opass     <= '0;
            cycles    <= '0;
          end
          REG_LAYER: cfg.layer        <= host_wdata[LAYER_W-1:0];
          REG_GROUP: cfg.group_size   <= host_wdata[7:0];
          REG_LPC:   cfg.lists_per_ch <= host_wdata[7:0];
          REG_NPASS: cfg.n_pass       <= host_wdata[PASS_W-1:0];
          REG_INB:   cfg.in_base      <= host_wdata[ADDR_W-1:0];
          REG_OUTB:  cfg.out_base     <= host_wdata[ADDR_W-1:0];
          REG_WB:    cfg.w_base       <= host_wdata[ADDR_W-1:0];
          REG_VMB:   cfg.vm_base      <= host_wdata[ADDR_W-1:0];
          REG_VTH:   cfg.vth          <= host_wdata[15:0];
          REG_FLAGS: begin
            cfg.v_reset   <= host_wdata[0];
            cfg.record_en <= host_wdata[1];
          end
          default: ;
        endcase
      end
      if (busy) begin
        cycles <= cycles + 32'd1;
        if (res_valid) begin
          opass <= opass + PASS_W'(1);
          if (opass == cfg.n_pass - PASS_W'(1)) begin
            busy        <= 1'b0;
            done        <= 1'b1;
            last_cycles <= cycles + 32'd1;
          end
        end
      end
    end
  end

  // ---------------- result write-back addresses ----------------
  always_comb begin
    bitpos     = 32'(opass) * N;
    sb_wr_en   = busy && res_valid;
    sb_wr_addr = cfg.out_base + ADDR_W'(bitpos / LIST_W);
    sb_wr_mask = LIST_W'(((1 << N) - 1)) << (bitpos % LIST_W);
    sb_wr_data = LIST_W'(res_spike) << (bitpos % LIST_W);
    vm_wr_en   = busy && res_valid;
    vm_wr_addr = cfg.vm_base + ADDR_W'(opass);
  end

  // ---------------- host read data ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      host_rvalid <= 1'b0;
      rd_tgt_q    <= TGT_REG;
      reg_q       <= '0;
    end else begin
      host_rvalid <= host_re;
      if (host_re) begin
        rd_tgt_q <= tgt;
        reg_q    <= host_addr[3:0];
      end
    end
  end

  always_comb begin
    host_rdata = '0;
    case (rd_tgt_q)
      TGT_REG: begin
        case (host_reg_e'(reg_q))
          REG_CTRL:   host_rdata = {31'd0, busy};
          REG_LAYER:  host_rdata = 32'(cfg.layer);
          REG_GROUP:  host_rdata = 32'(cfg.group_size);
          REG_LPC:    host_rdata = 32'(cfg.lists_per_ch);
          REG_NPASS:  host_rdata = 32'(cfg.n_pass);
          REG_INB:    host_rdata = 32'(cfg.in_base);
          REG_OUTB:   host_rdata = 32'(cfg.out_base);
          REG_WB:     host_rdata = 32'(cfg.w_base);
          REG_VMB:    host_rdata = 32'(cfg.vm_base);
          REG_VTH:    host_rdata = 32'($unsigned(cfg.vth));
          REG_FLAGS:  host_rdata = {30'd0, cfg.record_en, cfg.v_reset};
          REG_CYCLES: host_rdata = last_cycles;
          default:    host_rdata = '0;
        endcase
      end
      TGT_STATE:  host_rdata = 32'(sb_host_rdata);
      TGT_VMEM:   host_rdata = 32'($unsigned(vm_host_rdata));
      TGT_RECORD: host_rdata = 32'(rec_data);
      default:    host_rdata = '0;
    endcase
  end
endmodule
