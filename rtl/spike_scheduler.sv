// spike_scheduler: feeds one PE position of every cluster with the active
// connections of its group of input channels, and measures their workload.
//
// For each output pass (one output neuron per cluster) it walks the G channel
// slots assigned to it. For slot k it asks the workload interpreter for the
// channel number and the start address of the channel's neuron state lists,
// loads the state address generator, and reads the lists from the neuron
// state buffer (one read port, data one cycle later) into the neuron state
// FIFO. The non-zero detector takes words from the FIFO and reports one spike
// per cycle; index2addr turns each spike into a weight address. The output is
// a stream of pe_item_t beats, registered: init on the first beat of a pass,
// add for every active connection, last on the final beat. The non-zero
// counter counts spikes per channel and, on a keyframe (cfg.record_en) during
// pass 0, reports the channel total to the workload record table.
//
// Flow control: the address side stops when the FIFO (plus the read in
// flight) is full. Passes are released against credits: the scheduler may
// have at most PSUM_CREDITS passes queued in the PEs' partial-sum FIFOs; a
// credit returns on every pass_pop from the adder trees. done pulses when
// the last beat has left the scheduler after start.
//
// The structure (address generator, FIFO, detector, index2addr, counter)
// follows the document; the item format, credits and pass loop are this
// implementation's choice.
module spike_scheduler
  import framefire_pkg::*;
#(
  parameter int unsigned LIST_W       = 16,
  parameter int unsigned FIFO_DEPTH   = 4,
  parameter int unsigned PSUM_CREDITS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  layer_cfg_t        cfg,
  input  logic [ADDR_W-1:0] fan_in,     // weights per output neuron
  // workload interpreter
  output logic [7:0]        slot,       // slot inside this scheduler's group
  input  logic [CH_W-1:0]   slot_ch,
  input  logic [ADDR_W-1:0] slot_addr,
  // neuron state buffer read port
  output logic              sb_rd_en,
  output logic [ADDR_W-1:0] sb_rd_addr,
  input  logic [LIST_W-1:0] sb_rd_data,
  // towards PEs / adder trees
  input  logic              pass_pop,
  output pe_item_t          item,
  output workload_t         wl,
  output logic              busy,
  output logic              done
);
  localparam int unsigned IW = $clog2(LIST_W);

  typedef struct packed {
    logic [LIST_W-1:0] word;
    logic [CH_W-1:0]   ch;
    logic [7:0]        list_idx;
    logic              chan_last;
    logic              pass_first;
    logic              pass_last;
    logic [PASS_W-1:0] pass;
  } entry_t;

  // ---------------- address side ----------------
  logic              running, need_load;
  logic [PASS_W-1:0] pass_f;
  logic [7:0]        k;
  logic [CH_W-1:0]   cur_ch;
  logic [7:0]        credits;
  logic              gen_busy, gen_rd, gen_last, gen_load;
  logic [7:0]        gen_list;
  logic              fifo_room;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;
  logic              inflight;
  entry_t            tag_q, head;
  logic              fifo_empty, fifo_full;

  assign slot      = k;
  assign fifo_room = (32'(fifo_count) + (inflight ? 32'd1 : 32'd0)) < FIFO_DEPTH;
  assign gen_load  = running && need_load && ((k != 8'd0) || (credits != 8'd0));

  state_addr_gen u_gen (
    .clk, .rst_n,
    .load(gen_load), .start_addr(slot_addr), .n_lists(cfg.lists_per_ch),
    .step(fifo_room), .busy(gen_busy), .rd_en(gen_rd), .rd_addr(sb_rd_addr),
    .list_idx(gen_list), .last(gen_last)
  );
  assign sb_rd_en = gen_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      need_load <= 1'b0;
      pass_f    <= '0;
      k         <= '0;
      cur_ch    <= '0;
      credits   <= '0;
      inflight  <= 1'b0;
      tag_q     <= '0;
    end else begin
      // credits: one per pass in flight towards the partial-sum FIFOs
      credits <= credits - ((gen_load && k == 8'd0) ? 8'd1 : 8'd0)
                         + (pass_pop ? 8'd1 : 8'd0);
      if (start) begin
        running   <= 1'b1;
        need_load <= 1'b1;
        pass_f    <= '0;
        k         <= '0;
        credits   <= 8'(PSUM_CREDITS);
      end else begin
        if (gen_load) begin
          need_load <= 1'b0;
          cur_ch    <= slot_ch;
        end
        if (gen_rd && gen_last) begin
          need_load <= 1'b1;
          if (k == cfg.group_size - 8'd1) begin
            k <= '0;
            if (pass_f == cfg.n_pass - PASS_W'(1)) begin
              running   <= 1'b0;
              need_load <= 1'b0;
            end else begin
              pass_f <= pass_f + PASS_W'(1);
            end
          end else begin
            k <= k + 8'd1;
          end
        end
      end
      // tag travels with the read, data arrives one cycle later
      inflight         <= gen_rd;
      tag_q.ch         <= cur_ch;
      tag_q.list_idx   <= gen_list;
      tag_q.chan_last  <= gen_last;
      tag_q.pass_first <= (k == 8'd0) && (gen_list == 8'd0);
      tag_q.pass_last  <= (k == cfg.group_size - 8'd1) && gen_last;
      tag_q.pass       <= pass_f;
    end
  end

  entry_t push_entry;
  always_comb begin
    push_entry      = tag_q;
    push_entry.word = sb_rd_data;
  end

  // ---------------- neuron state list FIFO ----------------
  logic det_pop, det_hit, det_first;
  logic [IW-1:0] det_index;

  sync_fifo #(.WIDTH($bits(entry_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(inflight), .din(push_entry), .pop(det_pop), .dout(head),
    .empty(fifo_empty), .full(fifo_full), .count(fifo_count)
  );

  // ---------------- non-zero detector ----------------
  nonzero_detector #(.LIST_W(LIST_W)) u_det (
    .clk, .rst_n, .en(1'b1), .head_valid(!fifo_empty), .head_word(head.word),
    .pop(det_pop), .hit(det_hit), .index(det_index), .first(det_first)
  );

  // ---------------- index2addr ----------------
  logic [ADDR_W-1:0] waddr;
  index2addr #(.LIST_W(LIST_W)) u_i2a (
    .clk, .ch(head.ch), .list_idx(head.list_idx), .index(det_index),
    .lists_per_ch(cfg.lists_per_ch), .pass(head.pass), .fan_in(fan_in),
    .w_base(cfg.w_base), .waddr(waddr)
  );

  // ---------------- non-zero counter ----------------
  nonzero_counter u_cnt (
    .clk, .rst_n, .en(det_hit), .chan_end(det_pop && head.chan_last), .ch(head.ch),
    .report(cfg.record_en && head.pass == '0), .wl(wl)
  );

  // ---------------- item stage, aligned with waddr ----------------
  logic init_b, last_b;
  assign init_b = !fifo_empty && head.pass_first && det_first;
  assign last_b = det_pop && head.pass_last;

  logic item_valid_q, item_init_q, item_add_q, item_last_q, final_q;
  logic [PASS_W-1:0] item_pass_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      item_valid_q <= 1'b0;
      item_init_q  <= 1'b0;
      item_add_q   <= 1'b0;
      item_last_q  <= 1'b0;
      item_pass_q  <= '0;
      final_q      <= 1'b0;
    end else begin
      item_valid_q <= init_b || det_hit || last_b;
      item_init_q  <= init_b;
      item_add_q   <= det_hit;
      item_last_q  <= last_b;
      item_pass_q  <= head.pass;
      final_q      <= last_b && (head.pass == cfg.n_pass - PASS_W'(1));
    end
  end

  always_comb begin
    item.valid = item_valid_q;
    item.init  = item_init_q;
    item.add   = item_add_q;
    item.last  = item_last_q;
    item.waddr = waddr;
    item.pass  = item_pass_q;
  end

  assign done = final_q;
  assign busy = running || inflight || !fifo_empty || item_valid_q;

  a_credit_ok: assert property (@(posedge clk) disable iff (!rst_n)
                                credits <= 8'(PSUM_CREDITS));
endmodule
