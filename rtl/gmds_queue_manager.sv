// gmds_queue_manager: Queue Manager (QM), one per backplane downlink.
//
// Stores the packets accepted by its Frame Filter in its region of the
// packet memory and keeps them in one FIFO queue per traffic class; since a
// QM serves one source downlink, the line card as a whole queues per
// (source, class). As in the reference implementation, the memory is cut
// into fixed-size slots of the maximum packet size: SLOT_WORDS = 1 header
// word + MAX_PKT_BYTES/4 payload words. Free slots are kept in a bitmap
// (lowest free slot is taken); each class queue is a linked list of slots
// (head, tail, count per class and a next pointer per slot).
//
// Enqueue: on the header word a slot is taken and the words are written one
// per ce, cut-through, to slot*SLOT_WORDS + offset. If no slot is free the
// packet is dropped (cnt_drop). On eop the slot is linked to its class queue
// and enq_evt/enq_cls tell the Status Manager; an eop with err frees the
// slot instead. Dequeue: deq_valid/deq_cls (from the Scheduler) takes the
// head slot of that class and issues one memory read request per ce
// (rd_valid/rd_addr, with rd_sop/rd_eop tags) for the header and payload
// words; deq_evt/deq_cls report it to the Status Manager when it starts,
// deq_done pulses with the last read request, and the slot is freed then.
// A deq_valid for an empty class or while a read is in progress is ignored.
// head_len gives each class' head packet length for the Scheduler.
//
// The document gives the function (slot per packet, fixed slots of the
// maximum packet size, queues per source and class, reports to the Status
// Manager, dequeue on Scheduler request); the free bitmap and linked lists
// are this design's choice.
//
// Timing: all state changes on clk edges with ce = 1; outputs are held for
// one ce period. Addresses are local to this QM's region of the memory.
module gmds_queue_manager
  import gmds_pkg::*;
#(
  parameter int unsigned N_CLASS       = 4,
  parameter int unsigned SLOTS         = 64,
  parameter int unsigned MAX_PKT_BYTES = 256,
  localparam int unsigned SLOT_WORDS   = 1 + (MAX_PKT_BYTES + 3) / 4,
  localparam int unsigned AW           = $clog2(SLOTS * SLOT_WORDS),
  localparam int unsigned SW           = $clog2(SLOTS),
  localparam int unsigned CW           = $clog2(SLOTS + 1),
  localparam int unsigned CLW          = (N_CLASS > 1) ? $clog2(N_CLASS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ce,
  // from the Frame Filter
  input  logic            in_valid,
  input  logic            in_sop,
  input  logic            in_eop,
  input  logic            in_err,
  input  word_t           in_data,
  // memory write request (to the Multiplexer)
  output logic            wr_valid,
  output logic [AW-1:0]   wr_addr,
  output word_t           wr_data,
  // dequeue request (from the Scheduler)
  input  logic            deq_valid,
  input  logic [CLW-1:0]  deq_cls,
  output logic            deq_done,
  // memory read request (to the Multiplexer)
  output logic            rd_valid,
  output logic [AW-1:0]   rd_addr,
  output logic            rd_sop,
  output logic            rd_eop,
  // to the Status Manager / Scheduler
  output logic            enq_evt,
  output logic [CLW-1:0]  enq_cls,
  output logic            deq_evt,
  output logic [CLW-1:0]  deq_cls_o,
  output logic [LEN_W-1:0] head_len [N_CLASS],
  output logic [CW-1:0]   q_count  [N_CLASS],
  output logic [31:0]     cnt_drop
);
  logic [SLOTS-1:0]   free_map;
  logic [SW-1:0]      next_ptr [SLOTS];
  logic [LEN_W-1:0]   len_mem  [SLOTS];
  logic [SW-1:0]      head [N_CLASS];
  logic [SW-1:0]      tail [N_CLASS];

  // enqueue state
  logic               wr_active, wr_drop;
  logic [SW-1:0]      cur_slot;
  logic [CLW-1:0]     cur_cls;
  logic [$clog2(SLOT_WORDS+1)-1:0] wr_off;
  // dequeue state
  logic               rd_active;
  logic [SW-1:0]      rd_slot;
  logic [$clog2(SLOT_WORDS+1)-1:0] rd_off, rd_last;

  // lowest free slot
  logic               any_free;
  logic [SW-1:0]      first_free;
  always_comb begin
    any_free   = 1'b0;
    first_free = '0;
    for (int i = SLOTS - 1; i >= 0; i--)
      if (free_map[i]) begin
        any_free   = 1'b1;
        first_free = SW'(i);
      end
  end

  for (genvar c = 0; c < N_CLASS; c++) begin : g_head
    assign head_len[c] = (q_count[c] != 0) ? len_mem[head[c]] : '0;
  end

  function automatic logic [AW-1:0] slot_addr(logic [SW-1:0] s, int unsigned off);
    return AW'(int'(s) * SLOT_WORDS + off);
  endfunction

  pkt_hdr_t in_hdr;
  assign in_hdr = pkt_hdr_t'(in_data);

  // What this ce's input word means for the packet being written.
  logic           can_alloc, eff_act, eff_drop, link, pop;
  logic [SW-1:0]  eff_slot;
  logic [CLW-1:0] eff_cls;
  always_comb begin
    can_alloc = any_free && (int'(in_hdr.cls) < N_CLASS);
    eff_act   = in_sop ? 1'b1 : wr_active;
    eff_drop  = in_sop ? !can_alloc : wr_drop;
    eff_cls   = in_sop ? CLW'(in_hdr.cls) : cur_cls;
    eff_slot  = in_sop ? first_free : cur_slot;
    link      = in_valid && in_eop && eff_act && !eff_drop && !in_err;
    pop       = !rd_active && deq_valid && (q_count[deq_cls] != 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      free_map  <= '1;
      for (int c = 0; c < N_CLASS; c++) begin
        head[c]    <= '0;
        tail[c]    <= '0;
        q_count[c] <= '0;
      end
      wr_active <= 1'b0;
      wr_drop   <= 1'b0;
      cur_slot  <= '0;
      cur_cls   <= '0;
      wr_off    <= '0;
      rd_active <= 1'b0;
      rd_slot   <= '0;
      rd_off    <= '0;
      rd_last   <= '0;
      wr_valid  <= 1'b0;
      wr_addr   <= '0;
      wr_data   <= '0;
      rd_valid  <= 1'b0;
      rd_addr   <= '0;
      rd_sop    <= 1'b0;
      rd_eop    <= 1'b0;
      deq_done  <= 1'b0;
      enq_evt   <= 1'b0;
      enq_cls   <= '0;
      deq_evt   <= 1'b0;
      deq_cls_o <= '0;
      cnt_drop  <= '0;
    end else if (ce) begin
      automatic logic [SLOTS-1:0] fm = free_map;

      wr_valid <= 1'b0;
      rd_valid <= 1'b0;
      rd_sop   <= 1'b0;
      rd_eop   <= 1'b0;
      deq_done <= 1'b0;
      enq_evt  <= 1'b0;
      deq_evt  <= 1'b0;

      // ---------------- dequeue / read engine ----------------
      if (rd_active) begin
        rd_valid <= 1'b1;
        rd_addr  <= slot_addr(rd_slot, int'(rd_off));
        rd_sop   <= (rd_off == 0);
        rd_eop   <= (rd_off == rd_last);
        rd_off   <= rd_off + 1'b1;
        if (rd_off == rd_last) begin
          rd_active   <= 1'b0;
          deq_done    <= 1'b1;
          fm[rd_slot] = 1'b1;
        end
      end else if (pop) begin
        rd_active         <= 1'b1;
        rd_slot           <= head[deq_cls];
        rd_off            <= '0;
        rd_last           <= ($bits(rd_last))'(payload_words(len_mem[head[deq_cls]]));
        head[deq_cls]     <= next_ptr[head[deq_cls]];
        deq_evt           <= 1'b1;
        deq_cls_o         <= deq_cls;
      end

      // ---------------- enqueue / write engine ----------------
      if (in_valid && in_sop) begin
        if (can_alloc) begin
          fm[first_free] = 1'b0;
          len_mem[first_free] <= in_hdr.len;
          wr_valid <= 1'b1;
          wr_addr  <= slot_addr(first_free, 0);
          wr_data  <= in_data;
          wr_off   <= 1;
        end else begin
          cnt_drop <= cnt_drop + 1'b1;
        end
      end else if (in_valid && wr_active && !wr_drop && int'(wr_off) < SLOT_WORDS) begin
        wr_valid <= 1'b1;
        wr_addr  <= slot_addr(cur_slot, int'(wr_off));
        wr_data  <= in_data;
        wr_off   <= wr_off + 1'b1;
      end
      if (in_valid && in_eop && eff_act && !eff_drop && in_err) fm[eff_slot] = 1'b1;
      if (link) begin
        enq_evt <= 1'b1;
        enq_cls <= eff_cls;
        // the head is rewritten when the queue is (or, after this cycle's
        // dequeue, becomes) empty; this assignment overrides the pop above
        if (q_count[eff_cls] == 0 || (q_count[eff_cls] == 1 && pop && deq_cls == eff_cls))
          head[eff_cls] <= eff_slot;
        else
          next_ptr[tail[eff_cls]] <= eff_slot;
        tail[eff_cls] <= eff_slot;
      end

      // ---------------- queue counts ----------------
      for (int c = 0; c < N_CLASS; c++) begin
        automatic logic inc = link && eff_cls == CLW'(c);
        automatic logic dec = pop && deq_cls == CLW'(c);
        q_count[c] <= q_count[c] + CW'(inc) - CW'(dec);
      end

      if (in_valid) begin
        cur_slot  <= eff_slot;
        cur_cls   <= eff_cls;
        wr_drop   <= eff_drop;
        wr_active <= eff_act && !in_eop;
      end
      free_map <= fm;
    end
  end


endmodule
