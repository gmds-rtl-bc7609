// gmds_frame_filter: Frame Filter (FF), one per backplane downlink.
//
// Receives the multiframe word stream of one remote Ingress Manager, in the
// remote card's clock, and:
//   * adapts it to the local clock through a dual-clock FIFO (the cards run
//     on independent local clocks);
//   * finds multiframe alignment (SYNC word with the expected sender id);
//   * checks the XOR check word and counts errors;
//   * selects the packets this card must take: a header with the direct bit
//     set is taken when bit my_id of its port bitmap is set (multicast and
//     broadcast); otherwise the destination address is matched against
//     NPAT programmable (value, mask) patterns;
//   * decodes the multiframe's status word and extracts the bits that concern
//     this card: remote egress `link_id` asks this card's ingress to stop
//     class c when status bit (my_id*N_CLASS + c) is set.
// Selected packets go to the Queue Manager as a stream (sop on the header
// word, eop on the last payload word). The stream is delayed by one word so
// that the eop word can carry `err` once the check word has been compared:
// the Queue Manager then discards the packet. Packets with a zero length or a
// length above MAX_PKT_BYTES are rejected at the header.
//
// The functions (deserialised multiframe decode, pattern matching, direct
// port assignment, status extraction, rate adaptation) follow the document;
// the word formats, the pattern/mask form and the error handling are this
// design's own choices.
//
// Timing: rx side on rx_clk (one word per edge with rx_valid). Local side
// advances on clk edges with ce = 1: at most one FIFO word is decoded and at
// most one output word is produced per ce. Output signals change only on ce
// edges and are held for one ce period.
module gmds_frame_filter
  import gmds_pkg::*;
#(
  parameter int unsigned N_PORTS       = 4,
  parameter int unsigned N_CLASS       = 4,
  parameter int unsigned NPAT          = 4,
  parameter int unsigned MAX_PKT_BYTES = 256,
  parameter int unsigned FIFO_DEPTH    = 16
) (
  // remote (downlink) side
  input  logic              rx_clk,
  input  logic              rx_rst_n,
  input  logic              rx_valid,
  input  word_t             rx_data,
  // local side
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic [7:0]        my_id,
  input  logic [7:0]        link_id,
  input  logic [DEST_W-1:0] pat_value [NPAT],
  input  logic [DEST_W-1:0] pat_mask  [NPAT],
  input  logic [NPAT-1:0]   pat_en,

  output logic              out_valid,
  output logic              out_sop,
  output logic              out_eop,
  output logic              out_err,
  output word_t             out_data,

  output logic [N_CLASS-1:0] flow_xoff,     // remote egress asks us to stop class c
  output logic [31:0]        cnt_accepted,
  output logic [31:0]        cnt_filtered,
  output logic [31:0]        cnt_errors,
  output logic               fifo_overflow
);
  typedef enum logic [2:0] {S_HUNT, S_STATUS, S_HDR, S_DATA, S_SKIP, S_CHECK} state_t;

  word_t  f_data;
  // The status word carries one bit per (card, class); a switch with more
  // cards or classes than that needs a wider status word.
  if (N_PORTS * N_CLASS > W) begin : g_size_check
    $error("N_PORTS * N_CLASS must not exceed the 32-bit status word");
  end

  logic   f_empty, f_full, f_pop;

  gmds_async_fifo #(.DW(W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk(rx_clk), .wrst_n(rx_rst_n), .wr_en(rx_valid), .wr_data(rx_data), .full(f_full),
    .rclk(clk), .rrst_n(rst_n), .rd_en(f_pop), .rd_data(f_data), .empty(f_empty)
  );

  // Sticky overflow flag in the rx domain (should never set: the uplink
  // carries an idle slot after every multiframe).
  always_ff @(posedge rx_clk or negedge rx_rst_n) begin
    if (!rx_rst_n) fifo_overflow <= 1'b0;
    else if (rx_valid && f_full) fifo_overflow <= 1'b1;
  end

  assign f_pop = ce && !f_empty;

  state_t   state;
  word_t    chk;
  logic     has_pkt;
  word_t    status_hold;
  logic [LEN_W-1:0] words_left;
  logic     held_valid, held_sop;
  word_t    held_data;

  mf_sync_t sw;
  pkt_hdr_t hdr;
  logic     accept;
  logic     len_ok;
  logic     pat_hit;

  assign sw  = mf_sync_t'(f_data);
  assign hdr = pkt_hdr_t'(f_data);

  always_comb begin
    pat_hit = 1'b0;
    for (int i = 0; i < NPAT; i++)
      if (pat_en[i] && ((hdr.dest ^ pat_value[i]) & pat_mask[i]) == '0) pat_hit = 1'b1;
    len_ok = (hdr.len != 0) && (int'(hdr.len) <= MAX_PKT_BYTES);
    accept = len_ok && (hdr.direct ? hdr.dest[my_id[3:0]] : pat_hit);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_HUNT;
      chk          <= '0;
      has_pkt      <= 1'b0;
      status_hold  <= '0;
      words_left   <= '0;
      held_valid   <= 1'b0;
      held_sop     <= 1'b0;
      held_data    <= '0;
      out_valid    <= 1'b0;
      out_sop      <= 1'b0;
      out_eop      <= 1'b0;
      out_err      <= 1'b0;
      out_data     <= '0;
      flow_xoff    <= '0;
      cnt_accepted <= '0;
      cnt_filtered <= '0;
      cnt_errors   <= '0;
    end else if (ce) begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      out_err   <= 1'b0;
      if (!f_empty) begin
        unique case (state)
          S_HUNT: begin
            if (sw.sync == SYNC_PATTERN && sw.src_id == link_id) begin
              chk     <= f_data;
              has_pkt <= sw.has_pkt;
              state   <= S_STATUS;
            end
          end
          S_STATUS: begin
            chk         <= chk ^ f_data;
            status_hold <= f_data;
            state       <= has_pkt ? S_HDR : S_CHECK;
          end
          S_HDR: begin
            chk        <= chk ^ f_data;
            words_left <= LEN_W'(payload_words(hdr.len));
            if (accept) begin
              held_valid <= 1'b1;
              held_sop   <= 1'b1;
              held_data  <= f_data;
              state      <= S_DATA;
            end else begin
              cnt_filtered <= cnt_filtered + 1'b1;
              state        <= (hdr.len == 0) ? S_CHECK : S_SKIP;
            end
          end
          S_DATA: begin
            chk        <= chk ^ f_data;
            words_left <= words_left - 1'b1;
            // emit the held word, hold the new one
            out_valid  <= 1'b1;
            out_sop    <= held_sop;
            out_data   <= held_data;
            held_sop   <= 1'b0;
            held_data  <= f_data;
            if (words_left == 1) state <= S_CHECK;
          end
          S_SKIP: begin
            chk        <= chk ^ f_data;
            words_left <= words_left - 1'b1;
            if (words_left == 1) state <= S_CHECK;
          end
          S_CHECK: begin
            if (held_valid) begin
              out_valid  <= 1'b1;
              out_sop    <= held_sop;
              out_eop    <= 1'b1;
              out_err    <= (f_data != chk);
              out_data   <= held_data;
              held_valid <= 1'b0;
              held_sop   <= 1'b0;
              if (f_data == chk) cnt_accepted <= cnt_accepted + 1'b1;
            end
            if (f_data == chk) flow_xoff <= status_hold[my_id[4:0]*N_CLASS +: N_CLASS];
            else               cnt_errors <= cnt_errors + 1'b1;
            state <= S_HUNT;
          end
          default: state <= S_HUNT;
        endcase
      end
    end
  end

endmodule
