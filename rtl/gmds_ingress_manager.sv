// gmds_ingress_manager: Ingress Manager (IM) of a GMDS line card.
//
// Wraps each incoming packet, without queueing it, into a multiframe that is
// sent on the card's own dedicated backplane uplink. The overhead added to
// the packet is status & flow control information from the Status Manager
// plus alignment and error-control words. A multiframe is
//
//   SYNC    {SYNC_PATTERN, my_id, 7'b0, has_pkt}
//   STATUS  32-bit flow-control (xoff) bitmap from the Status Manager
//   packet  header word + payload words      (only when has_pkt = 1)
//   CHECK   XOR of all previous words of the multiframe
//
// followed by one idle word (tx_valid = 0). The idle word guarantees that
// the uplink word rate is slightly above the packet rate, so a receiver
// whose clock is a little slower can still keep up. When no packet is
// waiting, a status-only multiframe is sent whenever the status word
// changes or STATUS_PERIOD link slots have passed since the last one.
// The document states the function (overhead insertion, no queueing, link
// rate slightly above the frame rate); the word layout, the XOR check and
// the status refresh policy are choices of this design.
//
// Timing: everything advances on clk edges with ce = 1 (one link word slot
// per ce). tx_valid is a one-clock strobe in the clock after a ce edge, so a
// receiver can write one word per strobe in this card's clock; tx_data holds
// the word until the next ce edge. Input is a valid/ready stream on clk; in_ready is only asserted
// together with ce, so a word moves on a clk edge where in_valid && in_ready.
// The first word of a packet (in_sop) is its header. The multiframe starts
// one ce after a packet is seen at the input, so the pass-through latency is
// three link slots (SYNC, STATUS, then the header word).
module gmds_ingress_manager
  import gmds_pkg::*;
#(
  parameter int unsigned STATUS_PERIOD = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic [7:0] my_id,

  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_sop,
  input  logic       in_eop,
  input  word_t      in_data,

  input  word_t      status_word,

  output logic       tx_valid,
  output word_t      tx_data,
  output logic [31:0] mf_count       // multiframes sent
);
  typedef enum logic [2:0] {S_IDLE, S_STATUS, S_PKT, S_CHECK, S_GAP} state_t;

  state_t      state;
  logic        has_pkt;
  word_t       chk;
  word_t       last_status;
  logic [$clog2(STATUS_PERIOD+1)-1:0] timer;
  mf_sync_t    sync_w;

  assign in_ready = ce && (state == S_PKT);

  always_comb begin
    sync_w         = '0;
    sync_w.sync    = SYNC_PATTERN;
    sync_w.src_id  = my_id;
    sync_w.has_pkt = in_valid && in_sop;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      has_pkt     <= 1'b0;
      chk         <= '0;
      last_status <= '0;
      timer       <= '0;
      tx_valid    <= 1'b0;
      tx_data     <= '0;
      mf_count    <= '0;
    end else if (ce) begin
      tx_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (timer != 0) timer <= timer - 1'b1;
          if ((in_valid && in_sop) || status_word != last_status || timer == 0) begin
            has_pkt  <= in_valid && in_sop;
            tx_valid <= 1'b1;
            tx_data  <= word_t'(sync_w);
            chk      <= word_t'(sync_w);
            state    <= S_STATUS;
          end
        end
        S_STATUS: begin
          tx_valid    <= 1'b1;
          tx_data     <= status_word;
          chk         <= chk ^ status_word;
          last_status <= status_word;
          state       <= has_pkt ? S_PKT : S_CHECK;
        end
        S_PKT: begin
          // Cut-through: a gap at the input becomes an idle link slot.
          if (in_valid) begin
            tx_valid <= 1'b1;
            tx_data  <= in_data;
            chk      <= chk ^ in_data;
            if (in_eop) state <= S_CHECK;
          end
        end
        S_CHECK: begin
          tx_valid <= 1'b1;
          tx_data  <= chk;
          mf_count <= mf_count + 1'b1;
          timer    <= ($bits(timer))'(STATUS_PERIOD);
          state    <= S_GAP;
        end
        S_GAP: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end else begin
      tx_valid <= 1'b0;   // each link word is a single-clock strobe
    end
  end

endmodule
