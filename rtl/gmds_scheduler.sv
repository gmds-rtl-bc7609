// gmds_scheduler: Deficit Round Robin (DRR) packet scheduler of the egress.
//
// Chooses which queue, one per (source downlink, class), sends its head
// packet on the card's output link. Queues are visited in round-robin order
// 0..NQ-1 (queue q = source q / N_CLASS, class q % N_CLASS). On each visit
// to a non-empty queue the queue's deficit counter grows by the quantum of
// its class; head packets are then sent while their length (bytes) does not
// exceed the deficit, each one lowering the deficit by its length. When the
// head packet is longer than the deficit the scheduler moves on and the
// queue keeps its deficit for the next round; a queue found empty has its
// deficit cleared. This gives each class a share of the link in proportion
// to its quantum, independent of packet lengths.
//
// The document names DRR as the discipline; this is the textbook DRR with
// per-class quanta. The sequential one-queue-per-cycle scan is this design's
// choice (an empty queue costs one ce to pass over).
//
// Interface: q_count/q_head_len form the status bus from the Status Manager.
// A decision is a one-ce pulse on deq_valid with deq_src/deq_cls; the
// scheduler then waits for deq_done (the Queue Manager's last read) before
// it decides again, so one packet at a time owns the output bus. No packet
// is started while out_ready is low.
// Timing: state changes on clk edges with ce = 1.
module gmds_scheduler
  import gmds_pkg::*;
#(
  parameter int unsigned N_PORTS = 4,
  parameter int unsigned N_CLASS = 4,
  parameter int unsigned SLOTS   = 64,
  localparam int unsigned NQ     = N_PORTS * N_CLASS,
  localparam int unsigned QW     = $clog2(NQ),
  localparam int unsigned CW     = $clog2(SLOTS + 1),
  localparam int unsigned CLW    = (N_CLASS > 1) ? $clog2(N_CLASS) : 1,
  localparam int unsigned SRCW   = (N_PORTS > 1) ? $clog2(N_PORTS) : 1,
  localparam int unsigned DW     = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic [CW-1:0]    q_count    [NQ],
  input  logic [LEN_W-1:0] q_head_len [NQ],
  input  logic [LEN_W:0]   cfg_quantum [N_CLASS],
  input  logic             out_ready,
  output logic             deq_valid,
  output logic [SRCW-1:0]  deq_src,
  output logic [CLW-1:0]   deq_cls,
  input  logic             deq_done,
  output logic [31:0]      cnt_sent,
  output logic [31:0]      cnt_deficit_skip   // non-empty queue passed for lack of deficit
);
  typedef enum logic {S_VISIT, S_WAIT} state_t;

  state_t          state;
  logic [QW-1:0]   ptr;
  logic            fresh;      // first look at queue ptr in this visit
  logic [DW-1:0]   deficit [NQ];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= S_VISIT;
      ptr              <= '0;
      fresh            <= 1'b1;
      for (int q = 0; q < NQ; q++) deficit[q] <= '0;
      deq_valid        <= 1'b0;
      deq_src          <= '0;
      deq_cls          <= '0;
      cnt_sent         <= '0;
      cnt_deficit_skip <= '0;
    end else if (ce) begin
      deq_valid <= 1'b0;
      unique case (state)
        S_VISIT: begin
          if (q_count[ptr] == 0) begin
            deficit[ptr] <= '0;
            ptr          <= (int'(ptr) == NQ - 1) ? '0 : ptr + 1'b1;
            fresh        <= 1'b1;
          end else if (fresh) begin
            deficit[ptr] <= deficit[ptr] + DW'(cfg_quantum[int'(ptr) % N_CLASS]);
            fresh        <= 1'b0;
          end else if (DW'(q_head_len[ptr]) <= deficit[ptr]) begin
            if (out_ready) begin
              deficit[ptr] <= deficit[ptr] - DW'(q_head_len[ptr]);
              deq_valid    <= 1'b1;
              deq_src      <= SRCW'(int'(ptr) / N_CLASS);
              deq_cls      <= CLW'(int'(ptr) % N_CLASS);
              cnt_sent     <= cnt_sent + 1'b1;
              state        <= S_WAIT;
            end
          end else begin
            cnt_deficit_skip <= cnt_deficit_skip + 1'b1;
            ptr              <= (int'(ptr) == NQ - 1) ? '0 : ptr + 1'b1;
            fresh            <= 1'b1;
          end
        end
        S_WAIT: if (deq_done) state <= S_VISIT;
        default: state <= S_VISIT;
      endcase
    end
  end

endmodule
