// gmds_status_manager: Status Manager (SM) of the line card's egress.
//
// Keeps an exact frame count of every queue, one queue per (source downlink,
// class), from the enqueue and dequeue events of the Queue Managers, and
// publishes them on the scheduler status bus together with the length of
// each queue's head packet (taken from the Queue Managers). Queue q is
// source q / N_CLASS, class q % N_CLASS.
//
// Flow control: a programmable threshold per class (0 disables it) marks a
// queue as congested while its frame count is at or above the threshold.
// The congestion bitmap, bit ((SRC_BASE + source)*N_CLASS + class), where
// SRC_BASE numbers this device's sources within the card, is OR-ed with the
// bitmap arriving on flow_in (from another Queue Engine of the same card,
// which is chained when one card needs several devices) and sent out as
// status_word; the Ingress Manager carries it to all cards in its
// multiframes, so the source card can stop that class: end-to-end flow
// control per source and class. Counting, per-class thresholds and the
// report to the Scheduler follow the document; the bitmap format and the
// OR-chaining are this design's choices.
//
// Timing: events are sampled on clk edges with ce = 1; counts and
// status_word are registered and change one ce after the event.
module gmds_status_manager
  import gmds_pkg::*;
#(
  parameter int unsigned N_PORTS = 4,
  parameter int unsigned N_CLASS = 4,
  parameter int unsigned SLOTS   = 64,
  parameter int unsigned SRC_BASE = 0,   // card-wide number of source 0
  localparam int unsigned NQ     = N_PORTS * N_CLASS,
  localparam int unsigned CW     = $clog2(SLOTS + 1),
  localparam int unsigned CLW    = (N_CLASS > 1) ? $clog2(N_CLASS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic             enq_evt [N_PORTS],
  input  logic [CLW-1:0]   enq_cls [N_PORTS],
  input  logic             deq_evt [N_PORTS],
  input  logic [CLW-1:0]   deq_cls [N_PORTS],
  input  logic [LEN_W-1:0] qm_head_len [N_PORTS][N_CLASS],
  input  logic [CW-1:0]    cfg_thr [N_CLASS],
  input  word_t            flow_in,
  output word_t            status_word,
  // scheduler status bus
  output logic [CW-1:0]    q_count  [NQ],
  output logic [LEN_W-1:0] q_head_len [NQ],
  // statistics
  output logic [31:0]      cnt_in,
  output logic [31:0]      cnt_out,
  output logic [31:0]      cnt_xoff_events   // rising edges of any congestion bit
);
  word_t local_xoff;

  if ((SRC_BASE + N_PORTS) * N_CLASS > W) begin : g_size_check
    $error("the status word has no bit for every (source, class) queue");
  end

  always_comb begin
    local_xoff = '0;
    for (int q = 0; q < NQ; q++)
      if (cfg_thr[q % N_CLASS] != 0 && q_count[q] >= cfg_thr[q % N_CLASS])
        local_xoff[SRC_BASE * N_CLASS + q] = 1'b1;
  end

  for (genvar s = 0; s < N_PORTS; s++) begin : g_src
    for (genvar c = 0; c < N_CLASS; c++) begin : g_cls
      assign q_head_len[s*N_CLASS + c] = qm_head_len[s][c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < NQ; q++) q_count[q] <= '0;
      status_word     <= '0;
      cnt_in          <= '0;
      cnt_out         <= '0;
      cnt_xoff_events <= '0;
    end else if (ce) begin
      automatic int unsigned nin = 0, nout = 0;
      for (int s = 0; s < N_PORTS; s++) begin
        for (int c = 0; c < N_CLASS; c++) begin
          automatic logic inc = enq_evt[s] && enq_cls[s] == CLW'(c);
          automatic logic dec = deq_evt[s] && deq_cls[s] == CLW'(c);
          q_count[s*N_CLASS + c] <= q_count[s*N_CLASS + c] + CW'(inc) - CW'(dec);
        end
        nin  += int'(enq_evt[s]);
        nout += int'(deq_evt[s]);
      end
      cnt_in      <= cnt_in + nin;
      cnt_out     <= cnt_out + nout;
      status_word <= local_xoff | flow_in;
      if ((local_xoff & ~status_word) != '0) cnt_xoff_events <= cnt_xoff_events + 1'b1;
    end
  end

endmodule
