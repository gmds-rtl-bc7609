// gmds_line_card: one GMDS line card: Queue Engine(s), packet memories and
// the Deficit Round Robin Scheduler.
//
// Ingress: packets on in_* are wrapped into multiframes by the Ingress
// Manager and leave on the card's dedicated uplink (tx_*). Egress: the card
// listens to every uplink of the backplane on rx_* (including its own),
// keeps the packets addressed to it in per-(source, class) queues in its
// packet memories, and the Scheduler sends them out on frame_out_*.
// flow_out[s][c] is set while the egress of card s asks this card to hold
// back class c (to be applied by whatever feeds in_*).
//
// One Queue Engine serves PORTS_PER_QE downlinks. A card for a larger switch
// chains N_QE = N_PORTS / PORTS_PER_QE engines: engine k serves downlinks
// k*PORTS_PER_QE .. (k+1)*PORTS_PER_QE-1, with one packet memory per two
// downlinks. Only engine 0 has its Ingress Manager enabled; its uplink is the
// card's uplink. With the defaults (4 ports) the card is a single engine; with
// N_PORTS = 8 it is the two-engine card of an 8x8 switch.
//
// The congestion bitmaps travel along a daisy chain: engine k's status_word
// enters engine k-1 on flow_in, is OR-ed with that engine's own bits, and so
// on down to engine 0, which sends the combined bitmap in its multiframes.
//
// A single Scheduler sees the status buses of all engines as one list of
// N_PORTS*N_CLASS queues. Its dequeue request goes to the engine that owns
// the chosen source, and the engines share one frame_out bus. At most one
// engine drives the bus at a time, because the Scheduler serves one packet
// after another (asserted). frame_out_src is the card-wide downlink number.
// The sm_* counters are totals over the engines.
//
// The split into Queue Engine devices, external memories (one per pair of
// downlinks) and an external Scheduler device follows the document. So do the
// disabled Ingress of the extra engines and the daisy-chained status. OR-ing
// the bitmaps along the chain and the bus multiplexing are this design's own.
//
// Timing: clk is the memory clock. All engines divide it by three in lockstep
// (same clock and reset), so their ce coincide, and the card's logic runs on
// every third clock (ce).
module gmds_line_card
  import gmds_pkg::*;
#(
  parameter int unsigned N_PORTS       = 4,
  parameter int unsigned PORTS_PER_QE  = 4,
  parameter int unsigned N_CLASS       = 4,
  parameter int unsigned NPAT          = 4,
  parameter int unsigned SLOTS         = 64,
  parameter int unsigned MAX_PKT_BYTES = 256,
  parameter int unsigned STATUS_PERIOD = 64,
  localparam int unsigned N_QE         = (N_PORTS + PORTS_PER_QE - 1) / PORTS_PER_QE,
  localparam int unsigned MX_PER_QE    = (PORTS_PER_QE + 1) / 2,
  localparam int unsigned N_MX         = N_QE * MX_PER_QE,
  localparam int unsigned SLOT_WORDS   = 1 + (MAX_PKT_BYTES + 3) / 4,
  localparam int unsigned REGION       = SLOTS * SLOT_WORDS,
  localparam int unsigned MAW          = $clog2(2 * REGION),
  localparam int unsigned NQ_QE        = PORTS_PER_QE * N_CLASS,
  localparam int unsigned NQ           = N_PORTS * N_CLASS,
  localparam int unsigned CW           = $clog2(SLOTS + 1),
  localparam int unsigned LSW          = (PORTS_PER_QE > 1) ? $clog2(PORTS_PER_QE) : 1,
  localparam int unsigned SRCW         = (N_PORTS > 1) ? $clog2(N_PORTS) : 1,
  localparam int unsigned CLW          = (N_CLASS > 1) ? $clog2(N_CLASS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        my_id,
  output logic              ce,
  // frame in
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              in_sop,
  input  logic              in_eop,
  input  word_t             in_data,
  output logic [N_CLASS-1:0] flow_out [N_PORTS],
  // backplane
  output logic              tx_valid,
  output word_t             tx_data,
  input  logic              rx_clk   [N_PORTS],
  input  logic              rx_rst_n [N_PORTS],
  input  logic              rx_valid [N_PORTS],
  input  word_t             rx_data  [N_PORTS],
  // configuration
  input  logic [DEST_W-1:0] pat_value [NPAT],
  input  logic [DEST_W-1:0] pat_mask  [NPAT],
  input  logic [NPAT-1:0]   pat_en,
  input  logic [CW-1:0]     cfg_thr     [N_CLASS],
  input  logic [LEN_W:0]    cfg_quantum [N_CLASS],
  // frame out
  input  logic              out_ready,
  output logic              frame_out_valid,
  output logic              frame_out_sop,
  output logic              frame_out_eop,
  output logic [SRCW-1:0]   frame_out_src,
  output word_t             frame_out_data,
  // statistics
  output logic [31:0]       ff_accepted [N_PORTS],
  output logic [31:0]       ff_filtered [N_PORTS],
  output logic [31:0]       ff_errors   [N_PORTS],
  output logic              ff_overflow [N_PORTS],
  output logic [31:0]       qm_drops    [N_PORTS],
  output logic [31:0]       mx_dual_writes [N_MX],
  output logic [31:0]       sm_in,
  output logic [31:0]       sm_out,
  output logic [31:0]       sm_xoff_events,
  output logic [31:0]       im_multiframes,
  output logic [31:0]       sch_sent,
  output logic [31:0]       sch_deficit_skips
);
  logic              ram_en [N_MX], ram_we [N_MX];
  logic [MAW-1:0]    ram_addr [N_MX];
  word_t             ram_wdata [N_MX], ram_rdata [N_MX];
  logic [CW-1:0]     q_count [NQ];
  logic [LEN_W-1:0]  q_head_len [NQ];
  logic              deq_valid;
  logic [SRCW-1:0]   deq_src;
  logic [CLW-1:0]    deq_cls;
  logic              deq_done;

  // per engine
  logic              qe_ce [N_QE];
  logic              qe_in_ready [N_QE], qe_tx_valid [N_QE];
  word_t             qe_tx_data [N_QE];
  word_t             qe_status [N_QE], qe_flow_in [N_QE];
  logic              qe_deq_done [N_QE];
  logic              qe_fo_valid [N_QE], qe_fo_sop [N_QE], qe_fo_eop [N_QE];
  logic [LSW-1:0]    qe_fo_src [N_QE];
  word_t             qe_fo_data [N_QE];
  logic [31:0]       qe_mf [N_QE];
  logic [31:0]       qe_sm_in [N_QE], qe_sm_out [N_QE], qe_sm_xoff [N_QE];

  if (N_QE * PORTS_PER_QE != N_PORTS) begin : g_size_check
    $error("N_PORTS must be a multiple of PORTS_PER_QE");
  end

  for (genvar k = 0; k < N_QE; k++) begin : g_qe
    localparam int unsigned B = k * PORTS_PER_QE;
    logic              l_rx_clk [PORTS_PER_QE], l_rx_rst_n [PORTS_PER_QE], l_rx_valid [PORTS_PER_QE];
    word_t             l_rx_data [PORTS_PER_QE];
    logic [N_CLASS-1:0] l_flow [PORTS_PER_QE];
    logic              l_ram_en [MX_PER_QE], l_ram_we [MX_PER_QE];
    logic [MAW-1:0]    l_ram_addr [MX_PER_QE];
    word_t             l_ram_wdata [MX_PER_QE], l_ram_rdata [MX_PER_QE];
    logic [CW-1:0]     l_q_count [NQ_QE];
    logic [LEN_W-1:0]  l_q_head_len [NQ_QE];
    logic [31:0]       l_acc [PORTS_PER_QE], l_filt [PORTS_PER_QE], l_err [PORTS_PER_QE], l_drop [PORTS_PER_QE];
    logic              l_ovf [PORTS_PER_QE];
    logic [31:0]       l_dual [MX_PER_QE];

    for (genvar p = 0; p < PORTS_PER_QE; p++) begin : g_port
      assign l_rx_clk[p]   = rx_clk[B + p];
      assign l_rx_rst_n[p] = rx_rst_n[B + p];
      assign l_rx_valid[p] = rx_valid[B + p];
      assign l_rx_data[p]  = rx_data[B + p];
      assign flow_out[B + p]    = l_flow[p];
      assign ff_accepted[B + p] = l_acc[p];
      assign ff_filtered[B + p] = l_filt[p];
      assign ff_errors[B + p]   = l_err[p];
      assign ff_overflow[B + p] = l_ovf[p];
      assign qm_drops[B + p]    = l_drop[p];
    end
    for (genvar m = 0; m < MX_PER_QE; m++) begin : g_ram
      assign ram_en[k * MX_PER_QE + m]    = l_ram_en[m];
      assign ram_we[k * MX_PER_QE + m]    = l_ram_we[m];
      assign ram_addr[k * MX_PER_QE + m]  = l_ram_addr[m];
      assign ram_wdata[k * MX_PER_QE + m] = l_ram_wdata[m];
      assign l_ram_rdata[m]               = ram_rdata[k * MX_PER_QE + m];
      assign mx_dual_writes[k * MX_PER_QE + m] = l_dual[m];
    end
    for (genvar q = 0; q < NQ_QE; q++) begin : g_q
      assign q_count[k * NQ_QE + q]    = l_q_count[q];
      assign q_head_len[k * NQ_QE + q] = l_q_head_len[q];
    end
    // daisy chain: the next engine's bitmap enters here
    if (k + 1 < N_QE) begin : g_chain
      assign qe_flow_in[k] = qe_status[k + 1];
    end else begin : g_last
      assign qe_flow_in[k] = '0;
    end

    gmds_queue_engine #(
      .N_PORTS(PORTS_PER_QE), .N_CLASS(N_CLASS), .NPAT(NPAT), .SLOTS(SLOTS),
      .MAX_PKT_BYTES(MAX_PKT_BYTES), .STATUS_PERIOD(STATUS_PERIOD), .PORT_BASE(B)
    ) u_qe (
      .clk(clk), .rst_n(rst_n), .my_id(my_id), .ingress_en(k == 0), .ce(qe_ce[k]), .phase(),
      .in_valid(k == 0 && in_valid), .in_ready(qe_in_ready[k]), .in_sop(in_sop), .in_eop(in_eop),
      .in_data(in_data), .tx_valid(qe_tx_valid[k]), .tx_data(qe_tx_data[k]),
      .rx_clk(l_rx_clk), .rx_rst_n(l_rx_rst_n), .rx_valid(l_rx_valid), .rx_data(l_rx_data),
      .ram_en(l_ram_en), .ram_we(l_ram_we), .ram_addr(l_ram_addr), .ram_wdata(l_ram_wdata),
      .ram_rdata(l_ram_rdata),
      .pat_value(pat_value), .pat_mask(pat_mask), .pat_en(pat_en), .cfg_thr(cfg_thr),
      .flow_in(qe_flow_in[k]), .status_word(qe_status[k]), .flow_out(l_flow),
      .q_count(l_q_count), .q_head_len(l_q_head_len),
      .deq_valid(deq_valid && int'(deq_src) / PORTS_PER_QE == k),
      .deq_src(LSW'(int'(deq_src) % PORTS_PER_QE)), .deq_cls(deq_cls), .deq_done(qe_deq_done[k]),
      .frame_out_valid(qe_fo_valid[k]), .frame_out_sop(qe_fo_sop[k]), .frame_out_eop(qe_fo_eop[k]),
      .frame_out_src(qe_fo_src[k]), .frame_out_data(qe_fo_data[k]),
      .ff_accepted(l_acc), .ff_filtered(l_filt), .ff_errors(l_err), .ff_overflow(l_ovf),
      .qm_drops(l_drop), .mx_dual_writes(l_dual),
      .sm_in(qe_sm_in[k]), .sm_out(qe_sm_out[k]), .sm_xoff_events(qe_sm_xoff[k]),
      .im_multiframes(qe_mf[k])
    );
  end

  assign ce             = qe_ce[0];
  assign in_ready       = qe_in_ready[0];
  assign tx_valid       = qe_tx_valid[0];
  assign tx_data        = qe_tx_data[0];
  assign im_multiframes = qe_mf[0];

  // ---------------- shared frame_out bus, counter totals ----------------
  logic [7:0] n_drv;   // engines driving the bus in this cycle

  always_comb begin
    deq_done        = 1'b0;
    frame_out_valid = 1'b0;
    frame_out_sop   = 1'b0;
    frame_out_eop   = 1'b0;
    frame_out_src   = '0;
    frame_out_data  = '0;
    n_drv           = 0;
    sm_in           = '0;
    sm_out          = '0;
    sm_xoff_events  = '0;
    for (int k = 0; k < N_QE; k++) begin
      deq_done |= qe_deq_done[k];
      sm_in          = sm_in + qe_sm_in[k];
      sm_out         = sm_out + qe_sm_out[k];
      sm_xoff_events = sm_xoff_events + qe_sm_xoff[k];
      if (qe_fo_valid[k]) begin
        n_drv = n_drv + 8'd1;
        frame_out_valid = 1'b1;
        frame_out_sop   = qe_fo_sop[k];
        frame_out_eop   = qe_fo_eop[k];
        frame_out_src   = SRCW'(k * PORTS_PER_QE + int'(qe_fo_src[k]));
        frame_out_data  = qe_fo_data[k];
      end
    end
  end

  // Only the engine holding the selected queue drives the bus.
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) n_drv <= 8'd1);

  // ---------------- packet memories ----------------
  for (genvar m = 0; m < N_MX; m++) begin : g_mem
    gmds_pkt_mem #(.DW(W), .DEPTH(2 * REGION)) u_mem (
      .clk(clk), .en(ram_en[m]), .we(ram_we[m]), .addr(ram_addr[m]),
      .wdata(ram_wdata[m]), .rdata(ram_rdata[m])
    );
  end

  // ---------------- scheduler ----------------
  gmds_scheduler #(.N_PORTS(N_PORTS), .N_CLASS(N_CLASS), .SLOTS(SLOTS)) u_sch (
    .clk(clk), .rst_n(rst_n), .ce(ce),
    .q_count(q_count), .q_head_len(q_head_len), .cfg_quantum(cfg_quantum),
    .out_ready(out_ready), .deq_valid(deq_valid), .deq_src(deq_src), .deq_cls(deq_cls),
    .deq_done(deq_done), .cnt_sent(sch_sent), .cnt_deficit_skip(sch_deficit_skips)
  );

endmodule
