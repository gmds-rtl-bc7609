// gmds_queue_engine: Queue Engine, the line-card device holding all of a
// card's logic except the Scheduler and the packet memories.
//
// Contents: one Ingress Manager (which can be switched off, for cards built
// from several Queue Engines where only one carries the ingress), one Frame
// Filter and one Queue Manager per backplane downlink, one Multiplexer per
// pair of downlinks, and the Status Manager. The packet memories sit outside
// on the ram_* ports, one per Multiplexer, and the Scheduler on the
// scheduler status bus (q_count, q_head_len, deq_*). The partition follows the
// document; signal names and formats are this design's own.
//
// Clocking: clk is the memory clock. A phase counter 0,1,2 divides it by
// three; ce (phase 2) is the Queue Manager clock enable, so all Ingress,
// Frame Filter, Queue Manager, Status Manager and Scheduler logic runs at a
// third of the memory clock and each Multiplexer gets two write slots and a
// read slot per Queue Manager cycle. Each rx_* downlink carries the words of
// one remote Ingress Manager in that card's own clock (rx_clk).
//
// Cards with more downlinks than one Queue Engine serves are built from
// several engines: PORT_BASE is then the backplane link number of this
// engine's downlink 0, so link ids and status bits stay card-wide, while
// deq_src, frame_out_src and the q_* bus index the engine's own downlinks.
// The status bitmaps of the engines are daisy-chained through flow_in and
// status_word to the engine that carries the Ingress.
//
// rst_n is the asynchronous reset of all control state. It also disables
// the bus assertion during reset, which lint tools may report as rst_n being
// used both asynchronously and synchronously; no logic uses it synchronously.
//
// frame_out_*: the egress output link, one word per ce, sop on the packet
// header word and eop on its last payload word; frame_out_src names the
// source downlink. It is registered on ce from the Multiplexer outputs.
module gmds_queue_engine
  import gmds_pkg::*;
#(
  parameter int unsigned N_PORTS       = 4,
  parameter int unsigned N_CLASS       = 4,
  parameter int unsigned NPAT          = 4,
  parameter int unsigned SLOTS         = 64,
  parameter int unsigned MAX_PKT_BYTES = 256,
  parameter int unsigned STATUS_PERIOD = 64,
  parameter int unsigned PORT_BASE     = 0,   // backplane link of downlink 0
  localparam int unsigned N_MX         = (N_PORTS + 1) / 2,
  localparam int unsigned SLOT_WORDS   = 1 + (MAX_PKT_BYTES + 3) / 4,
  localparam int unsigned REGION       = SLOTS * SLOT_WORDS,
  localparam int unsigned LAW          = $clog2(REGION),
  localparam int unsigned MAW          = $clog2(2 * REGION),
  localparam int unsigned NQ           = N_PORTS * N_CLASS,
  localparam int unsigned CW           = $clog2(SLOTS + 1),
  localparam int unsigned CLW          = (N_CLASS > 1) ? $clog2(N_CLASS) : 1,
  localparam int unsigned SRCW         = (N_PORTS > 1) ? $clog2(N_PORTS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        my_id,
  input  logic              ingress_en,
  output logic              ce,
  output logic [1:0]        phase,
  // frame in (ingress)
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              in_sop,
  input  logic              in_eop,
  input  word_t             in_data,
  // uplink
  output logic              tx_valid,
  output word_t             tx_data,
  // downlinks
  input  logic              rx_clk   [N_PORTS],
  input  logic              rx_rst_n [N_PORTS],
  input  logic              rx_valid [N_PORTS],
  input  word_t             rx_data  [N_PORTS],
  // packet memories
  output logic              ram_en    [N_MX],
  output logic              ram_we    [N_MX],
  output logic [MAW-1:0]    ram_addr  [N_MX],
  output word_t             ram_wdata [N_MX],
  input  word_t             ram_rdata [N_MX],
  // configuration
  input  logic [DEST_W-1:0] pat_value [NPAT],
  input  logic [DEST_W-1:0] pat_mask  [NPAT],
  input  logic [NPAT-1:0]   pat_en,
  input  logic [CW-1:0]     cfg_thr   [N_CLASS],
  // flow control
  input  word_t             flow_in,
  output word_t             status_word,
  output logic [N_CLASS-1:0] flow_out [N_PORTS],
  // scheduler interface
  output logic [CW-1:0]     q_count    [NQ],
  output logic [LEN_W-1:0]  q_head_len [NQ],
  input  logic              deq_valid,
  input  logic [SRCW-1:0]   deq_src,
  input  logic [CLW-1:0]    deq_cls,
  output logic              deq_done,
  // frame out (egress)
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
  output logic [31:0]       im_multiframes
);
  // ---------------- clock enable ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              phase <= 2'd0;
    else if (phase == 2'd2)  phase <= 2'd0;
    else                     phase <= phase + 2'd1;
  end
  assign ce = (phase == 2'd2);

  // ---------------- ingress ----------------
  logic im_ready;
  gmds_ingress_manager #(.STATUS_PERIOD(STATUS_PERIOD)) u_im (
    .clk(clk), .rst_n(rst_n), .ce(ce && ingress_en), .my_id(my_id),
    .in_valid(in_valid && ingress_en), .in_ready(im_ready), .in_sop(in_sop),
    .in_eop(in_eop), .in_data(in_data), .status_word(status_word),
    .tx_valid(tx_valid), .tx_data(tx_data), .mf_count(im_multiframes)
  );
  assign in_ready = im_ready && ingress_en;

  // ---------------- per downlink: Frame Filter + Queue Manager ----------------
  logic             ff_valid [N_PORTS], ff_sop [N_PORTS], ff_eop [N_PORTS], ff_err [N_PORTS];
  word_t            ff_data  [N_PORTS];
  logic             wr_valid [N_PORTS], rd_valid [N_PORTS], rd_sop [N_PORTS], rd_eop [N_PORTS];
  logic [LAW-1:0]   wr_addr  [N_PORTS], rd_addr  [N_PORTS];
  word_t            wr_data  [N_PORTS];
  logic             qm_done  [N_PORTS];
  logic             enq_evt  [N_PORTS], deq_evt [N_PORTS];
  logic [CLW-1:0]   enq_cls  [N_PORTS], deq_cls_o [N_PORTS];
  logic [LEN_W-1:0] head_len [N_PORTS][N_CLASS];

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    gmds_frame_filter #(
      .N_PORTS(N_PORTS), .N_CLASS(N_CLASS), .NPAT(NPAT), .MAX_PKT_BYTES(MAX_PKT_BYTES)
    ) u_ff (
      .rx_clk(rx_clk[p]), .rx_rst_n(rx_rst_n[p]), .rx_valid(rx_valid[p]), .rx_data(rx_data[p]),
      .clk(clk), .rst_n(rst_n), .ce(ce), .my_id(my_id), .link_id(8'(PORT_BASE + p)),
      .pat_value(pat_value), .pat_mask(pat_mask), .pat_en(pat_en),
      .out_valid(ff_valid[p]), .out_sop(ff_sop[p]), .out_eop(ff_eop[p]),
      .out_err(ff_err[p]), .out_data(ff_data[p]),
      .flow_xoff(flow_out[p]), .cnt_accepted(ff_accepted[p]),
      .cnt_filtered(ff_filtered[p]), .cnt_errors(ff_errors[p]),
      .fifo_overflow(ff_overflow[p])
    );

    gmds_queue_manager #(
      .N_CLASS(N_CLASS), .SLOTS(SLOTS), .MAX_PKT_BYTES(MAX_PKT_BYTES)
    ) u_qm (
      .clk(clk), .rst_n(rst_n), .ce(ce),
      .in_valid(ff_valid[p]), .in_sop(ff_sop[p]), .in_eop(ff_eop[p]),
      .in_err(ff_err[p]), .in_data(ff_data[p]),
      .wr_valid(wr_valid[p]), .wr_addr(wr_addr[p]), .wr_data(wr_data[p]),
      .deq_valid(deq_valid && deq_src == SRCW'(p)), .deq_cls(deq_cls), .deq_done(qm_done[p]),
      .rd_valid(rd_valid[p]), .rd_addr(rd_addr[p]), .rd_sop(rd_sop[p]), .rd_eop(rd_eop[p]),
      .enq_evt(enq_evt[p]), .enq_cls(enq_cls[p]), .deq_evt(deq_evt[p]), .deq_cls_o(deq_cls_o[p]),
      .head_len(head_len[p]), .q_count(), .cnt_drop(qm_drops[p])
    );
  end

  always_comb begin
    deq_done = 1'b0;
    for (int p = 0; p < N_PORTS; p++) deq_done |= qm_done[p];
  end

  // ---------------- multiplexers ----------------
  logic  mx_valid [N_MX], mx_sop [N_MX], mx_eop [N_MX], mx_src [N_MX];
  word_t mx_data  [N_MX];

  for (genvar m = 0; m < N_MX; m++) begin : g_mx
    localparam int unsigned PA = 2 * m;
    localparam int unsigned PB = (2 * m + 1 < N_PORTS) ? 2 * m + 1 : 2 * m;
    localparam bit          HAS_B = (2 * m + 1 < N_PORTS);
    logic mx_conflict;
    gmds_multiplexer #(.REGION(REGION)) u_mx (
      .clk(clk), .rst_n(rst_n), .phase(phase),
      .a_wr_valid(wr_valid[PA]), .a_wr_addr(wr_addr[PA]), .a_wr_data(wr_data[PA]),
      .a_rd_valid(rd_valid[PA]), .a_rd_addr(rd_addr[PA]), .a_rd_sop(rd_sop[PA]), .a_rd_eop(rd_eop[PA]),
      .b_wr_valid(HAS_B && wr_valid[PB]), .b_wr_addr(wr_addr[PB]), .b_wr_data(wr_data[PB]),
      .b_rd_valid(HAS_B && rd_valid[PB]), .b_rd_addr(rd_addr[PB]), .b_rd_sop(rd_sop[PB]), .b_rd_eop(rd_eop[PB]),
      .mem_en(ram_en[m]), .mem_we(ram_we[m]), .mem_addr(ram_addr[m]), .mem_wdata(ram_wdata[m]),
      .mem_rdata(ram_rdata[m]),
      .out_valid(mx_valid[m]), .out_sop(mx_sop[m]), .out_eop(mx_eop[m]), .out_src(mx_src[m]),
      .out_data(mx_data[m]), .rd_conflict(mx_conflict), .cnt_dual_write(mx_dual_writes[m])
    );
    // The Scheduler serves one packet at a time, so two Queue Managers of a
    // Multiplexer never read in the same period.
    a_one_reader: assert property (@(posedge clk) disable iff (!rst_n) !mx_conflict);
  end

  // ---------------- frame out bus ----------------
  // Only the queue selected by the Scheduler drives the bus at any time.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_out_valid <= 1'b0;
      frame_out_sop   <= 1'b0;
      frame_out_eop   <= 1'b0;
      frame_out_src   <= '0;
      frame_out_data  <= '0;
    end else if (ce) begin
      frame_out_valid <= 1'b0;
      frame_out_sop   <= 1'b0;
      frame_out_eop   <= 1'b0;
      for (int m = 0; m < N_MX; m++) begin
        if (mx_valid[m]) begin
          frame_out_valid <= 1'b1;
          frame_out_sop   <= mx_sop[m];
          frame_out_eop   <= mx_eop[m];
          frame_out_src   <= SRCW'(2 * m + int'(mx_src[m]));
          frame_out_data  <= mx_data[m];
        end
      end
    end
  end

  // ---------------- status manager ----------------
  gmds_status_manager #(
    .N_PORTS(N_PORTS), .N_CLASS(N_CLASS), .SLOTS(SLOTS), .SRC_BASE(PORT_BASE)
  ) u_sm (
    .clk(clk), .rst_n(rst_n), .ce(ce),
    .enq_evt(enq_evt), .enq_cls(enq_cls), .deq_evt(deq_evt), .deq_cls(deq_cls_o),
    .qm_head_len(head_len), .cfg_thr(cfg_thr), .flow_in(flow_in), .status_word(status_word),
    .q_count(q_count), .q_head_len(q_head_len),
    .cnt_in(sm_in), .cnt_out(sm_out), .cnt_xoff_events(sm_xoff_events)
  );

endmodule
