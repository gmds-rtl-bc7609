// gmds_switch: an N_PORTS x N_PORTS GMDS (Gigabit MultiDrop Switch).
//
// A real output-queued packet switch without a switch fabric. Every line
// card owns one uplink of a multidrop backplane, and the backplane delivers
// that uplink to every card, itself included. Each card's egress therefore
// sees every packet from every ingress at once, keeps the ones addressed to
// it, and queues them at the output, per source and class. No arbitration
// and no speed-up of a fabric are needed, and multicast is free.
//
// The backplane is a passive power-splitter network. At the logic level it
// is a broadcast of each card's uplink word stream, with that card's clock,
// to all cards; this module wires it that way. The serializers,
// deserializers and line drivers are not modelled: the links carry 32-bit
// words. Every card runs on its own clock clk[i] (memory clock; the card
// logic uses every third cycle), so the cards need not share a clock.
//
// Ports are per card: packet input in_*[i] (valid/ready, sop on the packet
// header word), flow_out[i][s] (card s asks card i to hold back the classes
// set), out_ready[i]/frame_out_*[i] (egress output), configuration and
// statistics. rst_n is an asynchronous reset for all cards.
module gmds_switch
  import gmds_pkg::*;
#(
  parameter int unsigned N_PORTS       = 4,
  parameter int unsigned N_CLASS       = 4,
  parameter int unsigned NPAT          = 4,
  parameter int unsigned SLOTS         = 64,
  parameter int unsigned MAX_PKT_BYTES = 256,
  parameter int unsigned STATUS_PERIOD = 64,
  localparam int unsigned N_MX         = (N_PORTS + 1) / 2,
  localparam int unsigned CW           = $clog2(SLOTS + 1),
  localparam int unsigned SRCW         = (N_PORTS > 1) ? $clog2(N_PORTS) : 1
) (
  input  logic              clk      [N_PORTS],
  input  logic              rst_n,
  output logic              ce       [N_PORTS],
  // frame in, per card
  input  logic              in_valid [N_PORTS],
  output logic              in_ready [N_PORTS],
  input  logic              in_sop   [N_PORTS],
  input  logic              in_eop   [N_PORTS],
  input  word_t             in_data  [N_PORTS],
  output logic [N_CLASS-1:0] flow_out [N_PORTS][N_PORTS],
  // configuration, per card
  input  logic [DEST_W-1:0] pat_value   [N_PORTS][NPAT],
  input  logic [DEST_W-1:0] pat_mask    [N_PORTS][NPAT],
  input  logic [NPAT-1:0]   pat_en      [N_PORTS],
  input  logic [CW-1:0]     cfg_thr     [N_PORTS][N_CLASS],
  input  logic [LEN_W:0]    cfg_quantum [N_PORTS][N_CLASS],
  // frame out, per card
  input  logic              out_ready       [N_PORTS],
  output logic              frame_out_valid [N_PORTS],
  output logic              frame_out_sop   [N_PORTS],
  output logic              frame_out_eop   [N_PORTS],
  output logic [SRCW-1:0]   frame_out_src   [N_PORTS],
  output word_t             frame_out_data  [N_PORTS],
  // statistics, per card
  output logic [31:0]       ff_accepted [N_PORTS][N_PORTS],
  output logic [31:0]       ff_filtered [N_PORTS][N_PORTS],
  output logic [31:0]       ff_errors   [N_PORTS][N_PORTS],
  output logic              ff_overflow [N_PORTS][N_PORTS],
  output logic [31:0]       qm_drops    [N_PORTS][N_PORTS],
  output logic [31:0]       mx_dual_writes [N_PORTS][N_MX],
  output logic [31:0]       sm_in          [N_PORTS],
  output logic [31:0]       sm_out         [N_PORTS],
  output logic [31:0]       sm_xoff_events [N_PORTS],
  output logic [31:0]       im_multiframes [N_PORTS],
  output logic [31:0]       sch_sent          [N_PORTS],
  output logic [31:0]       sch_deficit_skips [N_PORTS]
);
  // Multidrop backplane: uplink i reaches downlink i of every card.
  logic  up_valid [N_PORTS];
  word_t up_data  [N_PORTS];
  logic  rst_n_v  [N_PORTS];

  for (genvar i = 0; i < N_PORTS; i++) begin : g_card
    assign rst_n_v[i] = rst_n;

    gmds_line_card #(
      .N_PORTS(N_PORTS), .N_CLASS(N_CLASS), .NPAT(NPAT), .SLOTS(SLOTS),
      .MAX_PKT_BYTES(MAX_PKT_BYTES), .STATUS_PERIOD(STATUS_PERIOD)
    ) u_card (
      .clk(clk[i]), .rst_n(rst_n), .my_id(8'(i)), .ce(ce[i]),
      .in_valid(in_valid[i]), .in_ready(in_ready[i]), .in_sop(in_sop[i]), .in_eop(in_eop[i]),
      .in_data(in_data[i]), .flow_out(flow_out[i]),
      .tx_valid(up_valid[i]), .tx_data(up_data[i]),
      .rx_clk(clk), .rx_rst_n(rst_n_v), .rx_valid(up_valid), .rx_data(up_data),
      .pat_value(pat_value[i]), .pat_mask(pat_mask[i]), .pat_en(pat_en[i]),
      .cfg_thr(cfg_thr[i]), .cfg_quantum(cfg_quantum[i]),
      .out_ready(out_ready[i]), .frame_out_valid(frame_out_valid[i]),
      .frame_out_sop(frame_out_sop[i]), .frame_out_eop(frame_out_eop[i]),
      .frame_out_src(frame_out_src[i]), .frame_out_data(frame_out_data[i]),
      .ff_accepted(ff_accepted[i]), .ff_filtered(ff_filtered[i]), .ff_errors(ff_errors[i]),
      .ff_overflow(ff_overflow[i]), .qm_drops(qm_drops[i]), .mx_dual_writes(mx_dual_writes[i]),
      .sm_in(sm_in[i]), .sm_out(sm_out[i]), .sm_xoff_events(sm_xoff_events[i]),
      .im_multiframes(im_multiframes[i]),
      .sch_sent(sch_sent[i]), .sch_deficit_skips(sch_deficit_skips[i])
    );
  end

endmodule
