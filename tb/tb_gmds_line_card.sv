// tb_gmds_line_card: one line card (card 1 of four): Queue Engine, packet
// memories and the DRR Scheduler together.
//
// Downlink 1 is the card's own uplink looped back; downlink 0 carries
// multiframes encoded by the testbench in a foreign clock (7.9 ns);
// downlinks 2 and 3 are silent. Packets from both sources are addressed to
// card 1 (pattern 0x1001, or direct bitmap) or elsewhere (filtered). The
// output is stalled (out_ready low) at the start and now and then, so queues
// pass the threshold (3 frames) and the DRR has several queues to choose
// from. Every packet on frame_out must be the oldest of its (source, class)
// queue, word for word; none may be lost. The congested queues must be seen
// on flow_out[1] through the looped-back status, and downlink 0's status
// bits [7:4] on flow_out[0]. Checks the Scheduler counted every packet and
// passed a queue for lack of deficit at least once.
`timescale 1ps/1ps
module tb_gmds_line_card;
  import gmds_pkg::*;
  localparam int N = 4, NC = 4, NPAT = 4, SLOTS = 64, MAXB = 256;
  localparam int CW = $clog2(SLOTS + 1);
  localparam int NQ = N * NC;

  logic clk = 0, rclk = 0, rst_n = 0, ce;
  logic [1:0] rphase;
  logic in_valid, in_ready, in_sop, in_eop, tx_valid;
  word_t in_data, tx_data;
  logic rx_clk [N], rx_rst_n [N], rx_valid [N];
  word_t rx_data [N];
  logic [DEST_W-1:0] pat_value [NPAT], pat_mask [NPAT];
  logic [NPAT-1:0] pat_en;
  logic [CW-1:0] cfg_thr [NC];
  logic [LEN_W:0] cfg_quantum [NC];
  logic out_ready;
  logic [NC-1:0] flow_out [N];
  logic fo_valid, fo_sop, fo_eop;
  logic [1:0] fo_src;
  word_t fo_data;
  logic [31:0] ff_acc [N], ff_filt [N], ff_err [N], qm_drops [N], mx_dual [2];
  logic ff_ovf [N];
  logic [31:0] sm_in, sm_out, sm_xoff, im_mf, sch_sent, sch_skips;
  logic r_valid;
  word_t r_data;

  gmds_line_card dut (
    .clk(clk), .rst_n(rst_n), .my_id(8'd1), .ce(ce),
    .in_valid(in_valid), .in_ready(in_ready), .in_sop(in_sop), .in_eop(in_eop), .in_data(in_data),
    .flow_out(flow_out), .tx_valid(tx_valid), .tx_data(tx_data),
    .rx_clk(rx_clk), .rx_rst_n(rx_rst_n), .rx_valid(rx_valid), .rx_data(rx_data),
    .pat_value(pat_value), .pat_mask(pat_mask), .pat_en(pat_en), .cfg_thr(cfg_thr),
    .cfg_quantum(cfg_quantum), .out_ready(out_ready),
    .frame_out_valid(fo_valid), .frame_out_sop(fo_sop), .frame_out_eop(fo_eop),
    .frame_out_src(fo_src), .frame_out_data(fo_data),
    .ff_accepted(ff_acc), .ff_filtered(ff_filt), .ff_errors(ff_err), .ff_overflow(ff_ovf),
    .qm_drops(qm_drops), .mx_dual_writes(mx_dual),
    .sm_in(sm_in), .sm_out(sm_out), .sm_xoff_events(sm_xoff), .im_multiframes(im_mf),
    .sch_sent(sch_sent), .sch_deficit_skips(sch_skips)
  );

  always #4000 clk = ~clk;
  always #3950 rclk = ~rclk;
  always_ff @(posedge rclk or negedge rst_n)
    if (!rst_n) rphase <= 0; else rphase <= (rphase == 2) ? 2'd0 : rphase + 2'd1;

  // downlinks: 0 from the testbench, 1 looped back, 2 and 3 silent
  assign rx_clk   = '{rclk, clk, clk, clk};
  assign rx_rst_n = '{rst_n, rst_n, rst_n, rst_n};
  assign rx_valid = '{r_valid, tx_valid, 1'b0, 1'b0};
  assign rx_data  = '{r_data, tx_data, 32'h0, 32'h0};

  int checks = 0, failures = 0;
  task automatic fail(string m);
    failures++; if (failures < 20) $display("FAIL %0t: %s", $time, m);
  endtask

  typedef word_t pkt_t [$];
  pkt_t exp_q [N][NC][$];
  int delivered = 0, n_expected = 0;
  bit seen_flow1 = 0, seen_flow0 = 0;
  word_t remote_status = '0;

  task automatic link_word(word_t w, bit valid = 1);
    do @(negedge rclk); while (rphase != 2);
    r_valid = valid; r_data = w;
    @(negedge rclk);
    r_valid = 0;
  endtask

  task automatic remote_mf(bit has_pkt, word_t status, pkt_t pkt);
    mf_sync_t s = '0;
    word_t chk;
    s.sync = SYNC_PATTERN; s.src_id = 8'd0; s.has_pkt = has_pkt;
    link_word(word_t'(s)); chk = word_t'(s);
    link_word(status); chk ^= status;
    if (has_pkt) foreach (pkt[i]) begin link_word(pkt[i]); chk ^= pkt[i]; end
    link_word(chk);
    repeat (2) link_word('0, 0);
  endtask

  function automatic pkt_t new_pkt(logic direct, logic [15:0] dest);
    pkt_t p;
    pkt_hdr_t h = '0;
    h.direct = direct; h.dest = dest;
    h.cls = 3'($urandom_range(NC - 1));
    h.len = LEN_W'($urandom_range(MAXB, 1));
    p.push_back(word_t'(h));
    for (int i = 0; i < (int'(h.len) + 3) / 4; i++) p.push_back($urandom);
    return p;
  endfunction

  int local_sent = 0, remote_sent = 0;
  localparam int NPKT = 80;

  initial begin
    #9000 rst_n = 1;
    repeat (2_000_000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // local ingress source (its packets come back on downlink 1)
  initial begin
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = '0;
    wait (rst_n);
    for (int p = 0; p < NPKT; p++) begin
      automatic bit hit = ($urandom_range(4) != 0);
      automatic pkt_t pk = new_pkt(0, hit ? 16'h1001 : 16'h2222);
      automatic int k = 0;
      if (hit) begin exp_q[1][pk[0][29:28]].push_back(pk); n_expected++; end
      @(negedge clk);
      forever begin
        in_valid = 1; in_sop = (k == 0); in_eop = (k == pk.size() - 1); in_data = pk[k];
        if (in_ready) k++;
        if (k == pk.size()) break;
        @(negedge clk);
      end
      @(negedge clk);
      in_valid = 0; in_sop = 0; in_eop = 0;
      repeat ($urandom_range(20)) @(negedge clk);
      local_sent++;
    end
  end

  // remote card 0 on downlink 0
  initial begin
    r_valid = 0; r_data = '0;
    wait (rst_n);
    repeat (20) @(negedge rclk);
    for (int p = 0; p < NPKT; p++) begin
      automatic int kind = $urandom_range(3);
      automatic pkt_t pk = new_pkt(kind == 1, kind == 0 ? 16'h1001 : kind == 1 ? 16'h000B : 16'h1003);
      automatic word_t st = $urandom;
      if (kind <= 1) begin exp_q[0][pk[0][29:28]].push_back(pk); n_expected++; end
      remote_mf(1, st, pk);
      remote_status = st;
      remote_sent++;
    end
  end

  // watch the congestion signals
  always @(negedge clk) if (rst_n) begin
    if (flow_out[1] != 0) seen_flow1 = 1;
    if (flow_out[0] != 0) seen_flow0 = 1;
  end

  // output stalls: held at first, then now and then
  initial begin
    out_ready = 0;
    wait (rst_n);
    wait (local_sent >= 25 && remote_sent >= 25);
    out_ready = 1;
    repeat (6) begin
      repeat ($urandom_range(6000, 2000)) @(negedge clk);
      out_ready = 0;
      repeat ($urandom_range(3000, 1000)) @(negedge clk);
      out_ready = 1;
    end
  end

  // frame_out monitor
  initial begin
    pkt_t got;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (!(ce && fo_valid)) continue;
      if (fo_sop) got.delete();
      got.push_back(fo_data);
      if (fo_eop) begin
        automatic int src = int'(fo_src), c = int'(got[0][29:28]);
        checks++;
        if (exp_q[src][c].size() == 0) fail($sformatf("unexpected packet from %0d class %0d", src, c));
        else if (exp_q[src][c].pop_front() != got) fail($sformatf("packet from %0d class %0d differs", src, c));
        delivered++;
      end
    end
  end

  initial begin
    pat_value = '{16'h1001, 16'h0000, 16'h0000, 16'h0000};
    pat_mask  = '{16'hFFFF, 16'h0000, 16'h0000, 16'h0000};
    pat_en    = 4'b0001;
    cfg_thr   = '{CW'(3), CW'(3), CW'(3), CW'(3)};
    cfg_quantum = '{13'd64, 13'd128, 13'd192, 13'd256};
    wait (local_sent == NPKT && remote_sent == NPKT);
    repeat (60000) @(negedge clk);
    checks++;
    if (delivered != n_expected) fail($sformatf("delivered %0d of %0d", delivered, n_expected));
    checks++;
    if (sm_in != n_expected || sm_out != n_expected) fail("status manager totals");
    checks++;
    if (flow_out[0] != remote_status[7:4]) fail("flow_out[0] does not follow downlink 0 status");
    for (int i = 0; i < N; i++) begin
      checks++;
      if (ff_err[i] != 0 || ff_ovf[i] || qm_drops[i] != 0) fail($sformatf("errors on downlink %0d", i));
    end
    checks++;
    if (sch_sent != n_expected) fail($sformatf("scheduler sent %0d", sch_sent));
    checks++;
    if (!seen_flow1 || !seen_flow0 || sm_xoff == 0 || mx_dual[0] == 0 || sch_skips == 0)
      fail($sformatf("coverage: flow1 %b flow0 %b xoff %0d dual %0d skips %0d", seen_flow1, seen_flow0,
                     sm_xoff, mx_dual[0], sch_skips));
    $display("delivered %0d, filtered %0d/%0d", delivered, ff_filt[0], ff_filt[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
