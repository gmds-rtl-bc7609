// tb_gmds_line_card_8x1: the line card for eight downlinks (two chained
// Queue Engines) as card 5 of an 8x8 switch.
//
// The other seven cards are stood in for by seven Ingress Manager instances,
// each on its own clock (7.97..8.03 ns), feeding downlinks 0..4 and 6..7.
// The card's own uplink is looped back on downlink 5, as on the backplane.
// Each source sends NPKT random packets (1..256 bytes, random class). They
// are addressed to card 5 by pattern, to a multicast bitmap that may or may
// not include card 5, or elsewhere. The remote status words are random and
// change with every packet.
//
// The output is held at the start and stalled now and then, so queues in
// both engines pass their threshold.
//
// Checks:
//   * every packet for card 5 leaves frame_out once, unchanged, with the
//     right card-wide source number (0..7) and in order within its
//     (source, class) queue; nothing else leaves;
//   * no check error, FIFO overflow or drop;
//   * flow_out[i] ends equal to bits 5*4 +: 4 of source i's last status
//     word, for all eight downlinks;
//   * the card's own multiframes carry congestion bits of both engines:
//     sources 0..3 (bits 15:0) and 4..7 (bits 31:16). This shows that the
//     second engine's status reaches the uplink through the daisy chain;
//   * the Scheduler sent every packet and skipped a queue for lack of
//     deficit at least once.
`timescale 1ps/1ps
module tb_gmds_line_card_8x1;
  import gmds_pkg::*;
  localparam int N = 8, NC = 4, NPAT = 4, SLOTS = 64, MAXB = 256, ME = 5;
  localparam int NPKT = 40;
  localparam int CW = $clog2(SLOTS + 1);

  logic clk = 0, rst_n = 0, ce;
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
  logic [2:0] fo_src;
  word_t fo_data;
  logic [31:0] ff_acc [N], ff_filt [N], ff_err [N], qm_drops [N], mx_dual [4];
  logic ff_ovf [N];
  logic [31:0] sm_in, sm_out, sm_xoff, im_mf, sch_sent, sch_skips;

  gmds_line_card #(.N_PORTS(N)) dut (
    .clk(clk), .rst_n(rst_n), .my_id(8'(ME)), .ce(ce),
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

  int checks = 0, failures = 0;
  task automatic fail(string m);
    failures++; if (failures < 20) $display("FAIL %0t: %s", $time, m);
  endtask

  typedef word_t pkt_t [$];
  pkt_t exp_q [N][NC][$];
  int n_expected = 0, delivered = 0;
  int sent [N];
  word_t last_status [N];

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

  // a random packet from source s; queued as expected when card ME takes it
  function automatic pkt_t pick_pkt(int s);
    automatic int kind = $urandom_range(3);
    automatic pkt_t pk;
    if (kind == 0)      pk = new_pkt(1'b0, 16'h1000 + 16'(ME));
    else if (kind == 1) pk = new_pkt(1'b1, 16'($urandom_range(255, 1)));
    else if (kind == 2) pk = new_pkt(1'b0, 16'h1000 + 16'($urandom_range(N - 1)));
    else                pk = new_pkt(1'b0, 16'h3000);
    if ((pk[0][31] && pk[0][ME]) || (!pk[0][31] && pk[0][15:0] == 16'h1000 + 16'(ME))) begin
      exp_q[s][pk[0][29:28]].push_back(pk);
      n_expected++;
    end
    return pk;
  endfunction

  // ---------------- the seven other cards ----------------
  for (genvar s = 0; s < N; s++) begin : g_remote
    if (s == ME) begin : g_self
      assign rx_clk[s]   = clk;
      assign rx_rst_n[s] = rst_n;
      assign rx_valid[s] = tx_valid;
      assign rx_data[s]  = tx_data;
    end else begin : g_other
      logic rclk = 0;
      logic [1:0] ph;
      logic r_ce, r_in_valid, r_in_ready, r_in_sop, r_in_eop;
      word_t r_in_data, r_status;
      logic [31:0] r_mf;
      always #(3985 + 5 * s) rclk = ~rclk;
      always_ff @(posedge rclk or negedge rst_n)
        if (!rst_n) ph <= '0; else ph <= (ph == 2'd2) ? 2'd0 : ph + 2'd1;
      assign r_ce = (ph == 2'd2);
      gmds_ingress_manager u_card (
        .clk(rclk), .rst_n(rst_n), .ce(r_ce), .my_id(8'(s)),
        .in_valid(r_in_valid), .in_ready(r_in_ready), .in_sop(r_in_sop), .in_eop(r_in_eop),
        .in_data(r_in_data), .status_word(r_status), .tx_valid(rx_valid[s]), .tx_data(rx_data[s]),
        .mf_count(r_mf)
      );
      assign rx_clk[s]   = rclk;
      assign rx_rst_n[s] = rst_n;

      initial begin
        r_in_valid = 0; r_in_sop = 0; r_in_eop = 0; r_in_data = '0; r_status = '0;
        last_status[s] = '0;
        sent[s] = 0;
        wait (rst_n);
        repeat (30) @(negedge rclk);
        for (int p = 0; p < NPKT; p++) begin
          automatic pkt_t pk = pick_pkt(s);
          automatic int k = 0;
          r_status = $urandom;
          last_status[s] = r_status;
          forever begin
            r_in_valid = 1; r_in_sop = (k == 0); r_in_eop = (k == pk.size() - 1); r_in_data = pk[k];
            if (r_in_ready) k++;
            if (k == pk.size()) break;
            @(negedge rclk);
          end
          @(negedge rclk);
          r_in_valid = 0; r_in_sop = 0; r_in_eop = 0;
          repeat ($urandom_range(30)) @(negedge rclk);
          sent[s]++;
        end
      end
    end
  end

  // ---------------- this card's own ingress ----------------
  initial begin
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = '0;
    sent[ME] = 0;
    wait (rst_n);
    repeat (30) @(negedge clk);
    for (int p = 0; p < NPKT; p++) begin
      automatic pkt_t pk = pick_pkt(ME);
      automatic int k = 0;
      forever begin
        in_valid = 1; in_sop = (k == 0); in_eop = (k == pk.size() - 1); in_data = pk[k];
        if (in_ready) k++;
        if (k == pk.size()) break;
        @(negedge clk);
      end
      @(negedge clk);
      in_valid = 0; in_sop = 0; in_eop = 0;
      repeat ($urandom_range(30)) @(negedge clk);
      sent[ME]++;
    end
  end

  function automatic bit all_sent(int n);
    for (int s = 0; s < N; s++) if (sent[s] < n) return 0;
    return 1;
  endfunction

  // ---------------- output stalls ----------------
  initial begin
    out_ready = 0;
    wait (rst_n);
    while (!all_sent(NPKT / 3)) @(negedge clk);
    out_ready = 1;
    repeat (5) begin
      repeat ($urandom_range(6000, 2000)) @(negedge clk);
      out_ready = 0;
      repeat ($urandom_range(3000, 1000)) @(negedge clk);
      out_ready = 1;
    end
  end

  // ---------------- the card's uplink: congestion bits it sends ----------------
  // Decodes the multiframes word by word: SYNC, STATUS, then header and
  // payload when SYNC says a packet follows, then CHECK.
  word_t status_seen = '0;
  initial begin
    automatic int st = 0, left = 0;
    automatic bit hp = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (tx_valid) begin
        case (st)
          0: begin
            checks++;
            if (tx_data[31:16] != SYNC_PATTERN || tx_data[15:8] != 8'(ME)) fail("uplink lost alignment");
            hp = tx_data[0];
            st = 1;
          end
          1: begin status_seen |= tx_data; st = hp ? 2 : 4; end
          2: begin left = (int'(tx_data[27:16]) + 3) / 4; st = 3; end
          3: begin left--; if (left == 0) st = 4; end
          default: st = 0;   // CHECK
        endcase
      end
    end
  end

  // ---------------- frame_out ----------------
  bit [N-1:0] src_seen = '0;
  initial begin
    pkt_t got;
    int src;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (!(ce && fo_valid)) continue;
      if (fo_sop) begin got.delete(); src = int'(fo_src); end
      got.push_back(fo_data);
      if (fo_eop) begin
        automatic int c = int'(got[0][29:28]);
        checks++;
        if (exp_q[src][c].size() == 0) fail($sformatf("unexpected packet from %0d class %0d", src, c));
        else if (exp_q[src][c].pop_front() != got) fail($sformatf("packet from %0d class %0d differs", src, c));
        src_seen[src] = 1'b1;
        delivered++;
      end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (3_000_000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- main ----------------
  initial begin
    pat_value = '{16'h1000 + 16'(ME), 16'h0000, 16'h0000, 16'h0000};
    pat_mask  = '{16'hFFFF, 16'h0000, 16'h0000, 16'h0000};
    pat_en    = 4'b0001;
    cfg_thr   = '{CW'(3), CW'(3), CW'(3), CW'(3)};
    cfg_quantum = '{13'd64, 13'd128, 13'd192, 13'd256};
    #9000 rst_n = 1;
    while (!all_sent(NPKT)) @(negedge clk);
    repeat (80000) @(negedge clk);

    checks++;
    if (delivered != n_expected) fail($sformatf("delivered %0d of %0d", delivered, n_expected));
    checks++;
    if (sm_in != n_expected || sm_out != n_expected)
      fail("status manager totals");
    checks++;
    if (sch_sent != n_expected) fail($sformatf("scheduler sent %0d", sch_sent));
    for (int s = 0; s < N; s++) begin
      checks++;
      if (ff_err[s] != 0 || ff_ovf[s] || qm_drops[s] != 0) fail($sformatf("errors on downlink %0d", s));
      if (s != ME) begin
        checks++;
        if (flow_out[s] != last_status[s][ME*NC +: NC])
          fail($sformatf("flow_out[%0d] = %b, status says %b", s, flow_out[s], last_status[s][ME*NC +: NC]));
      end
    end
    checks++;
    if (src_seen != '1) fail($sformatf("sources seen on frame_out: %b", src_seen));
    checks++;
    if (status_seen[15:0] == '0 || status_seen[31:16] == '0)
      fail($sformatf("uplink congestion bits seen: %h (both engines expected)", status_seen));
    checks++;
    if (sm_xoff == 0 || sch_skips == 0)
      fail($sformatf("coverage: xoff %0d skips %0d", sm_xoff, sch_skips));
    $display("delivered %0d, uplink status bits seen %h, dual writes %0d %0d %0d %0d",
             delivered, status_seen, mx_dual[0], mx_dual[1], mx_dual[2], mx_dual[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
