// tb_gmds_ingress_manager: multiframe composition.
//
// A source sends random packets (contiguous words) while the status word
// changes now and then. A monitor parses the uplink word stream on its own
// and checks every multiframe: SYNC pattern, sender id and has_pkt flag; a
// STATUS word equal to the status input sampled with it; the packet words
// unchanged and in order; the XOR check word; at least one idle slot between
// multiframes. Timing: a multiframe with a packet of n words takes exactly
// n + 3 consecutive link slots. Status-only multiframes must be sent both on
// a status change and on the refresh timer (STATUS_PERIOD = 16 here).
`timescale 1ns/1ps
module tb_gmds_ingress_manager;
  import gmds_pkg::*;
  localparam int PERIOD = 16;

  logic clk = 0, rst_n = 0, ce;
  logic [1:0] phase;
  logic in_valid, in_ready, in_sop, in_eop, tx_valid;
  word_t in_data, status_word, tx_data;
  logic [31:0] mf_count;

  gmds_ingress_manager #(.STATUS_PERIOD(PERIOD)) dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .my_id(8'd5), .in_valid(in_valid), .in_ready(in_ready),
    .in_sop(in_sop), .in_eop(in_eop), .in_data(in_data), .status_word(status_word),
    .tx_valid(tx_valid), .tx_data(tx_data), .mf_count(mf_count)
  );

  always #4 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) phase <= 0; else phase <= (phase == 2) ? 2'd0 : phase + 2'd1;
  assign ce = (phase == 2);

  int checks = 0, failures = 0;
  task automatic fail(string m);
    failures++; if (failures < 20) $display("FAIL %0t: %s", $time, m);
  endtask

  word_t exp_words [$];       // packet words in order
  int    exp_nw [$];          // words per packet
  word_t st_at_ce;            // status value sampled at the coming ce edge
  int n_pkt_mf = 0, n_status_mf = 0, n_change_mf = 0, n_timer_mf = 0;
  bit stat_changed_idle = 0;
  int sent = 0;
  localparam int NPKT = 300;

  initial begin
    #20 rst_n = 1;
    repeat (500000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source
  initial begin
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = '0;
    wait (rst_n);
    for (int p = 0; p < NPKT; p++) begin
      automatic pkt_hdr_t h = '0;
      automatic int nw, k = 0;
      h.len = LEN_W'($urandom_range(256, 1));
      h.cls = 3'($urandom_range(3));
      h.dest = DEST_W'($urandom);
      nw = 1 + (int'(h.len) + 3) / 4;
      repeat ($urandom_range(3) == 0 ? $urandom_range(200, 60) : $urandom_range(5)) @(negedge clk);
      for (int i = 0; i < nw; i++) exp_words.push_back(i == 0 ? word_t'(h) : word_t'($urandom));
      exp_nw.push_back(nw);
      forever begin
        in_valid = 1; in_sop = (k == 0); in_eop = (k == nw - 1);
        in_data = exp_words[exp_words.size() - nw + k];
        if (in_ready) k++;
        if (k == nw) break;
        @(negedge clk);
      end
      @(negedge clk);
      in_valid = 0; in_sop = 0; in_eop = 0;
      sent++;
    end
  end

  // status changes, only while the source is between packets
  initial begin
    status_word = '0;
    wait (rst_n);
    forever begin
      repeat ($urandom_range(400, 100)) @(negedge clk);
      status_word = $urandom;
    end
  end

  // monitor
  initial begin
    typedef enum {M_SYNC, M_STATUS, M_PKT, M_CHECK} mst_t;
    mst_t st = M_SYNC;
    word_t chk = '0, last_status = '0;
    int slots = 0, nw = 0, k = 0, gap = 1, idle_since_mf = 0;
    bit has_pkt = 0, in_mf = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (!ce) continue;           // one look per link slot, before the ce edge
      st_at_ce = status_word;
      @(negedge clk);              // first clock after the ce edge: strobe visible
      if (!tx_valid) begin
        if (in_mf && st != M_PKT) fail("idle slot inside multiframe overhead");
        if (!in_mf) begin gap++; idle_since_mf++; end
        if (in_mf) slots++;
        continue;
      end
      case (st)
        M_SYNC: begin
          automatic mf_sync_t s = mf_sync_t'(tx_data);
          checks++;
          if (s.sync != SYNC_PATTERN || s.src_id != 8'd5) fail($sformatf("bad SYNC %h", tx_data));
          if (gap == 0) fail("no idle slot between multiframes");
          has_pkt = s.has_pkt; chk = tx_data; slots = 1; in_mf = 1; st = M_STATUS;
          if (!has_pkt) begin
            n_status_mf++;
            if (status_word != last_status) n_change_mf++;
            else if (idle_since_mf >= PERIOD) n_timer_mf++;
          end else n_pkt_mf++;
        end
        M_STATUS: begin
          checks++;
          if (tx_data != st_at_ce) fail($sformatf("STATUS %h expected %h", tx_data, st_at_ce));
          last_status = tx_data;
          chk ^= tx_data; slots++;
          if (has_pkt) begin
            st = M_PKT; k = 0;
            if (exp_nw.size() == 0) fail("packet multiframe without a packet");
            else nw = exp_nw.pop_front();
          end else st = M_CHECK;
        end
        M_PKT: begin
          checks++;
          if (exp_words.size() == 0 || tx_data != exp_words.pop_front()) fail("packet word differs");
          chk ^= tx_data; slots++; k++;
          if (k == nw) st = M_CHECK;
        end
        M_CHECK: begin
          checks++;
          if (tx_data != chk) fail("check word differs");
          slots++;
          checks++;
          if (has_pkt && slots != nw + 3) fail($sformatf("multiframe took %0d slots, expected %0d", slots, nw + 3));
          st = M_SYNC; in_mf = 0; gap = 0; idle_since_mf = 0;
        end
      endcase
    end
  end

  initial begin
    wait (sent == NPKT);
    repeat (300) @(negedge clk);
    checks++;
    if (exp_words.size() != 0) fail($sformatf("%0d words never sent", exp_words.size()));
    checks++;
    if (n_change_mf == 0 || n_timer_mf == 0)
      fail($sformatf("status-only multiframes: change %0d timer %0d", n_change_mf, n_timer_mf));
    checks++;
    if (mf_count != n_pkt_mf + n_status_mf) fail("multiframe counter");
    $display("multiframes: packet %0d status-only %0d (change %0d timer %0d)", n_pkt_mf, n_status_mf,
             n_change_mf, n_timer_mf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
