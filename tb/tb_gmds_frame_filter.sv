// tb_gmds_frame_filter: multiframe decoding and packet selection.
//
// The testbench encodes multiframes itself, in a remote clock (7.9 ns, one
// word every third cycle, idle slots between multiframes) while the filter
// runs on an 8 ns clock with a one-in-three clock enable, so every word
// crosses the rate-adaptation FIFO. The filter is card 2 on downlink 1, with
// pattern 0 = 0x1234 exact, pattern 1 = 0x5600/0xFF00, pattern 2 disabled.
// The stream mixes: exact and masked hits, misses, a hit on the disabled
// pattern, direct packets with and without bit 2, zero and oversize lengths,
// corrupted check words, a wrong sender id and garbage between multiframes,
// and status-only multiframes. The output must be exactly the selected
// packets, in order, with err set on the eop of corrupted ones; flow_xoff
// must follow status bits [11:8] of good multiframes only; the counters
// must match.
`timescale 1ps/1ps
module tb_gmds_frame_filter;
  import gmds_pkg::*;
  localparam int NPAT = 4;

  logic rx_clk = 0, clk = 0, rst_n = 0, ce, rx_valid;
  logic [1:0] phase, rphase;
  word_t rx_data;
  logic [DEST_W-1:0] pat_value [NPAT], pat_mask [NPAT];
  logic [NPAT-1:0] pat_en;
  logic out_valid, out_sop, out_eop, out_err, fifo_overflow;
  word_t out_data;
  logic [3:0] flow_xoff;
  logic [31:0] cnt_acc, cnt_filt, cnt_err;

  gmds_frame_filter #(.N_PORTS(4), .N_CLASS(4), .NPAT(NPAT), .MAX_PKT_BYTES(256)) dut (
    .rx_clk(rx_clk), .rx_rst_n(rst_n), .rx_valid(rx_valid), .rx_data(rx_data),
    .clk(clk), .rst_n(rst_n), .ce(ce), .my_id(8'd2), .link_id(8'd1),
    .pat_value(pat_value), .pat_mask(pat_mask), .pat_en(pat_en),
    .out_valid(out_valid), .out_sop(out_sop), .out_eop(out_eop), .out_err(out_err), .out_data(out_data),
    .flow_xoff(flow_xoff), .cnt_accepted(cnt_acc), .cnt_filtered(cnt_filt), .cnt_errors(cnt_err),
    .fifo_overflow(fifo_overflow)
  );

  always #4000 clk = ~clk;
  always #3950 rx_clk = ~rx_clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) phase <= 0; else phase <= (phase == 2) ? 2'd0 : phase + 2'd1;
  assign ce = (phase == 2);
  always_ff @(posedge rx_clk or negedge rst_n)
    if (!rst_n) rphase <= 0; else rphase <= (rphase == 2) ? 2'd0 : rphase + 2'd1;

  int checks = 0, failures = 0;
  task automatic fail(string m);
    failures++; if (failures < 20) $display("FAIL %0t: %s", $time, m);
  endtask

  typedef struct { word_t w; bit sop, eop, err; } ow_t;
  ow_t exp_out [$];
  int exp_acc = 0, exp_filt = 0, exp_err = 0, n_xoff_checks = 0;
  logic [3:0] exp_xoff = '0;
  int kinds [12];

  // send one word on the remote link: a single rx_clk strobe every 3 cycles
  task automatic link_word(word_t w, bit valid = 1);
    do @(negedge rx_clk); while (rphase != 2);
    rx_valid = valid; rx_data = w;
    @(negedge rx_clk);
    rx_valid = 0;
  endtask

  task automatic send_mf(bit has_pkt, word_t status, word_t pkt [$], bit corrupt, logic [7:0] id = 8'd1);
    mf_sync_t s = '0;
    word_t chk;
    s.sync = SYNC_PATTERN; s.src_id = id; s.has_pkt = has_pkt;
    link_word(word_t'(s)); chk = word_t'(s);
    link_word(status); chk ^= status;
    if (has_pkt) foreach (pkt[i]) begin link_word(pkt[i]); chk ^= pkt[i]; end
    link_word(corrupt ? ~chk : chk);
    repeat ($urandom_range(4, 1)) link_word('0, 0);
  endtask

  initial begin
    #5000 rst_n = 1;
    repeat (3_000_000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus
  initial begin
    rx_valid = 0; rx_data = '0;
    pat_value = '{16'h1234, 16'h5600, 16'h7777, 16'h0000};
    pat_mask  = '{16'hFFFF, 16'hFF00, 16'hFFFF, 16'h0000};
    pat_en    = 4'b0011;
    wait (rst_n);
    repeat (10) @(negedge rx_clk);
    for (int p = 0; p < 600; p++) begin
      automatic pkt_hdr_t h = '0;
      automatic word_t pkt [$];
      automatic int kind = $urandom_range(11);
      automatic bit take, corrupt, bad_id;
      automatic word_t status = $urandom;
      h.cls = 3'($urandom_range(3));
      h.len = LEN_W'($urandom_range(256, 1));
      case (kind)
        0, 1: h.dest = 16'h1234;                                     // exact hit
        2, 3: h.dest = {8'h56, 8'($urandom)};                        // masked hit
        4:    h.dest = 16'h1235;                                     // miss
        5:    h.dest = 16'h7777;                                     // disabled pattern
        6:    begin h.direct = 1; h.dest = 16'($urandom) | 16'h0004; end   // direct, ours
        7:    begin h.direct = 1; h.dest = 16'($urandom) & ~16'h0004; end  // direct, not ours
        8:    begin h.dest = 16'h1234; h.len = (p % 2) ? 12'd0 : 12'd300; end // bad length
        default: h.dest = 16'h1234;
      endcase
      kinds[kind]++;
      take    = (kind <= 3) || kind == 6 || kind >= 9;
      corrupt = (kind == 9);
      bad_id  = (kind == 10);
      pkt.push_back(word_t'(h));
      for (int i = 0; i < (int'(h.len) + 3) / 4; i++) pkt.push_back($urandom);
      if (bad_id) begin
        // a multiframe from the wrong sender is never aligned to
        send_mf(1, status, pkt, 0, 8'd3);
        continue;
      end
      if (kind == 11) begin
        // garbage before the multiframe, then a status-only multiframe
        link_word(32'hDEAD_BEEF);
        link_word(32'h0000_C35A);
        send_mf(0, status, pkt, 0);
        exp_xoff = status[11:8];
        continue;
      end
      if (take) begin
        foreach (pkt[i]) exp_out.push_back('{pkt[i], i == 0, i == pkt.size() - 1, corrupt && i == pkt.size() - 1});
        if (!corrupt) exp_acc++;
      end else exp_filt++;
      if (corrupt) exp_err++; else exp_xoff = status[11:8];
      send_mf(1, status, pkt, corrupt);
    end
    repeat (200) @(negedge clk);
    checks++;
    if (exp_out.size() != 0) fail($sformatf("%0d expected words not delivered", exp_out.size()));
    checks++;
    if (cnt_acc != exp_acc || cnt_filt != exp_filt || cnt_err != exp_err)
      fail($sformatf("counters acc %0d/%0d filt %0d/%0d err %0d/%0d", cnt_acc, exp_acc, cnt_filt, exp_filt,
                     cnt_err, exp_err));
    checks++;
    if (flow_xoff != exp_xoff) fail("final flow_xoff");
    checks++;
    if (fifo_overflow) fail("rate adaptation FIFO overflowed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor, one look per ce period
  always @(negedge clk) if (rst_n && ce && out_valid) begin
    checks++;
    if (exp_out.size() == 0) fail("unexpected output word");
    else begin
      automatic ow_t e = exp_out.pop_front();
      if (out_data != e.w || out_sop != e.sop || out_eop != e.eop || out_err != e.err)
        fail($sformatf("out %h s%b e%b err%b, expected %h s%b e%b err%b", out_data, out_sop, out_eop, out_err,
                       e.w, e.sop, e.eop, e.err));
    end
  end
endmodule
