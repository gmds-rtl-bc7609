// tb_gmds_switch_8x8: end-to-end test of an 8x8 GMDS, the size of the
// reference demonstrator. Every line card is then built from two chained
// Queue Engines (four downlinks each) sharing one Scheduler.
//
// Same traffic and checks as the 4x4 end-to-end test: eight cards on eight
// slightly different clocks; random packets (1..256 bytes, random class) to
// exact-pattern, masked-pattern, unmatched or multicast (8-bit port bitmap)
// destinations; sources obey flow control; outputs stall now and then. Every
// delivered packet is compared word by word, in order per (source, class),
// and nothing may be lost, dropped or damaged. Each mechanism (exact,
// masked, multicast, filtering, congestion, flow control holding a source,
// output stall, DRR deficit skip, dual writes in a Multiplexer) must occur.
`timescale 1ps/1ps
module tb_gmds_switch_8x8;
  import gmds_pkg::*;

  localparam int N = 8, NC = 4, NPAT = 4, SLOTS = 64;
  localparam int NPKT = 200;          // packets per source
  localparam int CW = $clog2(SLOTS + 1);

  logic              clk [N];
  logic              rst_n;
  logic              ce [N];
  logic              in_valid [N], in_ready [N], in_sop [N], in_eop [N];
  word_t             in_data [N];
  logic [NC-1:0]     flow_out [N][N];
  logic [DEST_W-1:0] pat_value [N][NPAT], pat_mask [N][NPAT];
  logic [NPAT-1:0]   pat_en [N];
  logic [CW-1:0]     cfg_thr [N][NC];
  logic [LEN_W:0]    cfg_quantum [N][NC];
  logic              out_ready [N];
  logic              fo_valid [N], fo_sop [N], fo_eop [N];
  logic [2:0]        fo_src [N];
  word_t             fo_data [N];
  logic [31:0]       ff_accepted [N][N], ff_filtered [N][N], ff_errors [N][N], qm_drops [N][N];
  logic              ff_overflow [N][N];
  logic [31:0]       mx_dual_writes [N][4];
  logic [31:0]       sm_in [N], sm_out [N], sm_xoff_events [N], im_multiframes [N];
  logic [31:0]       sch_sent [N], sch_deficit_skips [N];

  gmds_switch #(.N_PORTS(N)) dut (
    .clk(clk), .rst_n(rst_n), .ce(ce),
    .in_valid(in_valid), .in_ready(in_ready), .in_sop(in_sop), .in_eop(in_eop), .in_data(in_data),
    .flow_out(flow_out), .pat_value(pat_value), .pat_mask(pat_mask), .pat_en(pat_en),
    .cfg_thr(cfg_thr), .cfg_quantum(cfg_quantum),
    .out_ready(out_ready), .frame_out_valid(fo_valid), .frame_out_sop(fo_sop),
    .frame_out_eop(fo_eop), .frame_out_src(fo_src), .frame_out_data(fo_data),
    .ff_accepted(ff_accepted), .ff_filtered(ff_filtered), .ff_errors(ff_errors),
    .ff_overflow(ff_overflow), .qm_drops(qm_drops), .mx_dual_writes(mx_dual_writes),
    .sm_in(sm_in), .sm_out(sm_out), .sm_xoff_events(sm_xoff_events),
    .im_multiframes(im_multiframes), .sch_sent(sch_sent), .sch_deficit_skips(sch_deficit_skips)
  );

  // ---------------- clocks ----------------
  localparam int HALF [N] = '{4000, 4005, 3995, 4002, 3998, 4003, 4001, 3997};
  for (genvar i = 0; i < N; i++) begin : g_clk
    initial begin
      clk[i] = 1'b0;
      #(HALF[i] / 3);
      forever #(HALF[i]) clk[i] = ~clk[i];
    end
  end

  int checks = 0, failures = 0;
  task automatic fail(string msg);
    failures++;
    $display("FAIL %0t: %s", $time, msg);
  endtask

  // ---------------- expected packets ----------------
  typedef struct { word_t hdr; int unsigned seed; } exp_t;
  exp_t exp_q [N][N][NC][$];     // [dst][src][cls]

  function automatic word_t payload(int unsigned seed, int k);
    return word_t'(seed * 32'h9E37_79B1 + k * 32'h0101_0101);
  endfunction

  // destinations of a header, worked out from the address plan below
  function automatic logic [N-1:0] dests_of(pkt_hdr_t h);
    logic [N-1:0] d = '0;
    if (h.direct) d = h.dest[N-1:0];
    else for (int j = 0; j < N; j++)
      if (h.dest == DEST_W'(16'h1000 + j) || h.dest[15:4] == 12'h200 + 12'(j)) d[j] = 1'b1;
    return d;
  endfunction

  // mechanism counters
  int n_exact = 0, n_masked = 0, n_mcast = 0, n_nomatch = 0, n_blocked = 0, n_stall = 0;
  int n_delivered [N];
  int done_src = 0;

  // ---------------- sources ----------------
  for (genvar i = 0; i < N; i++) begin : g_src
    initial begin
      in_valid[i] = 0; in_sop[i] = 0; in_eop[i] = 0; in_data[i] = '0;
      wait (rst_n);
      repeat (20) @(negedge clk[i]);
      for (int p = 0; p < NPKT; p++) begin
        pkt_hdr_t h;
        int unsigned seed, r, nw;
        logic [N-1:0] d;
        h = '0;
        h.cls = 3'($urandom_range(NC - 1));
        h.len = LEN_W'($urandom_range(256, 1));
        r = $urandom_range(99);
        if (r < 35)      begin h.dest = DEST_W'(16'h1000 + $urandom_range(N - 1)); n_exact++; end
        else if (r < 70) begin h.dest = {4'h2, 8'($urandom_range(N - 1)), 4'($urandom)}; n_masked++; end
        else if (r < 85) begin h.direct = 1'b1; h.dest = DEST_W'($urandom_range(255, 1)); n_mcast++; end
        else             begin h.dest = {4'h3, 12'($urandom)}; n_nomatch++; end
        d = dests_of(h);
        // obey flow control from every destination of the packet
        begin
          automatic bit blocked_once = 0;
          forever begin
            automatic bit blk = 0;
            @(negedge clk[i]);
            for (int j = 0; j < N; j++) if (d[j] && flow_out[i][j][h.cls[1:0]]) blk = 1;
            if (!blk) break;
            if (!blocked_once) n_blocked++;
            blocked_once = 1;
          end
        end
        seed = $urandom;
        for (int j = 0; j < N; j++) if (d[j]) exp_q[j][i][h.cls[1:0]].push_back('{word_t'(h), seed});
        nw = 1 + (int'(h.len) + 3) / 4;
        begin
          automatic int k = 0;
          // we are at a negedge: present word k, advance when accepted
          forever begin
            in_valid[i] = 1;
            in_sop[i]   = (k == 0);
            in_eop[i]   = (k == nw - 1);
            in_data[i]  = (k == 0) ? word_t'(h) : payload(seed, k);
            if (in_ready[i]) k++;
            if (k == nw) break;
            @(negedge clk[i]);
          end
        end
        @(negedge clk[i]);
        in_valid[i] = 0; in_sop[i] = 0; in_eop[i] = 0;
        repeat ($urandom_range(6)) @(negedge clk[i]);
      end
      done_src++;
    end
  end

  // ---------------- output stalls ----------------
  bit stop_stalls = 0;
  for (genvar j = 0; j < N; j++) begin : g_stall
    initial begin
      out_ready[j] = 1;
      wait (rst_n);
      while (!stop_stalls) begin
        repeat ($urandom_range(3000, 500)) @(negedge clk[j]);
        if (!stop_stalls && $urandom_range(1) == 1) begin
          out_ready[j] = 0;
          n_stall++;
          repeat ($urandom_range(2500, 800)) @(negedge clk[j]);
          out_ready[j] = 1;
        end
      end
    end
  end

  // ---------------- sinks ----------------
  for (genvar j = 0; j < N; j++) begin : g_sink
    initial begin
      word_t words [$];
      int src;
      n_delivered[j] = 0;
      wait (rst_n);
      forever begin
        @(negedge clk[j]);
        if (ce[j] && fo_valid[j]) begin
          if (fo_sop[j]) begin
            words.delete();
            src = int'(fo_src[j]);
          end
          words.push_back(fo_data[j]);
          if (fo_eop[j]) begin
            automatic pkt_hdr_t h = pkt_hdr_t'(words[0]);
            automatic int c = int'(h.cls[1:0]);
            checks++;
            if (exp_q[j][src][c].size() == 0) begin
              fail($sformatf("card %0d: unexpected packet from %0d class %0d", j, src, c));
            end else begin
              automatic exp_t e = exp_q[j][src][c].pop_front();
              automatic bit ok = (words[0] == e.hdr) && (words.size() == 1 + (int'(h.len) + 3) / 4);
              for (int k = 1; k < words.size() && ok; k++) if (words[k] != payload(e.seed, k)) ok = 0;
              if (!ok) fail($sformatf("card %0d: packet from %0d class %0d differs (hdr %h exp %h, %0d words)",
                                      j, src, c, words[0], e.hdr, words.size()));
              n_delivered[j]++;
            end
          end
        end
      end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (3_000_000) @(posedge clk[0]);
    fail("watchdog expired");
    for (int j = 0; j < N; j++)
      $display("card %0d: mf=%0d acc=%0d %0d %0d %0d filt=%0d err=%0d in=%0d out=%0d sent=%0d del=%0d", j, im_multiframes[j],
               ff_accepted[j][0], ff_accepted[j][1], ff_accepted[j][2], ff_accepted[j][3], ff_filtered[j][0],
               ff_errors[j][0], sm_in[j], sm_out[j], sch_sent[j], n_delivered[j]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- main ----------------
  initial begin
    for (int i = 0; i < N; i++) begin
      for (int p = 0; p < NPAT; p++) begin pat_value[i][p] = '0; pat_mask[i][p] = '0; end
      pat_value[i][0] = DEST_W'(16'h1000 + i); pat_mask[i][0] = 16'hFFFF;
      pat_value[i][1] = DEST_W'(16'h2000 + 16'(i << 4)); pat_mask[i][1] = 16'hFFF0;
      pat_en[i] = 4'b0011;
      for (int c = 0; c < NC; c++) begin
        cfg_thr[i][c]     = CW'(6);
        cfg_quantum[i][c] = 13'(64 * (c + 1));
      end
    end
    rst_n = 0;
    #100_000 rst_n = 1;
    wait (done_src == N);
    stop_stalls = 1;
    for (int j = 0; j < N; j++) out_ready[j] = 1;
    // drain
    repeat (40000) @(posedge clk[0]);

    begin
      automatic int left = 0, filt = 0, xoff = 0, skips = 0, dual = 0, acc = 0, sumdel = 0;
      for (int j = 0; j < N; j++) begin
        for (int i = 0; i < N; i++) for (int c = 0; c < NC; c++) left += exp_q[j][i][c].size();
        for (int i = 0; i < N; i++) begin
          filt += ff_filtered[j][i];
          acc  += ff_accepted[j][i];
          checks++;
          if (ff_errors[j][i] != 0) fail($sformatf("card %0d link %0d: %0d check errors", j, i, ff_errors[j][i]));
          checks++;
          if (ff_overflow[j][i]) fail($sformatf("card %0d link %0d: rate adaptation FIFO overflow", j, i));
          checks++;
          if (qm_drops[j][i] != 0) fail($sformatf("card %0d QM %0d dropped %0d packets", j, i, qm_drops[j][i]));
        end
        xoff  += sm_xoff_events[j];
        skips += sch_deficit_skips[j];
        for (int m = 0; m < 4; m++) dual += mx_dual_writes[j][m];
        sumdel += n_delivered[j];
        checks++;
        if (sm_in[j] != sm_out[j] || sch_sent[j] != sm_out[j] || sm_out[j] != n_delivered[j])
          fail($sformatf("card %0d: in %0d out %0d sent %0d delivered %0d", j, sm_in[j], sm_out[j],
                         sch_sent[j], n_delivered[j]));
      end
      checks++;
      if (left != 0) fail($sformatf("%0d expected packets never delivered", left));
      checks++;
      if (acc != sumdel) fail($sformatf("accepted %0d but delivered %0d", acc, sumdel));
      $display("mechanisms: exact=%0d masked=%0d multicast=%0d nomatch=%0d filtered=%0d xoff_events=%0d",
               n_exact, n_masked, n_mcast, n_nomatch, filt, xoff);
      $display("            src_blocked=%0d out_stalls=%0d drr_skips=%0d dual_writes=%0d delivered=%0d",
               n_blocked, n_stall, skips, dual, sumdel);
      checks++; if (n_exact == 0)   fail("no exact-pattern packet");
      checks++; if (n_masked == 0)  fail("no masked-pattern packet");
      checks++; if (n_mcast == 0)   fail("no multicast packet");
      checks++; if (filt == 0)      fail("no packet filtered");
      checks++; if (xoff == 0)      fail("no congestion threshold crossed");
      checks++; if (n_blocked == 0) fail("flow control never held a source");
      checks++; if (n_stall == 0)   fail("no output stall");
      checks++; if (skips == 0)     fail("no DRR deficit skip");
      checks++; if (dual == 0)      fail("multiplexer never wrote for both sources in one period");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
