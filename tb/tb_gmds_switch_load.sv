// tb_gmds_switch_load: delay under heavy uniform load, 4x4 GMDS at its
// default parameters.
//
// Traffic model: every card has a Bernoulli packet source. In each card
// clock-enable slot a new packet arrives with probability q. Its length is
// uniform over 1..256 bytes, its class uniform over the four classes, and its
// destination uniform over all four cards (unicast, exact address pattern).
// Arrivals wait in an unbounded generator queue and are then fed to the card
// back to back.
//
// Rates: the card's word slot runs at one third of the 8 ns memory clock,
// i.e. 32 bit x 41.7 MHz = 1.33 Gbit/s. A 1 Gbit/s line therefore carries
// 0.75 words per slot:
//   * load L means q = L * 0.75 / 33.5 (mean packet = 33.5 words with header);
//   * every output is limited to 1 Gbit/s by a token bucket on out_ready
//     (three tokens per slot, four per word sent).
//
// Loads of 90, 95, 98 and 99 % run one after another. Each runs for
// GEN_SLOTS slots and then drains completely.
//
// Per load the test reports the mean queuing delay, counted from the arrival
// of a packet to the first word of it leaving its output. It is given in ns
// and in packet times (the time a mean packet takes on a 1 Gbit/s line).
//
// Checks:
//   * every packet arrives once, unchanged and in order within its
//     (source, class) queue, with no loss, drop or check error;
//   * the mean delay does not fall as the load rises;
//   * per-class thresholds (flow control) keep the 64-slot Queue Managers
//     from overflowing even at 99 % load. How often a source was held back is
//     counted, and must happen at least once at the highest load.
`timescale 1ps/1ps
module tb_gmds_switch_load;
  import gmds_pkg::*;

  localparam int N = 4, NC = 4, NPAT = 4, SLOTS = 64;
  localparam int NLOAD = 4;
  localparam int LOADS_PCT [NLOAD] = '{90, 95, 98, 99};
  localparam int GEN_SLOTS = 60000;              // arrival slots per load
  localparam real MEAN_WORDS = 33.5;             // 1 + mean of ceil(len/4), len 1..256
  localparam real PKT_TIME_NS = MEAN_WORDS * 32.0; // 32 bit at 1 Gbit/s = 32 ns per word
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
  logic [1:0]        fo_src [N];
  word_t             fo_data [N];
  logic [31:0]       ff_accepted [N][N], ff_filtered [N][N], ff_errors [N][N], qm_drops [N][N];
  logic              ff_overflow [N][N];
  logic [31:0]       mx_dual_writes [N][2];
  logic [31:0]       sm_in [N], sm_out [N], sm_xoff_events [N], im_multiframes [N];
  logic [31:0]       sch_sent [N], sch_deficit_skips [N];

  gmds_switch dut (
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

  // ---------------- clocks: 8 ns memory clocks, slightly apart ----------------
  localparam int HALF [N] = '{4000, 4001, 3999, 4002};
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

  typedef struct { word_t hdr; int unsigned seed; time t_arr; } pkt_t;
  pkt_t gen_q [N][$];            // arrived, not yet fed to the card
  pkt_t exp_q [N][N][NC][$];     // [dst][src][cls], fed to the card, not yet out

  function automatic word_t payload(int unsigned seed, int k);
    return word_t'(seed * 32'h7F4A_7C15 + k * 32'h0001_0003);
  endfunction

  int   cur_load = 0;
  bit   generating = 0;
  int   n_outstanding = 0;           // arrived but not yet delivered
  real  sum_delay_ns [NLOAD];
  int   n_pkts [NLOAD];
  int   n_blocked [NLOAD];
  int   max_backlog [NLOAD];

  // ---------------- Bernoulli arrivals ----------------
  for (genvar i = 0; i < N; i++) begin : g_gen
    initial begin
      wait (rst_n);
      forever begin
        @(negedge clk[i]);
        if (ce[i] && generating) begin
          automatic real q = real'(LOADS_PCT[cur_load]) / 100.0 * 0.75 / MEAN_WORDS;
          if (real'($urandom) < q * 4294967296.0) begin
            automatic pkt_hdr_t h = '0;
            h.cls  = 3'($urandom_range(NC - 1));
            h.len  = LEN_W'($urandom_range(256, 1));
            h.dest = DEST_W'(16'h1000 + $urandom_range(N - 1));
            gen_q[i].push_back('{word_t'(h), $urandom, $time});
            n_outstanding++;
            if (gen_q[i].size() > max_backlog[cur_load]) max_backlog[cur_load] = gen_q[i].size();
          end
        end
      end
    end
  end

  // ---------------- feeding the cards ----------------
  for (genvar i = 0; i < N; i++) begin : g_src
    initial begin
      in_valid[i] = 0; in_sop[i] = 0; in_eop[i] = 0; in_data[i] = '0;
      wait (rst_n);
      forever begin
        pkt_t p;
        pkt_hdr_t h;
        int d, nw;
        @(negedge clk[i]);
        if (gen_q[i].size() == 0) continue;
        p = gen_q[i][0];
        h = pkt_hdr_t'(p.hdr);
        d = int'(h.dest[1:0]);
        if (flow_out[i][d][h.cls[1:0]]) begin
          n_blocked[cur_load]++;
          continue;
        end
        void'(gen_q[i].pop_front());
        exp_q[d][i][h.cls[1:0]].push_back(p);
        nw = 1 + (int'(h.len) + 3) / 4;
        begin
          automatic int k = 0;
          forever begin
            in_valid[i] = 1;
            in_sop[i]   = (k == 0);
            in_eop[i]   = (k == nw - 1);
            in_data[i]  = (k == 0) ? p.hdr : payload(p.seed, k);
            if (in_ready[i]) k++;
            if (k == nw) break;
            @(negedge clk[i]);
          end
        end
        @(negedge clk[i]);
        in_valid[i] = 0; in_sop[i] = 0; in_eop[i] = 0;
      end
    end
  end

  // ---------------- 1 Gbit/s outputs and sinks ----------------
  for (genvar j = 0; j < N; j++) begin : g_sink
    initial begin
      word_t words [$];
      int src;
      time t_sop;
      int tokens = 0;
      out_ready[j] = 1;
      wait (rst_n);
      forever begin
        @(negedge clk[j]);
        if (ce[j]) begin
          tokens = (tokens + 3 > 8) ? 8 : tokens + 3;
          if (fo_valid[j]) begin
            tokens -= 4;
            if (fo_sop[j]) begin
              words.delete();
              src = int'(fo_src[j]);
              t_sop = $time;
            end
            words.push_back(fo_data[j]);
            if (fo_eop[j]) begin
              automatic pkt_hdr_t h = pkt_hdr_t'(words[0]);
              automatic int c = int'(h.cls[1:0]);
              checks++;
              if (exp_q[j][src][c].size() == 0) begin
                fail($sformatf("card %0d: unexpected packet from %0d class %0d", j, src, c));
              end else begin
                automatic pkt_t e = exp_q[j][src][c].pop_front();
                automatic bit ok = (words[0] == e.hdr) && (words.size() == 1 + (int'(h.len) + 3) / 4);
                for (int k = 1; k < words.size() && ok; k++) if (words[k] != payload(e.seed, k)) ok = 0;
                if (!ok) fail($sformatf("card %0d: packet from %0d class %0d differs", j, src, c));
                sum_delay_ns[cur_load] += real'(t_sop - e.t_arr) / 1000.0;
                n_pkts[cur_load]++;
                n_outstanding--;
              end
            end
          end
          out_ready[j] = (tokens >= 0);
        end
      end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (NLOAD * (3 * GEN_SLOTS + 300_000)) @(posedge clk[0]);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- main ----------------
  initial begin
    for (int i = 0; i < N; i++) begin
      for (int p = 0; p < NPAT; p++) begin pat_value[i][p] = '0; pat_mask[i][p] = '0; end
      pat_value[i][0] = DEST_W'(16'h1000 + i); pat_mask[i][0] = 16'hFFFF;
      pat_en[i] = 4'b0001;
      for (int c = 0; c < NC; c++) begin
        cfg_thr[i][c]     = CW'(12);       // 4 classes x 12 stays below 64 slots
        cfg_quantum[i][c] = 13'(256);
      end
    end
    for (int l = 0; l < NLOAD; l++) begin
      sum_delay_ns[l] = 0.0; n_pkts[l] = 0; n_blocked[l] = 0; max_backlog[l] = 0;
    end
    rst_n = 0;
    #100_000 rst_n = 1;
    repeat (60) @(posedge clk[0]);

    for (int l = 0; l < NLOAD; l++) begin
      cur_load = l;
      generating = 1;
      repeat (3 * GEN_SLOTS) @(posedge clk[0]);
      generating = 0;
      wait (n_outstanding == 0);
      repeat (300) @(posedge clk[0]);
      begin
        automatic real mean_ns = (n_pkts[l] > 0) ? sum_delay_ns[l] / real'(n_pkts[l]) : 0.0;
        $display("load %0d%%: %0d packets, mean queuing delay %0.1f ns = %0.2f packet times, source held back %0d clocks, max generator backlog %0d",
                 LOADS_PCT[l], n_pkts[l], mean_ns, mean_ns / PKT_TIME_NS, n_blocked[l], max_backlog[l]);
        checks++;
        if (n_pkts[l] == 0) fail($sformatf("no packet delivered at load %0d%%", LOADS_PCT[l]));
        if (l > 0) begin
          automatic real prev = sum_delay_ns[l-1] / real'(n_pkts[l-1]);
          checks++;
          if (mean_ns < prev) fail($sformatf("mean delay fell from %0.1f to %0.1f ns as load rose", prev, mean_ns));
        end
      end
    end

    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        checks++;
        if (ff_errors[j][i] != 0 || ff_overflow[j][i] || qm_drops[j][i] != 0)
          fail($sformatf("card %0d link %0d: errors %0d overflow %0b drops %0d", j, i,
                         ff_errors[j][i], ff_overflow[j][i], qm_drops[j][i]));
        for (int c = 0; c < NC; c++) begin
          checks++;
          if (exp_q[j][i][c].size() != 0) fail($sformatf("card %0d: %0d packets from %0d class %0d lost",
                                                         j, exp_q[j][i][c].size(), i, c));
        end
      end
    end
    checks++;
    if (n_blocked[NLOAD-1] == 0) fail("flow control never held a source back at the highest load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
