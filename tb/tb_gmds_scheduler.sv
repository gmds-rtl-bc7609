// tb_gmds_scheduler: Deficit Round Robin order and fairness.
//
// Queues are preloaded with packet lists of known lengths (no arrivals);
// the testbench plays the Status Manager (counts and head lengths) and the
// Queue Managers (deq_done a few ce later). The sequence of (source, class)
// decisions is compared with a software DRR run on the same lists. Then all
// queues are kept backlogged with maximum-size packets and the bytes served
// per class must follow the quanta 1:2:3:4. out_ready low must stop all
// decisions. Last, the deficit of a queue that ran empty must be cleared:
// queue 3 (quantum 400) sends a 10-byte packet and empties; later it gets two
// 256-byte packets while queue 2 (quantum 300) gets three. With its deficit
// cleared, queue 3 can send only one packet per round, so it must never be
// chosen twice in a row. The clock enable runs at one clock in three.
`timescale 1ns/1ps
module tb_gmds_scheduler;
  import gmds_pkg::*;
  localparam int NP = 4, NC = 4, SLOTS = 64, NQ = NP * NC, CW = $clog2(SLOTS + 1);

  logic clk = 0, rst_n = 0, ce;
  logic [1:0] phase;
  logic [CW-1:0] q_count [NQ];
  logic [LEN_W-1:0] q_head_len [NQ];
  logic [LEN_W:0] quantum [NC];
  logic out_ready, deq_valid, deq_done;
  logic [1:0] deq_src, deq_cls;
  logic [31:0] cnt_sent, cnt_skip;

  gmds_scheduler #(.N_PORTS(NP), .N_CLASS(NC), .SLOTS(SLOTS)) dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .q_count(q_count), .q_head_len(q_head_len),
    .cfg_quantum(quantum), .out_ready(out_ready), .deq_valid(deq_valid), .deq_src(deq_src),
    .deq_cls(deq_cls), .deq_done(deq_done), .cnt_sent(cnt_sent), .cnt_deficit_skip(cnt_skip)
  );

  always #4 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) phase <= 0; else phase <= (phase == 2) ? 2'd0 : phase + 2'd1;
  assign ce = (phase == 2);

  int checks = 0, failures = 0;
  int pk [NQ][$];          // packet lengths per queue
  int expect_seq [$];
  bit refill = 0;
  bit record = 0;
  int rec_seq [$];
  longint bytes_cls [NC];

  always_comb
    for (int q = 0; q < NQ; q++) begin
      q_count[q]    = CW'(pk[q].size());
      q_head_len[q] = pk[q].size() ? LEN_W'(pk[q][0]) : '0;
    end

  // Queue Manager stand-in: pop on a decision, deq_done 4 ce later
  initial begin
    deq_done = 0;
    forever begin
      do @(negedge clk); while (!(ce && deq_valid));
      begin
        automatic int q = int'(deq_src) * NC + int'(deq_cls);
        automatic int len = pk[q].pop_front();
        bytes_cls[deq_cls] += len;
        if (refill) pk[q].push_back(256);
        if (record) rec_seq.push_back(q);
        else if (!refill) begin
          checks++;
          if (expect_seq.size() == 0 || expect_seq.pop_front() != q) begin
            failures++; $display("FAIL %0t: decision for queue %0d out of DRR order", $time, q);
          end
        end
        if (!out_ready) begin failures++; $display("FAIL decision while out_ready low"); end
      end
      repeat (4) do @(negedge clk); while (!ce);
      deq_done = 1;
      do @(negedge clk); while (!ce);
      deq_done = 0;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int def [NQ];
    int copy [NQ][$];
    int total = 0;
    quantum = '{13'd100, 13'd200, 13'd300, 13'd400};
    for (int c = 0; c < NC; c++) bytes_cls[c] = 0;
    for (int q = 0; q < NQ; q++) begin
      automatic int n = $urandom_range(6);
      for (int i = 0; i < n; i++) pk[q].push_back($urandom_range(256, 1));
      copy[q] = pk[q];
      total += n;
      def[q] = 0;
    end
    // software DRR
    while (1) begin
      automatic int left = 0;
      for (int q = 0; q < NQ; q++) left += copy[q].size();
      if (left == 0) break;
      for (int q = 0; q < NQ; q++) begin
        if (copy[q].size() == 0) begin def[q] = 0; continue; end
        def[q] += int'(quantum[q % NC]);
        while (copy[q].size() && copy[q][0] <= def[q]) begin
          def[q] -= copy[q].pop_front();
          expect_seq.push_back(q);
        end
        if (copy[q].size() == 0) def[q] = 0;
      end
    end
    out_ready = 0;
    #20 rst_n = 1;
    repeat (300) @(negedge clk);          // nothing may be sent yet
    checks++;
    if (cnt_sent != 0) begin failures++; $display("FAIL sent with out_ready low"); end
    out_ready = 1;
    wait (expect_seq.size() == 0);
    repeat (200) @(negedge clk);
    checks++;
    if (cnt_sent != total) begin failures++; $display("FAIL sent %0d of %0d", cnt_sent, total); end
    // fairness under backlog
    for (int c = 0; c < NC; c++) bytes_cls[c] = 0;
    refill = 1;
    for (int q = 0; q < NQ; q++) repeat (3) pk[q].push_back(256);
    repeat (60000) @(negedge clk);
    for (int c = 1; c < NC; c++) begin
      automatic real ratio = real'(bytes_cls[c]) / real'(bytes_cls[0]);
      checks++;
      if (ratio < (c + 1) * 0.85 || ratio > (c + 1) * 1.15) begin
        failures++; $display("FAIL class %0d byte ratio %f", c, ratio);
      end
    end
    checks++;
    if (cnt_skip == 0) begin failures++; $display("FAIL no deficit skip"); end
    // deficit cleared when a queue runs empty
    refill = 0;
    record = 1;
    begin
      automatic int left;
      do begin
        @(negedge clk);
        left = 0;
        for (int q = 0; q < NQ; q++) left += pk[q].size();
      end while (left != 0);
    end
    repeat (300) @(negedge clk);
    pk[3].push_back(10);
    while (pk[3].size() != 0) @(negedge clk);
    repeat (300) @(negedge clk);
    rec_seq.delete();
    repeat (3) pk[2].push_back(256);
    repeat (2) pk[3].push_back(256);
    repeat (3000) @(negedge clk);
    checks++;
    if (rec_seq.size() != 5) begin
      failures++; $display("FAIL %0d decisions for 5 packets", rec_seq.size());
    end
    for (int i = 1; i < rec_seq.size(); i++) begin
      checks++;
      if (rec_seq[i] == 3 && rec_seq[i-1] == 3) begin
        failures++; $display("FAIL queue 3 served twice in a row: deficit kept after it ran empty");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
