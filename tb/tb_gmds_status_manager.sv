// tb_gmds_status_manager: random enqueue/dequeue events from four Queue
// Managers, checked against a software count of every (source, class)
// queue. Also checks the per-class thresholds (including a disabled one),
// the OR of the chained flow_in bitmap, the head-length pass-through and the
// in/out totals. The clock enable runs at one clock in three.
`timescale 1ns/1ps
module tb_gmds_status_manager;
  import gmds_pkg::*;
  localparam int NP = 4, NC = 4, SLOTS = 64, NQ = NP * NC, CW = $clog2(SLOTS + 1);

  logic clk = 0, rst_n = 0, ce;
  logic [1:0] phase;
  logic enq_evt [NP], deq_evt [NP];
  logic [1:0] enq_cls [NP], deq_cls [NP];
  logic [LEN_W-1:0] qm_head_len [NP][NC];
  logic [CW-1:0] thr [NC];
  word_t flow_in, status_word;
  logic [CW-1:0] q_count [NQ];
  logic [LEN_W-1:0] q_head_len [NQ];
  logic [31:0] cnt_in, cnt_out, cnt_xoff;

  gmds_status_manager #(.N_PORTS(NP), .N_CLASS(NC), .SLOTS(SLOTS)) dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .enq_evt(enq_evt), .enq_cls(enq_cls),
    .deq_evt(deq_evt), .deq_cls(deq_cls), .qm_head_len(qm_head_len), .cfg_thr(thr),
    .flow_in(flow_in), .status_word(status_word), .q_count(q_count), .q_head_len(q_head_len),
    .cnt_in(cnt_in), .cnt_out(cnt_out), .cnt_xoff_events(cnt_xoff)
  );

  always #4 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) phase <= 0; else phase <= (phase == 2) ? 2'd0 : phase + 2'd1;
  assign ce = (phase == 2);

  int checks = 0, failures = 0;
  int model [NQ];
  int tot_in = 0, tot_out = 0, n_xoff_seen = 0, n_flow_in = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp_status;
    thr = '{CW'(3), CW'(5), CW'(0), CW'(9)};
    flow_in = '0;
    for (int q = 0; q < NQ; q++) model[q] = 0;
    for (int s = 0; s < NP; s++) begin
      enq_evt[s] = 0; deq_evt[s] = 0; enq_cls[s] = 0; deq_cls[s] = 0;
      for (int c = 0; c < NC; c++) qm_head_len[s][c] = '0;
    end
    #20 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      do @(negedge clk); while (!ce);
      // inputs for this ce edge; enqueue more than dequeue early on
      for (int s = 0; s < NP; s++) begin
        enq_evt[s] = ($urandom_range(99) < ((t < 2000) ? 50 : 25));
        enq_cls[s] = 2'($urandom_range(NC - 1));
        deq_cls[s] = 2'($urandom_range(NC - 1));
        deq_evt[s] = ($urandom_range(99) < 35) && model[s * NC + deq_cls[s]] > 0;
        if (enq_evt[s] && model[s * NC + enq_cls[s]] >= SLOTS - 1) enq_evt[s] = 0;
        for (int c = 0; c < NC; c++) qm_head_len[s][c] = LEN_W'($urandom);
      end
      flow_in = ($urandom_range(9) == 0) ? word_t'(1) << $urandom_range(31) : '0;
      if (flow_in != 0) n_flow_in++;
      exp_status = flow_in;
      for (int q = 0; q < NQ; q++)
        if (thr[q % NC] != 0 && model[q] >= int'(thr[q % NC])) exp_status[q] = 1'b1;
      // the combinational head-length bus
      #1;
      for (int s = 0; s < NP; s++) for (int c = 0; c < NC; c++) begin
        checks++;
        if (q_head_len[s * NC + c] != qm_head_len[s][c]) begin
          failures++; $display("FAIL head_len map s%0d c%0d", s, c);
        end
      end
      for (int s = 0; s < NP; s++) begin
        if (enq_evt[s]) begin model[s * NC + enq_cls[s]]++; tot_in++; end
        if (deq_evt[s]) begin model[s * NC + deq_cls[s]]--; tot_out++; end
      end
      @(negedge clk);
      for (int q = 0; q < NQ; q++) begin
        checks++;
        if (int'(q_count[q]) != model[q]) begin
          failures++; if (failures < 10) $display("FAIL t=%0d q%0d count %0d exp %0d", t, q, q_count[q], model[q]);
        end
      end
      checks++;
      if (status_word != exp_status) begin
        failures++; if (failures < 10) $display("FAIL t=%0d status %h exp %h", t, status_word, exp_status);
      end
      if (exp_status[15:0] != 0) n_xoff_seen++;
      for (int s = 0; s < NP; s++) begin enq_evt[s] = 0; deq_evt[s] = 0; end
    end
    checks++;
    if (cnt_in != tot_in || cnt_out != tot_out) begin
      failures++; $display("FAIL totals in %0d/%0d out %0d/%0d", cnt_in, tot_in, cnt_out, tot_out);
    end
    checks++;
    if (n_xoff_seen == 0 || n_flow_in == 0 || cnt_xoff == 0) begin
      failures++; $display("FAIL congestion never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
