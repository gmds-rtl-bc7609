// tb_gmds_queue_manager: slot allocation and per-class queues.
//
// Eight slots only, so the memory fills up and packets are dropped. The
// testbench plays the Frame Filter (packet words, some packets ending with
// err), the Multiplexer and memory (writes applied before reads in each ce
// period, as the real Multiplexer does) and the Scheduler (random dequeue
// requests, one at a time). A software model tracks held slots and the
// class queues. Checks: each dequeued packet is the oldest of its class and
// comes back word for word with sop/eop tags; a full memory drops exactly the
// packets the model says; err packets never appear; q_count and head_len
// follow the model every ce; deq_done comes with the last read request;
// reads start one ce after the request and run one word per ce.
`timescale 1ns/1ps
module tb_gmds_queue_manager;
  import gmds_pkg::*;
  localparam int NC = 4, SLOTS = 8, MAXB = 256;
  localparam int SLOT_WORDS = 1 + MAXB / 4, AW = $clog2(SLOTS * SLOT_WORDS), CW = $clog2(SLOTS + 1);

  logic clk = 0, rst_n = 0, ce;
  logic [1:0] phase;
  logic in_valid, in_sop, in_eop, in_err, wr_valid, deq_valid, deq_done, rd_valid, rd_sop, rd_eop;
  logic enq_evt, deq_evt;
  logic [1:0] deq_cls, enq_cls, deq_cls_o;
  word_t in_data, wr_data;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [LEN_W-1:0] head_len [NC];
  logic [CW-1:0] q_count [NC];
  logic [31:0] cnt_drop;

  gmds_queue_manager #(.N_CLASS(NC), .SLOTS(SLOTS), .MAX_PKT_BYTES(MAXB)) dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .in_valid(in_valid), .in_sop(in_sop), .in_eop(in_eop),
    .in_err(in_err), .in_data(in_data), .wr_valid(wr_valid), .wr_addr(wr_addr), .wr_data(wr_data),
    .deq_valid(deq_valid), .deq_cls(deq_cls), .deq_done(deq_done), .rd_valid(rd_valid),
    .rd_addr(rd_addr), .rd_sop(rd_sop), .rd_eop(rd_eop), .enq_evt(enq_evt), .enq_cls(enq_cls),
    .deq_evt(deq_evt), .deq_cls_o(deq_cls_o), .head_len(head_len), .q_count(q_count), .cnt_drop(cnt_drop)
  );

  always #4 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) phase <= 0; else phase <= (phase == 2) ? 2'd0 : phase + 2'd1;
  assign ce = (phase == 2);

  int checks = 0, failures = 0;
  task automatic fail(string m);
    failures++; if (failures < 20) $display("FAIL %0t: %s", $time, m);
  endtask

  typedef word_t pkt_t [$];
  pkt_t  mq [NC][$];           // model class queues
  word_t mem [SLOTS * SLOT_WORDS];
  int held = 0;                // slots in use
  int drops = 0, errs = 0, served = 0, n_enq = 0;

  // input generator state
  pkt_t cur;
  int   cur_k = 0;
  bit   cur_take = 0, cur_err = 0, in_pkt = 0;
  // read side state
  pkt_t rd_pkt;
  int   rd_k = 0, rd_wait = 0;
  bit   reading = 0;

  initial begin
    #20 rst_n = 1;
    repeat (2_000_000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int free_at_edge;
    in_valid = 0; in_sop = 0; in_eop = 0; in_err = 0; in_data = '0; deq_valid = 0; deq_cls = 0;
    wait (rst_n);
    for (int t = 0; t < 60000; t++) begin
      do @(negedge clk); while (!ce);
      // ---- outputs registered at the previous ce edge ----
      if (wr_valid) mem[wr_addr] = wr_data;
      if (reading) begin
        if (rd_wait > 0) begin
          // the ce period right after the pop: no read yet
          rd_wait--;
          checks++;
          if (rd_valid) fail("read request too early");
        end else if (rd_valid) begin
          checks++;
          if (mem[rd_addr] != rd_pkt[rd_k] || rd_sop != (rd_k == 0) || rd_eop != (rd_k == rd_pkt.size() - 1) ||
              deq_done != rd_eop)
            fail($sformatf("read word %0d: %h expected %h", rd_k, mem[rd_addr], rd_pkt[rd_k]));
          rd_k++;
          if (rd_k == rd_pkt.size()) begin reading = 0; held--; served++; end
        end else fail("read late or gap in read stream");
      end else if (rd_valid) fail("unexpected read request");
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (int'(q_count[c]) != mq[c].size()) fail($sformatf("class %0d count %0d model %0d", c, q_count[c], mq[c].size()));
        else if (mq[c].size() && head_len[c] != mq[c][0][0][27:16]) fail("head_len");
      end
      // ---- inputs for the coming ce edge ----
      free_at_edge = SLOTS - held;
      deq_valid = 0;
      if (!reading && $urandom_range(99) < ((t / 10000) % 2 ? 60 : 8)) begin
        deq_cls = 2'($urandom_range(NC - 1));
        if (mq[deq_cls].size()) begin
          deq_valid = 1;
          rd_pkt = mq[deq_cls].pop_front();
          reading = 1; rd_k = 0; rd_wait = 1;
        end else deq_valid = $urandom_range(1);   // request for an empty class: ignored
      end
      in_valid = 0; in_sop = 0; in_eop = 0; in_err = 0;
      if (!in_pkt && $urandom_range(3) == 0) begin
        automatic pkt_hdr_t h = '0;
        h.cls = 3'($urandom_range(NC - 1));
        h.len = LEN_W'($urandom_range(MAXB, 1));
        h.dest = DEST_W'($urandom);
        cur.delete();
        cur.push_back(word_t'(h));
        for (int i = 0; i < (int'(h.len) + 3) / 4; i++) cur.push_back($urandom);
        cur_k = 0; in_pkt = 1;
        cur_err  = ($urandom_range(9) == 0);
        cur_take = (free_at_edge > 0);
        if (cur_take) held++; else drops++;
      end
      if (in_pkt && $urandom_range(9) != 0) begin
        in_valid = 1; in_sop = (cur_k == 0); in_eop = (cur_k == cur.size() - 1);
        in_data = cur[cur_k];
        in_err = in_eop && cur_err;
        cur_k++;
        if (in_eop) begin
          in_pkt = 0;
          if (cur_take && cur_err) begin held--; errs++; end
          else if (cur_take) begin mq[cur[0][29:28]].push_back(cur); n_enq++; end
        end
      end
    end
    checks++;
    if (cnt_drop != drops) fail($sformatf("drop counter %0d model %0d", cnt_drop, drops));
    checks++;
    if (drops == 0 || errs == 0 || served < 100) fail($sformatf("coverage drops %0d errs %0d served %0d", drops, errs, served));
    $display("enqueued %0d served %0d dropped %0d err %0d", n_enq, served, drops, errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
