// tb_gmds_pkt_mem: random writes and reads of the packet memory against a
// reference array; checks one-cycle read latency and that rdata holds
// between reads (also while writing).
`timescale 1ns/1ps
module tb_gmds_pkt_mem;
  localparam int DEPTH = 8320, AW = $clog2(DEPTH);
  logic clk = 0, en, we;
  logic [AW-1:0] addr;
  logic [31:0] wdata, rdata;
  logic [31:0] ref_mem [DEPTH];
  bit          ref_ok  [DEPTH];
  int checks = 0, failures = 0;

  gmds_pkt_mem dut (.clk(clk), .en(en), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #4 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expect_q;
    bit pending = 0;
    for (int i = 0; i < DEPTH; i++) ref_ok[i] = 0;
    en = 0; we = 0; addr = '0; wdata = '0;
    @(negedge clk);
    // fill a window, then mix reads and writes in it
    for (int i = 0; i < 20000; i++) begin
      automatic int unsigned r = $urandom_range(99);
      en    = (r < 90);
      we    = (r < 45);
      addr  = AW'($urandom_range(DEPTH - 1, DEPTH - 300));
      wdata = $urandom;
      if (i < 300) begin en = 1; we = 1; addr = AW'(DEPTH - 300 + i); end
      if (en && !we && ref_ok[addr]) begin expect_q = ref_mem[addr]; pending = 1; end
      else if (en && !we) pending = 0;
      @(posedge clk);
      #1;
      if (pending) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          $display("FAIL read: got %h expected %h", rdata, expect_q);
        end
      end
      if (en && we) begin ref_mem[addr] = wdata; ref_ok[addr] = 1; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
