// tb_gmds_multiplexer: drives both Queue Manager ports of a Multiplexer with
// random writes (held for a whole three-phase period) and reads, with a
// behavioural one-cycle memory behind it. Checks that A's writes land at
// their local address, B's at REGION + address, that both can write in the
// same period, and that each read returns the right word and tags two ce
// periods after the request, seen exactly once at a ce edge.
`timescale 1ns/1ps
module tb_gmds_multiplexer;
  import gmds_pkg::*;
  localparam int REGION = 200, LAW = $clog2(REGION), MAW = $clog2(2 * REGION);

  logic clk = 0, rst_n = 0;
  logic [1:0] phase;
  logic a_wv, a_rv, a_rs, a_re, b_wv, b_rv, b_rs, b_re;
  logic [LAW-1:0] a_wa, a_ra, b_wa, b_ra;
  word_t a_wd, b_wd;
  logic mem_en, mem_we;
  logic [MAW-1:0] mem_addr;
  word_t mem_wdata, mem_rdata;
  logic out_valid, out_sop, out_eop, out_src, conflict;
  word_t out_data;
  logic [31:0] dual;

  gmds_multiplexer #(.REGION(REGION)) dut (
    .clk(clk), .rst_n(rst_n), .phase(phase),
    .a_wr_valid(a_wv), .a_wr_addr(a_wa), .a_wr_data(a_wd),
    .a_rd_valid(a_rv), .a_rd_addr(a_ra), .a_rd_sop(a_rs), .a_rd_eop(a_re),
    .b_wr_valid(b_wv), .b_wr_addr(b_wa), .b_wr_data(b_wd),
    .b_rd_valid(b_rv), .b_rd_addr(b_ra), .b_rd_sop(b_rs), .b_rd_eop(b_re),
    .mem_en(mem_en), .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata),
    .mem_rdata(mem_rdata), .out_valid(out_valid), .out_sop(out_sop), .out_eop(out_eop),
    .out_src(out_src), .out_data(out_data), .rd_conflict(conflict), .cnt_dual_write(dual)
  );

  // behavioural memory
  word_t mem [2 * REGION];
  always_ff @(posedge clk) if (mem_en) begin
    if (mem_we) mem[mem_addr] <= mem_wdata; else mem_rdata <= mem[mem_addr];
  end

  always #4 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) phase <= 0; else phase <= (phase == 2) ? 2'd0 : phase + 2'd1;

  int checks = 0, failures = 0;
  word_t refm [2 * REGION];
  bit    refv [2 * REGION];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit valid; word_t data; bit sop, eop, src; } rexp_t;
  rexp_t pipe [2];

  initial begin
    int n_dual = 0;
    a_wv = 0; a_rv = 0; b_wv = 0; b_rv = 0; a_rs = 0; a_re = 0; b_rs = 0; b_re = 0;
    a_wa = '0; a_ra = '0; b_wa = '0; b_ra = '0; a_wd = '0; b_wd = '0;
    for (int i = 0; i < 2 * REGION; i++) refv[i] = 0;
    pipe[0].valid = 0; pipe[1].valid = 0;
    #20 rst_n = 1;
    // align to a period boundary: requests change right after the ce edge
    do @(negedge clk); while (phase != 2);
    @(posedge clk);   // ce edge passed
    for (int t = 0; t < 3000; t++) begin
      // ---- new requests for this period ----
      #1;
      a_wv = $urandom_range(1); a_wa = LAW'($urandom_range(REGION - 1)); a_wd = $urandom;
      b_wv = $urandom_range(1); b_wa = LAW'($urandom_range(REGION - 1)); b_wd = $urandom;
      a_rv = 0; b_rv = 0;
      if ($urandom_range(1)) begin
        automatic int unsigned ad = $urandom_range(REGION - 1);
        automatic bit sel = $urandom_range(1);
        if (!sel && refv[ad] && !(a_wv && a_wa == LAW'(ad))) begin
          a_rv = 1; a_ra = LAW'(ad); a_rs = $urandom_range(1); a_re = $urandom_range(1);
        end
        if (sel && refv[REGION + ad] && !(b_wv && b_wa == LAW'(ad))) begin
          b_rv = 1; b_ra = LAW'(ad); b_rs = $urandom_range(1); b_re = $urandom_range(1);
        end
      end
      pipe[1] = pipe[0];
      pipe[0].valid = a_rv || b_rv;
      pipe[0].src   = b_rv;
      pipe[0].data  = a_rv ? refm[a_ra] : refm[REGION + int'(b_ra)];
      pipe[0].sop   = a_rv ? a_rs : b_rs;
      pipe[0].eop   = a_rv ? a_re : b_re;
      if (a_wv) begin refm[a_wa] = a_wd; refv[a_wa] = 1; end
      if (b_wv) begin refm[REGION + int'(b_wa)] = b_wd; refv[REGION + int'(b_wa)] = 1; end
      if (a_wv && b_wv) n_dual++;
      // ---- wait for the next ce edge and check the output seen there ----
      repeat (2) @(posedge clk);
      #1;   // just before the ce edge (phase 2)
      checks++;
      if (out_valid != pipe[1].valid ||
          (pipe[1].valid && (out_data != pipe[1].data || out_sop != pipe[1].sop ||
                             out_eop != pipe[1].eop || out_src != pipe[1].src))) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0d out v=%b d=%h s=%b e=%b src=%b exp v=%b d=%h", t, out_valid, out_data,
                   out_sop, out_eop, out_src, pipe[1].valid, pipe[1].data);
      end
      @(posedge clk);
    end
    checks++;
    if (dual != n_dual) begin failures++; $display("FAIL dual-write count %0d exp %0d", dual, n_dual); end
    for (int i = 0; i < 2 * REGION; i++) if (refv[i]) begin
      checks++;
      if (mem[i] != refm[i]) begin failures++; $display("FAIL mem[%0d]=%h exp %h", i, mem[i], refm[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
