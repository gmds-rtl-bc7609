// gmds_multiplexer: Multiplexer (MX) coupling two Queue Managers to one
// packet memory.
//
// The memory runs three times faster than the Queue Managers. Each Queue
// Manager period (three memory clocks, numbered by `phase`) is split into
// fixed access slots:
//   phase 0 : write the word offered by Queue Manager A (if any)
//   phase 1 : write the word offered by Queue Manager B (if any)
//   phase 2 : read for whichever Queue Manager offers a read request
// so both sources can always write at full rate and one read per period is
// reserved for the egress output. This slot plan follows the document; the
// fixed order of the slots is this design's choice. Queue Manager B's region
// starts at word REGION (each QM uses local addresses below REGION).
//
// Timing: clk is the memory clock; ce (phase == 2) marks the Queue Manager
// clock edge. Requests are held by the Queue Managers for a whole period.
// The read word is captured one memory clock after the phase 2 access and
// out_valid/out_data/out_sop/out_eop/out_src are then held until the next
// capture, so a consumer sampling on ce sees each read once, two ce periods
// after the Queue Manager issued the request. Only one Queue Manager of the
// line card may read at a time (the Scheduler serves one packet at a time);
// if both ask, A is served and rd_conflict is raised.
module gmds_multiplexer
  import gmds_pkg::*;
#(
  parameter int unsigned REGION = 4160,
  localparam int unsigned LAW   = $clog2(REGION),
  localparam int unsigned MAW   = $clog2(2 * REGION)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [1:0]     phase,
  // Queue Manager A
  input  logic           a_wr_valid,
  input  logic [LAW-1:0] a_wr_addr,
  input  word_t          a_wr_data,
  input  logic           a_rd_valid,
  input  logic [LAW-1:0] a_rd_addr,
  input  logic           a_rd_sop,
  input  logic           a_rd_eop,
  // Queue Manager B
  input  logic           b_wr_valid,
  input  logic [LAW-1:0] b_wr_addr,
  input  word_t          b_wr_data,
  input  logic           b_rd_valid,
  input  logic [LAW-1:0] b_rd_addr,
  input  logic           b_rd_sop,
  input  logic           b_rd_eop,
  // memory port
  output logic           mem_en,
  output logic           mem_we,
  output logic [MAW-1:0] mem_addr,
  output word_t          mem_wdata,
  input  word_t          mem_rdata,
  // read data out
  output logic           out_valid,
  output logic           out_sop,
  output logic           out_eop,
  output logic           out_src,      // 0 = A, 1 = B
  output word_t          out_data,
  output logic           rd_conflict,
  output logic [31:0]    cnt_dual_write  // periods in which both A and B wrote
);
  localparam logic [MAW-1:0] B_BASE = MAW'(REGION);

  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    unique case (phase)
      2'd0: begin
        mem_en    = a_wr_valid;
        mem_we    = 1'b1;
        mem_addr  = MAW'(a_wr_addr);
        mem_wdata = a_wr_data;
      end
      2'd1: begin
        mem_en    = b_wr_valid;
        mem_we    = 1'b1;
        mem_addr  = MAW'(b_wr_addr) + B_BASE;
        mem_wdata = b_wr_data;
      end
      2'd2: begin
        mem_en    = a_rd_valid || b_rd_valid;
        mem_we    = 1'b0;
        mem_addr  = a_rd_valid ? MAW'(a_rd_addr) : MAW'(b_rd_addr) + B_BASE;
      end
      default: ;
    endcase
  end

  assign rd_conflict = (phase == 2'd2) && a_rd_valid && b_rd_valid;

  // Tags of the read in flight, captured with the phase 2 access.
  logic rd_pend, pend_sop, pend_eop, pend_src;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pend        <= 1'b0;
      pend_sop       <= 1'b0;
      pend_eop       <= 1'b0;
      pend_src       <= 1'b0;
      out_valid      <= 1'b0;
      out_sop        <= 1'b0;
      out_eop        <= 1'b0;
      out_src        <= 1'b0;
      out_data       <= '0;
      cnt_dual_write <= '0;
    end else begin
      if (phase == 2'd2) begin
        rd_pend  <= a_rd_valid || b_rd_valid;
        pend_sop <= a_rd_valid ? a_rd_sop : b_rd_sop;
        pend_eop <= a_rd_valid ? a_rd_eop : b_rd_eop;
        pend_src <= !a_rd_valid;
        if (a_wr_valid && b_wr_valid) cnt_dual_write <= cnt_dual_write + 1'b1;
      end
      if (phase == 2'd0) begin
        out_valid <= rd_pend;
        out_sop   <= rd_pend && pend_sop;
        out_eop   <= rd_pend && pend_eop;
        out_src   <= pend_src;
        out_data  <= mem_rdata;
      end
    end
  end

endmodule
