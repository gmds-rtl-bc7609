// gmds_pkt_mem: packet memory of the line card's Memory System.
//
// Single-port synchronous SRAM, one access per clock, standing in for the
// external ZBT SRAM device (8 ns cycle, 32 bits wide) that each pair of
// Queue Managers shares. A write stores wdata on the clock edge with en && we;
// a read (en && !we) presents the word on rdata after that edge (one-cycle
// read latency; a ZBT part's pipeline depth is not modelled). rdata holds
// its value until the next read. The array has no reset.
module gmds_pkt_mem #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 8320,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
