// gmds_async_fifo: dual-clock FIFO used by the Frame Filter for clock rate
// adaptation between a remote Ingress Manager's clock and the local clock.
//
// Classic Gray-code pointer design: binary write/read pointers with one
// extra wrap bit, converted to Gray code and passed through two-flop
// synchronisers into the other domain. Full and empty are computed from
// the synchronised pointers, so they are conservative.
//
// Write side (wclk): a word is written on a wclk edge with wr_en && !full.
// Read side (rclk): rd_data shows the oldest word while !empty (first-word
// fall-through); it is removed on an rclk edge with rd_en && !empty.
// DEPTH must be a power of two.
module gmds_async_fifo #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  output logic          full,

  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd_en,
  output logic [DW-1:0] rd_data,
  output logic          empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [AW:0]   wbin, rbin, wgray, rgray;
  logic [AW:0]   rgray_w1, rgray_w2;   // read pointer in write domain
  logic [AW:0]   wgray_r1, wgray_r2;   // write pointer in read domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wgray = bin2gray(wbin);
  assign rgray = bin2gray(rbin);

  // Full when the Gray pointers differ only in the two top bits.
  assign full  = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign empty = (rgray == wgray_r2);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) wbin <= wbin + 1'b1;
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) rbin <= rbin + 1'b1;
    end
  end

  assign rd_data = mem[rbin[AW-1:0]];

endmodule
