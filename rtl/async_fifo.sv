// async_fifo: dual-clock FIFO that carries stream beats between two clock
// domains.
//
// Two of these sit between the DMA (fixed 100 MHz domain) and the benchmark
// (whose clock the PLL scales), one per direction, and serve as the clock-domain
// crossing synchronizers. The write side pushes when `wr_en` and not `full`;
// the read side sees the oldest word on `rd_data` while `!empty` and pops it with
// `rd_en`. Pointers are DEPTH-power-of-two binary counters with one extra wrap
// bit; their Gray-coded copies cross to the other domain through two flip-flops.
// `full` and `empty` are therefore pessimistic for two clocks of the other
// domain after a change, never optimistic. Each side has its own active-low
// reset, asserted asynchronously; reset both together. The storage is a plain
// register array. A dual-clock FIFO per direction follows the document; depth,
// width and the Gray-pointer scheme are this design's choices.
`timescale 1ns / 1ps
module async_fifo #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,

  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq1_rgray, wq2_rgray;  // read pointer seen by the write side
  logic [AW:0] rq1_wgray, rq2_wgray;  // write pointer seen by the read side
  logic [AW:0] wbin_nx, rbin_nx;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  assign wbin_nx = wbin + (AW+1)'(wr_en && !full);

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin      <= '0;
      wgray     <= '0;
      wq1_rgray <= '0;
      wq2_rgray <= '0;
    end else begin
      wbin      <= wbin_nx;
      wgray     <= bin2gray(wbin_nx);
      wq1_rgray <= rgray;
      wq2_rgray <= wq1_rgray;
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  // full: write pointer one lap ahead of the read pointer
  assign full = (wgray == {~wq2_rgray[AW:AW-1], wq2_rgray[AW-2:0]});

  // ---------------- read domain ----------------
  assign rbin_nx = rbin + (AW+1)'(rd_en && !empty);

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin      <= '0;
      rgray     <= '0;
      rq1_wgray <= '0;
      rq2_wgray <= '0;
    end else begin
      rbin      <= rbin_nx;
      rgray     <= bin2gray(rbin_nx);
      rq1_wgray <= wgray;
      rq2_wgray <= rq1_wgray;
    end
  end

  assign empty   = (rgray == rq2_wgray);
  assign rd_data = mem[rbin[AW-1:0]];

endmodule
