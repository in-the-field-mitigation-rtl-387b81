// support_arch: support architecture that lets the processor run a benchmark at
// a clock frequency of its choosing and check the results.
//
// Data path: the DMA (100 MHz domain) streams test vectors into an input
// dual-clock FIFO; the benchmark (fir16 or fft16, chosen by BENCH) reads them in
// its own clock domain, clocked by the PLL; its results go through an output
// dual-clock FIFO back to the DMA, which writes them to memory, where the
// processor compares them with the golden results. The processor retunes the
// PLL through the AXI-lite port `pll_axil_*` (see pll_model) to step the
// benchmark frequency, e.g. by 1 MHz per trial.
//
// Interfaces: `s_axis_*` is the stream from the DMA (tdata/tvalid/tready/tlast),
// `m_axis_*` the stream back to it, both on `dma_clk`. Backpressure: when the
// output FIFO is full the benchmark stalls, and when the input FIFO is full
// s_axis_tready falls.
//
// Run reset: while the PLL is not locked (after reset and during every
// reconfiguration) the benchmark and both FIFOs are held in reset, s_axis_tready
// is low and m_axis_tvalid is low. The DMA side leaves reset one dma_clk after
// lock, the benchmark side two of its own clocks after that. Each run after a
// frequency change therefore starts from the same clean state (an empty FIR
// delay line, an FFT waiting for a block), so its results can be compared word
// for word with the golden run. Retune only between runs, with both streams idle.
// `ip_clk` and `pll_locked` are brought out for observation.
// The PLL, the two dual-clock FIFOs, the separate benchmark clock domain and
// the 100 MHz DMA/PLL domain follow the document; the FIFO depth and the run
// reset are this design's choices.
`timescale 1ns / 1ps
module support_arch
  import vm_pkg::*;
#(
  parameter bench_e      BENCH         = BENCH_FIR,
  parameter int unsigned F_INIT_MHZ    = (BENCH == BENCH_FIR) ? 140 : 240,
  parameter int unsigned RECONF_CYCLES = 3000,
  parameter int unsigned FIFO_DEPTH    = 16
) (
  input  logic        dma_clk,
  input  logic        dma_rst_n,
  // PLL configuration (AXI-lite, dma_clk)
  input  axil_req_t   pll_axil_req,
  output axil_rsp_t   pll_axil_rsp,
  // stream from the DMA
  input  logic [31:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  input  logic        s_axis_tlast,
  // stream to the DMA
  output logic [31:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        m_axis_tlast,
  // observation
  output logic        ip_clk,
  output logic        pll_locked
);

  logic ip_rst_n;
  logic in_full, in_empty, out_full, out_empty;
  axis_beat_t in_wr, in_rd, out_wr, out_rd;
  logic ip_in_ready, ip_out_valid;
  logic [31:0] ip_out_data;
  logic ip_out_last;

  pll_model #(.F_INIT_MHZ(F_INIT_MHZ), .RECONF_CYCLES(RECONF_CYCLES)) u_pll (
    .ref_clk (dma_clk),
    .rst_n   (dma_rst_n),
    .axil_req(pll_axil_req),
    .axil_rsp(pll_axil_rsp),
    .clk_out (ip_clk),
    .locked  (pll_locked)
  );

  // Run reset: held while the PLL is unlocked
  logic run_rst_n;
  always_ff @(posedge dma_clk or negedge dma_rst_n) begin
    if (!dma_rst_n) run_rst_n <= 1'b0;
    else            run_rst_n <= pll_locked;
  end

  reset_sync u_ip_rst (.clk(ip_clk), .arst_n(run_rst_n), .rst_n(ip_rst_n));

  // DMA -> benchmark
  assign in_wr         = '{last: s_axis_tlast, data: s_axis_tdata};
  assign s_axis_tready = !in_full && run_rst_n;

  async_fifo #(.WIDTH(AXIS_BEAT_W), .DEPTH(FIFO_DEPTH)) u_fifo_in (
    .wr_clk(dma_clk), .wr_rst_n(run_rst_n), .wr_en(s_axis_tvalid && run_rst_n), .wr_data(in_wr), .full(in_full),
    .rd_clk(ip_clk),  .rd_rst_n(ip_rst_n),  .rd_en(ip_in_ready),   .rd_data(in_rd), .empty(in_empty)
  );

  // The benchmark ("User IP")
  if (BENCH == BENCH_FIR) begin : g_fir
    fir16 u_ip (
      .clk(ip_clk), .rst_n(ip_rst_n),
      .in_valid(!in_empty), .in_ready(ip_in_ready), .in_data(in_rd.data), .in_last(in_rd.last),
      .out_valid(ip_out_valid), .out_ready(!out_full), .out_data(ip_out_data), .out_last(ip_out_last)
    );
  end else begin : g_fft
    fft16 u_ip (
      .clk(ip_clk), .rst_n(ip_rst_n),
      .in_valid(!in_empty), .in_ready(ip_in_ready), .in_data(in_rd.data), .in_last(in_rd.last),
      .out_valid(ip_out_valid), .out_ready(!out_full), .out_data(ip_out_data), .out_last(ip_out_last)
    );
  end

  // benchmark -> DMA
  assign out_wr = '{last: ip_out_last, data: ip_out_data};

  async_fifo #(.WIDTH(AXIS_BEAT_W), .DEPTH(FIFO_DEPTH)) u_fifo_out (
    .wr_clk(ip_clk),  .wr_rst_n(ip_rst_n),  .wr_en(ip_out_valid),  .wr_data(out_wr), .full(out_full),
    .rd_clk(dma_clk), .rd_rst_n(run_rst_n), .rd_en(m_axis_tready), .rd_data(out_rd), .empty(out_empty)
  );

  assign m_axis_tvalid = !out_empty && run_rst_n;
  assign m_axis_tdata  = out_rd.data;
  assign m_axis_tlast  = out_rd.last;

endmodule
