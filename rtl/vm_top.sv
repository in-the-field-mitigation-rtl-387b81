// vm_top: fabric logic of the in-the-field variability mitigation framework.
//
// Two pieces of hardware serve the framework, and they stand side by side here:
//   * u_sense: the ring-oscillator sensing network (N_SENSORS sensors spread over
//     the fabric) behind an AXI-lite port. The processor resets, activates and
//     stops all sensors and reads each count to build the chip's variability
//     map, from which the fastest device and the fastest region are chosen.
//   * u_fir / u_fft: the support architecture that calibrates a benchmark's
//     clock: a retunable PLL, two dual-clock FIFOs and the benchmark itself,
//     one instance with the 16-tap FIR (starts at 140 MHz, its timing-analysis
//     frequency) and one with the 16-point FFT (starts at 240 MHz).
// The processor, the DMA engines and the external memory are outside the
// fabric logic: their AXI-lite and AXI-stream connections are ports here.
// Everything runs from `sys_clk` (100 MHz), except the RO clocks of the sensors
// and the PLL clocks of the benchmarks. On the device the network and a
// benchmark are separate configurations loaded one after the other; placing
// them, and the two benchmarks, in one top is this design's arrangement.
`timescale 1ns / 1ps
module vm_top
  import vm_pkg::*;
#(
  parameter int unsigned N_SENSORS     = 408,
  parameter int unsigned RECONF_CYCLES = 3000
) (
  input  logic        sys_clk,
  input  logic        sys_rst_n,
  // sensing network
  input  axil_req_t   ro_axil_req,
  output axil_rsp_t   ro_axil_rsp,
  // FIR support architecture
  input  axil_req_t   fir_pll_axil_req,
  output axil_rsp_t   fir_pll_axil_rsp,
  input  logic [31:0] fir_s_axis_tdata,
  input  logic        fir_s_axis_tvalid,
  output logic        fir_s_axis_tready,
  input  logic        fir_s_axis_tlast,
  output logic [31:0] fir_m_axis_tdata,
  output logic        fir_m_axis_tvalid,
  input  logic        fir_m_axis_tready,
  output logic        fir_m_axis_tlast,
  output logic        fir_ip_clk,
  output logic        fir_pll_locked,
  // FFT support architecture
  input  axil_req_t   fft_pll_axil_req,
  output axil_rsp_t   fft_pll_axil_rsp,
  input  logic [31:0] fft_s_axis_tdata,
  input  logic        fft_s_axis_tvalid,
  output logic        fft_s_axis_tready,
  input  logic        fft_s_axis_tlast,
  output logic [31:0] fft_m_axis_tdata,
  output logic        fft_m_axis_tvalid,
  input  logic        fft_m_axis_tready,
  output logic        fft_m_axis_tlast,
  output logic        fft_ip_clk,
  output logic        fft_pll_locked
);

  sensing_system #(.N_SENSORS(N_SENSORS)) u_sense (
    .clk(sys_clk), .rst_n(sys_rst_n), .axil_req(ro_axil_req), .axil_rsp(ro_axil_rsp)
  );

  support_arch #(.BENCH(BENCH_FIR), .RECONF_CYCLES(RECONF_CYCLES)) u_fir (
    .dma_clk(sys_clk), .dma_rst_n(sys_rst_n),
    .pll_axil_req(fir_pll_axil_req), .pll_axil_rsp(fir_pll_axil_rsp),
    .s_axis_tdata(fir_s_axis_tdata), .s_axis_tvalid(fir_s_axis_tvalid),
    .s_axis_tready(fir_s_axis_tready), .s_axis_tlast(fir_s_axis_tlast),
    .m_axis_tdata(fir_m_axis_tdata), .m_axis_tvalid(fir_m_axis_tvalid),
    .m_axis_tready(fir_m_axis_tready), .m_axis_tlast(fir_m_axis_tlast),
    .ip_clk(fir_ip_clk), .pll_locked(fir_pll_locked)
  );

  support_arch #(.BENCH(BENCH_FFT), .RECONF_CYCLES(RECONF_CYCLES)) u_fft (
    .dma_clk(sys_clk), .dma_rst_n(sys_rst_n),
    .pll_axil_req(fft_pll_axil_req), .pll_axil_rsp(fft_pll_axil_rsp),
    .s_axis_tdata(fft_s_axis_tdata), .s_axis_tvalid(fft_s_axis_tvalid),
    .s_axis_tready(fft_s_axis_tready), .s_axis_tlast(fft_s_axis_tlast),
    .m_axis_tdata(fft_m_axis_tdata), .m_axis_tvalid(fft_m_axis_tvalid),
    .m_axis_tready(fft_m_axis_tready), .m_axis_tlast(fft_m_axis_tlast),
    .ip_clk(fft_ip_clk), .pll_locked(fft_pll_locked)
  );

endmodule
