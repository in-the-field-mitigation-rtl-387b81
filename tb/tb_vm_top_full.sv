// tb_vm_top_full: the end-to-end run of tb_vm_top on the top at its default
// size: 408 sensors, 30 us PLL relock, and a 30 us measurement window (10,000
// cycles of a 333 MHz processor timer = 3,000 system clocks). It plays the
// processor, the DMA engines and the memory.
//   1. Variability map: reset all sensors, activate them for the measurement
//      window (the processor's timer, WIN system clocks), stop them, read every
//      sensor through the multiplexer; each count is checked against its stage
//      delay, and the fastest sensor (the region the design would be placed on)
//      must be the one with the shortest delay.
//   2. Frequency search (the maximum-frequency extraction loop) for each
//      benchmark: a golden run at the timing-analysis frequency (FIR 140 MHz,
//      FFT 240 MHz), checked against independent models (FIR convolution, float
//      DFT/16 within 4 LSB), then 1 MHz steps, each rerun compared with the
//      golden data, until a mismatch; the last error-free frequency is returned.
//      Simulated logic has no timing errors, so the testbench stands in for the
//      silicon: results fetched while the clock is above FAIL_ABOVE (f_STA + 2)
//      get one bit flipped. The search must return exactly f_STA + 2.
// Counted mechanisms, each of which must occur: sensor resets, activation
// windows, multiplexer reads, PLL reconfigurations, search stops on mismatch,
// input-FIFO backpressure, output backpressure, FIR pipeline stalls, FFT blocks
// completed and streams closed during relock.
`timescale 1ns / 1ps
module tb_vm_top_full;
  import vm_pkg::*;
  localparam int NS  = 408;   // sensors (the top's default)
  localparam int WIN = 3000;  // measurement window, system clocks
  localparam int BASE = 385, SPREAD = 32;
  localparam int NV_FIR = 64, NB_FFT = 4;
  localparam int C [16] = '{-12, -20, 0, 60, 150, 260, 350, 400, 400, 350, 260, 150, 60, 0, -20, -12};

  logic clk = 1'b0, rst_n;
  axil_req_t ro_req, fir_req, fft_req;
  axil_rsp_t ro_rsp, fir_rsp, fft_rsp;
  logic [31:0] fir_s_tdata, fir_m_tdata, fft_s_tdata, fft_m_tdata;
  logic fir_s_tvalid, fir_s_tready, fir_s_tlast, fir_m_tvalid, fir_m_tready, fir_m_tlast;
  logic fft_s_tvalid, fft_s_tready, fft_s_tlast, fft_m_tvalid, fft_m_tready, fft_m_tlast;
  logic fir_ip_clk, fir_locked, fft_ip_clk, fft_locked;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_sensor_reset = 0, n_window = 0, n_mux_read = 0, n_reconf = 0, n_stop = 0;
  int n_fir_stall = 0, n_closed = 0;

  always #5ns clk = ~clk;

  vm_top dut (
    .sys_clk(clk), .sys_rst_n(rst_n),
    .ro_axil_req(ro_req), .ro_axil_rsp(ro_rsp),
    .fir_pll_axil_req(fir_req), .fir_pll_axil_rsp(fir_rsp),
    .fir_s_axis_tdata(fir_s_tdata), .fir_s_axis_tvalid(fir_s_tvalid),
    .fir_s_axis_tready(fir_s_tready), .fir_s_axis_tlast(fir_s_tlast),
    .fir_m_axis_tdata(fir_m_tdata), .fir_m_axis_tvalid(fir_m_tvalid),
    .fir_m_axis_tready(fir_m_tready), .fir_m_axis_tlast(fir_m_tlast),
    .fir_ip_clk(fir_ip_clk), .fir_pll_locked(fir_locked),
    .fft_pll_axil_req(fft_req), .fft_pll_axil_rsp(fft_rsp),
    .fft_s_axis_tdata(fft_s_tdata), .fft_s_axis_tvalid(fft_s_tvalid),
    .fft_s_axis_tready(fft_s_tready), .fft_s_axis_tlast(fft_s_tlast),
    .fft_m_axis_tdata(fft_m_tdata), .fft_m_axis_tvalid(fft_m_tvalid),
    .fft_m_axis_tready(fft_m_tready), .fft_m_axis_tlast(fft_m_tlast),
    .fft_ip_clk(fft_ip_clk), .fft_pll_locked(fft_locked)
  );

  axil_bfm ro_bfm  (.clk, .req(ro_req),  .rsp(ro_rsp));
  axil_bfm fir_bfm (.clk, .req(fir_req), .rsp(fir_rsp));
  axil_bfm fft_bfm (.clk, .req(fft_req), .rsp(fft_rsp));
  dma_model fir_dma (.clk, .s_tdata(fir_s_tdata), .s_tvalid(fir_s_tvalid), .s_tready(fir_s_tready),
                     .s_tlast(fir_s_tlast), .m_tdata(fir_m_tdata), .m_tvalid(fir_m_tvalid),
                     .m_tready(fir_m_tready), .m_tlast(fir_m_tlast));
  dma_model fft_dma (.clk, .s_tdata(fft_s_tdata), .s_tvalid(fft_s_tvalid), .s_tready(fft_s_tready),
                     .s_tlast(fft_s_tlast), .m_tdata(fft_m_tdata), .m_tvalid(fft_m_tvalid),
                     .m_tready(fft_m_tready), .m_tlast(fft_m_tlast));

  always @(posedge fir_ip_clk) if (dut.u_fir.g_fir.u_ip.stall) n_fir_stall++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- variability map ----------------
  task automatic build_map();
    logic [31:0] d;
    int best, best_exp;
    int got [NS];
    ro_bfm.write(RO_REG_CTRL, 32'h1); n_sensor_reset++;
    ro_bfm.write(RO_REG_CTRL, 32'h6);
    repeat (WIN - 2) @(negedge clk);
    ro_bfm.write(RO_REG_CTRL, 32'h4); n_window++;
    best = 0; best_exp = 0;
    for (int i = 0; i < NS; i++) begin
      int stage, expn;
      ro_bfm.write(RO_REG_SEL, 32'(i));
      ro_bfm.read(RO_REG_DATA, d);
      n_mux_read++;
      got[i] = int'(d);
      stage = BASE + ((13 * i) % SPREAD);
      expn = (WIN + 1) * 10_000 / (6 * stage) - 1;
      check(got[i] >= expn - 3 && got[i] <= expn + 3, $sformatf("sensor %0d: %0d expected %0d", i, got[i], expn));
      if (got[i] > got[best]) best = i;
      if (((13 * i) % SPREAD) < ((13 * best_exp) % SPREAD)) best_exp = i;
    end
    check(best == best_exp, $sformatf("fastest sensor %0d, expected %0d", best, best_exp));
  endtask

  // ---------------- benchmark helpers ----------------
  task automatic set_freq(input bit fft, input int f);
    if (fft) fft_bfm.write(PLL_REG_FREQ, 32'(f));
    else     fir_bfm.write(PLL_REG_FREQ, 32'(f));
    n_reconf++;
    @(negedge clk);
    if (fft) begin
      if (!fft_s_tready && !fft_m_tvalid) n_closed++;
      while (!fft_locked) @(negedge clk);
    end else begin
      if (!fir_s_tready && !fir_m_tvalid) n_closed++;
      while (!fir_locked) @(negedge clk);
    end
    repeat (5) @(negedge clk);
  endtask

  // one execution: stream the vectors, fetch the results, apply the silicon model
  task automatic execute(input bit fft, input int f, input int fail_above,
                         input logic [31:0] vec[$], output logic [31:0] res[$]);
    if (fft) begin
      fft_dma.src_prob = 90; fft_dma.snk_prob = 40;
      fft_dma.run(vec, vec.size(), res);
    end else begin
      fir_dma.src_prob = 95; fir_dma.snk_prob = 25;
      fir_dma.run(vec, vec.size(), res);
    end
    if (f > fail_above) res[7] ^= 32'h1;   // timing error of the modelled silicon
  endtask

  // maximum error-free frequency search
  task automatic search(input bit fft, input int f_sta, input int fail_above,
                        input logic [31:0] vec[$], output int f_ip, output logic [31:0] golden[$]);
    logic [31:0] res[$];
    bit same;
    f_ip = f_sta;
    execute(fft, f_ip, fail_above, vec, golden);
    forever begin
      f_ip = f_ip + 1;
      set_freq(fft, f_ip);
      execute(fft, f_ip, fail_above, vec, res);
      same = (res.size() == golden.size());
      for (int i = 0; i < res.size() && same; i++) same = (res[i] == golden[i]);
      if (!same) begin
        n_stop++;
        f_ip = f_ip - 1;
        break;
      end
    end
  endtask

  initial begin
    logic [31:0] vfir[$], vfft[$], gfir[$], gfft[$];
    int f_fir, f_fft;
    int xr [NB_FFT][16], xi [NB_FFT][16];
    rst_n = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;

    build_map();

    for (int i = 0; i < NV_FIR; i++) vfir.push_back(32'(int'($urandom_range(0, 4095)) - 2048));
    for (int b = 0; b < NB_FFT; b++)
      for (int n = 0; n < 16; n++) begin
        xr[b][n] = int'($urandom_range(0, 4095)) - 2048;
        xi[b][n] = int'($urandom_range(0, 4095)) - 2048;
        vfft.push_back({16'(xi[b][n]), 16'(xr[b][n])});
      end

    while (!fir_locked || !fft_locked) @(negedge clk);
    repeat (5) @(negedge clk);

    fork
      search(1'b0, 140, 142, vfir, f_fir, gfir);
      search(1'b1, 240, 242, vfft, f_fft, gfft);
    join
    check(f_fir == 142, $sformatf("FIR search returned %0d MHz, expected 142", f_fir));
    check(f_fft == 242, $sformatf("FFT search returned %0d MHz, expected 242", f_fft));

    // golden data against independent models
    for (int n = 0; n < NV_FIR; n++) begin
      longint acc;
      acc = 0;
      for (int k = 0; k < 16; k++)
        if (n - k >= 0) acc += longint'(C[k]) * longint'($signed(vfir[n - k][11:0]));
      acc = acc >>> 11;
      if (acc > 2047) acc = 2047;
      if (acc < -2048) acc = -2048;
      check(int'($signed(gfir[n])) == int'(acc), $sformatf("FIR golden %0d: %0d expected %0d", n, $signed(gfir[n]), acc));
    end
    for (int b = 0; b < NB_FFT; b++)
      for (int k = 0; k < 16; k++) begin
        real er, ei, a, dr, di;
        er = 0.0; ei = 0.0;
        for (int n = 0; n < 16; n++) begin
          a = -2.0 * 3.14159265358979 * real'(n * k) / 16.0;
          er += real'(xr[b][n]) * $cos(a) - real'(xi[b][n]) * $sin(a);
          ei += real'(xr[b][n]) * $sin(a) + real'(xi[b][n]) * $cos(a);
        end
        dr = real'($signed(gfft[16 * b + k][15:0])) - er / 16.0;
        di = real'($signed(gfft[16 * b + k][31:16])) - ei / 16.0;
        check(dr < 4.5 && dr > -4.5 && di < 4.5 && di > -4.5,
              $sformatf("FFT block %0d bin %0d off by (%f,%f)", b, k, dr, di));
      end

    $display("mechanisms: sensor_reset=%0d window=%0d mux_read=%0d reconf=%0d search_stop=%0d",
             n_sensor_reset, n_window, n_mux_read, n_reconf, n_stop);
    $display("mechanisms: in_backpressure=%0d out_backpressure=%0d fir_stall=%0d fft_blocks=%0d closed_during_relock=%0d",
             fir_dma.n_in_backpressure + fft_dma.n_in_backpressure,
             fir_dma.n_out_backpressure + fft_dma.n_out_backpressure,
             n_fir_stall, fft_dma.n_last_seen, n_closed);
    check(n_sensor_reset > 0, "sensor reset happened");
    check(n_window > 0, "activation window happened");
    check(n_mux_read == NS, "every sensor read");
    check(n_reconf >= 4, "PLL reconfigurations happened");
    check(n_stop == 2, "both searches stopped on a mismatch");
    check(fir_dma.n_in_backpressure + fft_dma.n_in_backpressure > 0, "input FIFO backpressure happened");
    check(fir_dma.n_out_backpressure + fft_dma.n_out_backpressure > 0, "output backpressure happened");
    check(n_fir_stall > 0, "FIR pipeline stall happened");
    check(fft_dma.n_last_seen == NB_FFT * (f_fft - 240 + 2), "FFT blocks completed in every run");
    check(n_closed == n_reconf, "streams closed during every relock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
