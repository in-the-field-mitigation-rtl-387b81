// tb_support_arch: runs the frequency search of the calibration procedure on
// the support architecture with the FIR benchmark (reconfiguration shortened to
// 200 reference clocks). The testbench plays the processor and the DMA:
//   1. golden run at the timing-analysis frequency, 140 MHz: 96 random samples
//      are streamed through; every result is compared with an independent FIR
//      model (same coefficients, shift by 11, saturation);
//   2. the PLL is stepped by 1 MHz, the run repeated and compared word for word
//      with the golden data, for 141..144 MHz;
//   3. a jump to 300 MHz, rerun and compare again.
// The random source and sink make both FIFOs push back. Also checks that the
// stream ports are closed while the PLL relocks, that `last` arrives once per
// run on the final result, and that the benchmark clock runs at the frequency
// programmed.
`timescale 1ns / 1ps
module tb_support_arch;
  import vm_pkg::*;
  localparam int C [16] = '{-12, -20, 0, 60, 150, 260, 350, 400, 400, 350, 260, 150, 60, 0, -20, -12};
  localparam int NV = 96;

  logic clk = 1'b0, rst_n;
  axil_req_t req;
  axil_rsp_t rsp;
  logic [31:0] s_tdata, m_tdata;
  logic s_tvalid, s_tready, s_tlast, m_tvalid, m_tready, m_tlast;
  logic ip_clk, locked;
  int checks = 0, failures = 0;

  always #5ns clk = ~clk;

  support_arch #(.BENCH(BENCH_FIR), .RECONF_CYCLES(200)) dut (
    .dma_clk(clk), .dma_rst_n(rst_n), .pll_axil_req(req), .pll_axil_rsp(rsp),
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready), .s_axis_tlast(s_tlast),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready), .m_axis_tlast(m_tlast),
    .ip_clk, .pll_locked(locked)
  );
  axil_bfm bfm (.clk, .req, .rsp);
  dma_model dma (.clk, .s_tdata, .s_tvalid, .s_tready, .s_tlast, .m_tdata, .m_tvalid, .m_tready, .m_tlast);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_freq(input int f);
    bfm.write(PLL_REG_FREQ, 32'(f));
    @(negedge clk);
    check(!s_tready && !m_tvalid, "streams closed while relocking");
    while (!locked) @(negedge clk);
    repeat (5) @(negedge clk);
  endtask

  task automatic check_freq(input int f);
    realtime t0, t1;
    @(posedge ip_clk); t0 = $realtime;
    repeat (20) @(posedge ip_clk);
    t1 = $realtime;
    check(((t1 - t0) / 1ns) > 20000.0 / f - 0.05 && ((t1 - t0) / 1ns) < 20000.0 / f + 0.05,
          $sformatf("benchmark clock at %0d MHz: 20 periods in %0t", f, t1 - t0));
  endtask

  initial begin
    logic [31:0] vec[$], golden[$], res[$];
    int last0;
    rst_n = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    while (!locked) @(negedge clk);
    repeat (5) @(negedge clk);
    check_freq(140);

    for (int i = 0; i < NV; i++) vec.push_back(32'(int'($urandom_range(0, 4095)) - 2048));

    // golden run at 140 MHz, checked against the FIR model
    dma.src_prob = 95; dma.snk_prob = 20;   // slow sink: output FIFO fills
    last0 = dma.n_last_seen;
    dma.run(vec, NV, golden);
    check(golden.size() == NV, $sformatf("%0d results", golden.size()));
    check(dma.n_last_seen == last0 + 1, "one last flag per run");
    for (int n = 0; n < NV; n++) begin
      longint acc;
      acc = 0;
      for (int k = 0; k < 16; k++)
        if (n - k >= 0) acc += longint'(C[k]) * longint'($signed(vec[n - k][11:0]));
      acc = acc >>> 11;
      if (acc > 2047) acc = 2047;
      if (acc < -2048) acc = -2048;
      check(int'($signed(golden[n])) == int'(acc),
            $sformatf("result %0d: %0d expected %0d", n, $signed(golden[n]), acc));
    end

    // frequency steps of 1 MHz, then a jump
    for (int f = 141; f <= 145; f++) begin
      int ff;
      ff = (f == 145) ? 300 : f;
      set_freq(ff);
      check_freq(ff);
      dma.src_prob = 60 + 8 * (f - 141); dma.snk_prob = 30 + 15 * (f - 141);
      dma.run(vec, NV, res);
      check(res.size() == NV, "rerun complete");
      for (int n = 0; n < NV; n++)
        check(res[n] == golden[n], $sformatf("%0d MHz result %0d differs from golden", ff, n));
    end
    check(dma.n_in_backpressure > 0, "input FIFO pushed back");
    check(dma.n_out_backpressure > 0, "output held by the sink");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
