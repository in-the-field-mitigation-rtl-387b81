// tb_pll_model: checks the clock-manager model. After reset it must lock to
// 140 MHz after RECONF_CYCLES reference clocks; a FREQ write must drop `locked`
// at once, stop the output clock, and relock at the new frequency after
// RECONF_CYCLES clocks (the reconfiguration time); the measured period must
// match round(500000/f) ps per half period; STATUS must report lock and
// frequency. Steps of 1 MHz are exercised as in the frequency search.
`timescale 1ns / 1ps
module tb_pll_model;
  import vm_pkg::*;
  localparam int unsigned RC = 300;

  logic clk = 1'b0, rst_n;
  axil_req_t req;
  axil_rsp_t rsp;
  logic clk_out, locked;
  int checks = 0, failures = 0;
  int out_edges;

  always #5ns clk = ~clk;

  pll_model #(.F_INIT_MHZ(140), .RECONF_CYCLES(RC)) dut (
    .ref_clk(clk), .rst_n, .axil_req(req), .axil_rsp(rsp), .clk_out, .locked
  );
  axil_bfm bfm (.clk, .req, .rsp);

  always @(posedge clk_out) out_edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int f);
    realtime t0, t1;
    int half_ps;
    half_ps = (500000 + f / 2) / f;
    @(posedge clk_out); t0 = $realtime;
    repeat (10) @(posedge clk_out);
    t1 = $realtime;
    check(((t1 - t0) / 1ps) > real'(20 * half_ps) - 0.5 && ((t1 - t0) / 1ps) < real'(20 * half_ps) + 0.5,
          $sformatf("f=%0d: 10 periods took %0t, expected %0d ps", f, t1 - t0, 20 * half_ps));
  endtask

  task automatic wait_lock(output int cycles);
    cycles = 0;
    while (!locked) begin @(posedge clk); cycles++; end
  endtask

  initial begin
    int cyc;
    logic [31:0] d;
    rst_n = 1'b0; out_edges = 0;
    repeat (3) @(negedge clk);
    check(!locked && out_edges == 0, "no clock while in reset");
    rst_n = 1'b1;
    wait_lock(cyc);
    check(cyc >= RC - 1 && cyc <= RC + 1, $sformatf("initial lock after %0d clocks", cyc));
    measure(140);
    bfm.read(PLL_REG_STATUS, d);
    check(d == {16'd140, 16'd1}, $sformatf("STATUS %h", d));

    for (int f = 141; f <= 143; f++) begin
      bfm.write(PLL_REG_FREQ, 32'(f));
      check(!locked, "locked falls on reconfiguration");
      out_edges = 0;
      repeat (RC / 2) @(posedge clk);
      check(out_edges <= 1 && !locked, "clock stopped while reconfiguring");
      bfm.read(PLL_REG_STATUS, d);
      check(d[0] == 1'b0, "STATUS shows unlocked");
      wait_lock(cyc);
      check(cyc + RC / 2 + 6 >= RC - 2 && cyc + RC / 2 <= RC + 2,
            $sformatf("relock after %0d clocks", cyc + RC / 2));
      measure(f);
    end
    bfm.write(PLL_REG_FREQ, 32'd240);
    wait_lock(cyc);
    measure(240);
    bfm.read(PLL_REG_FREQ, d);
    check(d == 240, "FREQ reads back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
