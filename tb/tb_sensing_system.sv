// tb_sensing_system: builds a variability map over AXI-lite the way the
// processor does, on a 16-sensor network: reset all sensors, activate them for a
// window of 500 system clocks (the processor's timer), deactivate, then select
// and read every sensor. Each count is compared with the count expected from the
// sensor's stage delay (window / (6 * delay) - 1, within 2), the fastest sensor
// of the map must be the one with the shortest delay, NSENS must read 16, and a
// second map after a new reset must repeat the first within 2 counts.
`timescale 1ns / 1ps
module tb_sensing_system;
  import vm_pkg::*;
  localparam int unsigned NS = 16, BASE = 385, SPREAD = 32, WIN = 500;

  logic clk = 1'b0, rst_n;
  axil_req_t req;
  axil_rsp_t rsp;
  int checks = 0, failures = 0;

  always #5ns clk = ~clk;

  sensing_system #(.N_SENSORS(NS), .BASE_STAGE_PS(BASE), .SPREAD_PS(SPREAD)) dut (
    .clk, .rst_n, .axil_req(req), .axil_rsp(rsp)
  );
  axil_bfm bfm (.clk, .req, .rsp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic build_map(output int map[NS]);
    logic [31:0] d;
    bfm.write(RO_REG_CTRL, 32'h1);     // reset
    bfm.write(RO_REG_CTRL, 32'h6);     // activate, enable
    repeat (WIN - 2) @(negedge clk);   // the write itself takes 2 more clocks
    bfm.write(RO_REG_CTRL, 32'h4);     // deactivate
    for (int i = 0; i < NS; i++) begin
      bfm.write(RO_REG_SEL, 32'(i));
      bfm.read(RO_REG_DATA, d);
      map[i] = int'(d);
    end
  endtask

  initial begin
    int m1[NS], m2[NS];
    int best, best_exp;
    logic [31:0] d;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    bfm.read(RO_REG_NSENS, d);
    check(d == NS, "NSENS");
    build_map(m1);
    best = 0; best_exp = 0;
    for (int i = 0; i < NS; i++) begin
      int stage, expn;
      stage = BASE + ((13 * i) % SPREAD);
      expn = (WIN + 1) * 10_000 / (6 * stage) - 1;
      check(m1[i] >= expn - 3 && m1[i] <= expn + 3, $sformatf("sensor %0d: %0d expected %0d", i, m1[i], expn));
      if (m1[i] > m1[best]) best = i;
      if (((13 * i) % SPREAD) < ((13 * best_exp) % SPREAD)) best_exp = i;
    end
    check(best == best_exp, $sformatf("fastest sensor %0d, expected %0d", best, best_exp));
    build_map(m2);
    for (int i = 0; i < NS; i++)
      check(m2[i] >= m1[i] - 2 && m2[i] <= m1[i] + 2, $sformatf("sensor %0d repeat %0d vs %0d", i, m2[i], m1[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
