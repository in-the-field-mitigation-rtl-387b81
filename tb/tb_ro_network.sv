// tb_ro_network: checks a 24-sensor network. All sensors run for the same
// window; each count is read through the multiplexer and compared with the
// count expected from that sensor's stage delay (window / (6 * stage delay)),
// within two counts. Also checks that sensors with shorter delays count more,
// that an address beyond the last sensor reads zero, that the mux output is
// registered (one clock), and that reset clears every sensor.
`timescale 1ns / 1ps
module tb_ro_network;
  localparam int unsigned NS = 24;
  localparam int unsigned BASE = 385, SPREAD = 32;
  localparam int unsigned WIN = 400;  // system clocks (4 us)

  logic clk = 1'b0, rst_n, sensor_rst, activate, enable;
  logic [4:0] sel;
  logic [15:0] count;
  int checks = 0, failures = 0;

  always #5ns clk = ~clk;

  ro_network #(.N_SENSORS(NS), .CNT_W(16), .BASE_STAGE_PS(BASE), .SPREAD_PS(SPREAD)) dut (
    .sys_clk(clk), .sys_rst_n(rst_n), .sensor_rst, .activate, .enable, .sel, .count
  );

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

  initial begin
    int got [NS];
    // sensor_rst starts low so that its rising edge clears the counters
    rst_n = 1'b0; sensor_rst = 1'b0; activate = 1'b0; enable = 1'b1; sel = '0;
    @(negedge clk); sensor_rst = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); sensor_rst = 1'b0;
    activate = 1'b1;                       // act_q rises at the next edge
    repeat (WIN) @(negedge clk);
    activate = 1'b0;                       // act_q falls at the next edge
    repeat (5) @(negedge clk);
    for (int i = 0; i < NS; i++) begin
      int stage, expn;
      sel = 5'(i);
      @(negedge clk);
      got[i] = int'(count);
      stage = BASE + ((13 * i) % SPREAD);
      expn  = WIN * 10_000 / (6 * stage) - 1;
      check(got[i] >= expn - 2 && got[i] <= expn + 2,
            $sformatf("sensor %0d: count %0d expected %0d", i, got[i], expn));
    end
    for (int i = 0; i < NS; i++)
      for (int j = 0; j < NS; j++)
        if (((13 * i) % SPREAD) + 2 < ((13 * j) % SPREAD))
          check(got[i] > got[j], $sformatf("sensor %0d faster than %0d", i, j));
    // registered multiplexer: the value changes one clock after sel
    sel = 5'd0;
    @(negedge clk);
    sel = 5'd5;
    #1ns;
    check(int'(count) == got[0], "mux output holds until the next clock");
    @(negedge clk);
    check(int'(count) == got[5], "mux output follows sel after one clock");
    sel = 5'd30;
    @(negedge clk);
    check(count == 0, "out-of-range address reads zero");
    // reset clears all
    sensor_rst = 1'b1;
    @(negedge clk); sensor_rst = 1'b0;
    for (int i = 0; i < NS; i++) begin
      sel = 5'(i);
      @(negedge clk);
      check(count == 0, $sformatf("sensor %0d cleared", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
