// tb_ro_sensor: checks one sensor. The testbench counts the rising edges of the
// sensor's RO clock by itself and compares the sensor's count (edges - 1) after
// each window; it also checks that the count is zero after reset, that the
// activation register ignores `activate` while `enable` is low, that a second
// window without reset accumulates, and that the count is consistent with the
// stage delay (window / (6 * STAGE_PS)).
`timescale 1ns / 1ps
module tb_ro_sensor;
  localparam int unsigned STAGE_PS = 400;

  logic        clk = 1'b0;
  logic        rst_n, sensor_rst, activate, enable;
  logic [15:0] count;
  int          checks = 0, failures = 0;
  int          edges;

  always #5ns clk = ~clk;

  ro_sensor #(.CNT_W(16), .STAGE_PS(STAGE_PS)) dut (
    .sys_clk(clk), .sys_rst_n(rst_n), .sensor_rst, .activate, .enable, .count
  );

  always @(posedge dut.ro_clk) edges++;

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

  task automatic window(input int cycles);
    @(negedge clk); activate = 1'b1; enable = 1'b1;
    @(negedge clk); enable = 1'b0;
    repeat (cycles) @(negedge clk);
    activate = 1'b0; enable = 1'b1;
    @(negedge clk); enable = 1'b0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    int exp_n;
    // sensor_rst starts low so that its rising edge clears the counters
    rst_n = 1'b0; sensor_rst = 1'b0; activate = 1'b0; enable = 1'b0; edges = 0;
    @(negedge clk); sensor_rst = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); sensor_rst = 1'b0;
    @(negedge clk);
    check(count == 0, "count must be zero after reset");

    // activate with enable low: nothing must happen
    activate = 1'b1;
    repeat (20) @(negedge clk);
    check(edges == 0 && count == 0, "activate ignored while enable is low");
    activate = 1'b0;

    // window of 1000 system clocks = 10 us
    edges = 0;
    window(1000);
    check(32'(count) == edges - 1, $sformatf("count %0d, edges %0d", count, edges));
    exp_n = 1001 * 10_000 / (6 * STAGE_PS);  // act_q is high for 1001 clocks
    check(edges >= exp_n - 2 && edges <= exp_n + 2, $sformatf("edges %0d, expected %0d", edges, exp_n));

    // second window accumulates without reset
    window(500);
    check(32'(count) == edges - 1, $sformatf("accumulated count %0d, edges %0d", count, edges));

    // reset clears
    @(negedge clk); sensor_rst = 1'b1;
    @(negedge clk); sensor_rst = 1'b0;
    check(count == 0, "sensor reset clears count");

    // random short windows
    for (int r = 0; r < 5; r++) begin
      int len;
      len = 50 + int'($urandom_range(0, 400));
      edges = 0;
      @(negedge clk); sensor_rst = 1'b1;
      @(negedge clk); sensor_rst = 1'b0;
      window(len);
      check(32'(count) == edges - 1, $sformatf("window %0d: count %0d, edges %0d", len, count, edges));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
