// tb_ro_axil_ctrl: checks the sensing-network register file on its own. The
// sensor count input is driven by the testbench. Checks: reset values, the
// reset/activate/enable outputs after CTRL writes, byte strobes, the sensor
// address after SEL writes, DATA returning the count input, NSENS, unused
// addresses reading zero, and one-cycle response latency.
`timescale 1ns / 1ps
module tb_ro_axil_ctrl;
  import vm_pkg::*;
  localparam int unsigned NS = 408;

  logic clk = 1'b0, rst_n;
  axil_req_t req;
  axil_rsp_t rsp;
  logic sensor_rst, activate, enable;
  logic [8:0] sel;
  logic [15:0] count;
  int checks = 0, failures = 0;

  always #5ns clk = ~clk;

  ro_axil_ctrl #(.N_SENSORS(NS), .CNT_W(16)) dut (
    .clk, .rst_n, .axil_req(req), .axil_rsp(rsp), .sensor_rst, .activate, .enable, .sel, .count
  );
  axil_bfm bfm (.clk, .req, .rsp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    rst_n = 1'b0; count = 16'h0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check({sensor_rst, activate, enable} == 3'b000 && sel == 0, "reset values");

    bfm.write(RO_REG_CTRL, 32'h1);
    check(sensor_rst && !activate && !enable, "CTRL=1 -> reset");
    bfm.write(RO_REG_CTRL, 32'h6);
    check(!sensor_rst && activate && enable, "CTRL=6 -> activate+enable");
    bfm.write(RO_REG_CTRL, 32'h4);
    check(!sensor_rst && !activate && enable, "CTRL=4 -> deactivate");
    bfm.write(RO_REG_CTRL, 32'h3, 4'h0);
    check(!sensor_rst && !activate && enable, "CTRL write with no strobes ignored");
    bfm.read(RO_REG_CTRL, d);
    check(d == 32'h4, $sformatf("CTRL read %h", d));
    bfm.read(RO_REG_NSENS, d);
    check(d == NS, $sformatf("NSENS read %0d", d));
    bfm.read(8'h40, d);
    check(d == 0, "unused address reads zero");

    for (int i = 0; i < 40; i++) begin
      logic [8:0] a;
      logic [15:0] c;
      a = 9'($urandom_range(0, NS - 1));
      c = 16'($urandom);
      bfm.write(RO_REG_SEL, 32'(a));
      check(sel == a, $sformatf("sel %0d expected %0d", sel, a));
      count = c;
      bfm.read(RO_REG_DATA, d);
      check(d == 32'(c), $sformatf("DATA %h expected %h", d, c));
    end

    // byte strobe on SEL: only the low byte changes
    bfm.write(RO_REG_SEL, 32'h0000_0155);
    bfm.write(RO_REG_SEL, 32'h0000_00AA, 4'b0001);
    bfm.read(RO_REG_SEL, d);
    check(d == 32'h0000_01AA, $sformatf("SEL after strobed write %h", d));

    // read latency: RVALID one clock after the address is taken
    @(negedge clk);
    req.araddr = RO_REG_NSENS; req.arvalid = 1'b1; req.rready = 1'b1;
    #1ns;
    check(rsp.arready, "ARREADY in the first cycle");
    @(negedge clk); req.arvalid = 1'b0;
    check(rsp.rvalid, "RVALID one clock after the address");
    @(negedge clk); req.rready = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
