// tb_ro_ring: checks the ring-oscillator model. With STAGE_PS = 417 the period
// must be 6 * 417 ps; the number of rising edges in a 10 us window must match
// window / period within one edge; the clock must be idle and low whenever the
// ring is not activated, and restart on a second activation.
`timescale 1ns / 1ps
module tb_ro_ring;
  localparam int unsigned STAGE_PS = 417;

  logic activate;
  logic ro_clk;
  int   checks = 0, failures = 0;
  int   edges;
  realtime t_prev, t_now;

  ro_ring #(.STAGE_PS(STAGE_PS)) dut (.activate(activate), .ro_clk(ro_clk));

  always @(posedge ro_clk) edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_edges;
    activate = 1'b0;
    edges = 0;
    #100ns;
    check(edges == 0 && ro_clk == 1'b0, "idle ring must not oscillate");
    // measure one period
    activate = 1'b1;
    @(posedge ro_clk); t_prev = $realtime;
    @(posedge ro_clk); t_now = $realtime;
    check((t_now - t_prev) > 2.500ns && (t_now - t_prev) < 2.504ns,
          $sformatf("period %0t expected 2.502 ns", t_now - t_prev));
    activate = 1'b0;
    #50ns;
    // count edges in a 10 us window
    for (int run = 0; run < 2; run++) begin
      edges = 0;
      activate = 1'b1;
      #10us;
      activate = 1'b0;
      #20ns;
      exp_edges = 10_000_000 / (6 * STAGE_PS);
      check(edges >= exp_edges - 1 && edges <= exp_edges + 1,
            $sformatf("run %0d: %0d edges, expected %0d", run, edges, exp_edges));
      check(ro_clk == 1'b0, "ring must stop low");
      edges = 0;
      #500ns;
      check(edges == 0, "no edges after deactivation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
