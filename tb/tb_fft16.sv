// tb_fft16: checks the 16-point FFT against a floating-point DFT computed in
// the testbench: X[k] = (1/16) * sum_n x[n] * exp(-j*2*pi*n*k/16). Each output
// component must be within 4 LSB of the reference (the fixed-point design
// rounds in each of its 4 stages and its unit twiddle is 2047/2048). Inputs are random complex 12-bit samples,
// plus a full-scale impulse, a constant and a single tone. Also checks the
// 32-clock latency from the 16th sample to the first result, `last` on the
// 16th result, and backpressure on the output.
`timescale 1ns / 1ps
module tb_fft16;
  logic clk = 1'b0, rst_n;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic [31:0] in_data, out_data;
  int checks = 0, failures = 0;
  int max_err = 0;

  always #5ns clk = ~clk;

  fft16 dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .in_last,
             .out_valid, .out_ready, .out_data, .out_last);

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

  task automatic run_block(input int xr[16], input int xi[16], input bit stall_out);
    real er[16], ei[16];
    int t_last, t_first;
    const real PI = 3.14159265358979;
    for (int k = 0; k < 16; k++) begin
      er[k] = 0.0; ei[k] = 0.0;
      for (int n = 0; n < 16; n++) begin
        real a;
        a = -2.0 * PI * real'(n * k) / 16.0;
        er[k] += real'(xr[n]) * $cos(a) - real'(xi[n]) * $sin(a);
        ei[k] += real'(xr[n]) * $sin(a) + real'(xi[n]) * $cos(a);
      end
      er[k] /= 16.0; ei[k] /= 16.0;
    end
    @(negedge clk);
    out_ready = 1'b0;
    for (int n = 0; n < 16; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = {16'(xi[n]), 16'(xr[n])};
      in_last  = (n == 15);
      while (!in_ready) @(negedge clk);
      @(posedge clk);                    // sample taken on this edge
    end
    t_last = int'($time / 1ns);
    @(negedge clk);
    in_valid = 1'b0;
    while (!out_valid) @(negedge clk);
    t_first = int'($time / 1ns) - 5;    // the edge before this falling edge
    check((t_first - t_last) / 10 == 32, $sformatf("latency %0d clocks, expected 32", (t_first - t_last) / 10));
    for (int k = 0; k < 16; k++) begin
      int gr, gi, e;
      if (k > 0) @(negedge clk);
      out_ready = stall_out ? ($urandom_range(0, 1) == 1) : 1'b1;
      while (!out_ready) begin
        @(negedge clk); out_ready = 1'b1;
      end
      // the result is taken at the next rising edge; sample it now
      gr = int'($signed(out_data[15:0]));
      gi = int'($signed(out_data[31:16]));
      e = $rtoi((gr > er[k] ? gr - er[k] : er[k] - gr) + 0.5);
      if ($rtoi((gi > ei[k] ? gi - ei[k] : ei[k] - gi) + 0.5) > e)
        e = $rtoi((gi > ei[k] ? gi - ei[k] : ei[k] - gi) + 0.5);
      if (e > max_err) max_err = e;
      check(e <= 4, $sformatf("bin %0d: got (%0d,%0d) expected (%f,%f)", k, gr, gi, er[k], ei[k]));
      check(out_valid && out_last == (k == 15), $sformatf("valid/last on bin %0d", k));
      @(posedge clk);
    end
  endtask

  initial begin
    int xr[16], xi[16];
    rst_n = 1'b0; in_valid = 1'b0; in_data = '0; in_last = 1'b0; out_ready = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // impulse
    foreach (xr[n]) begin xr[n] = (n == 0) ? 2047 : 0; xi[n] = 0; end
    run_block(xr, xi, 0);
    // constant
    foreach (xr[n]) begin xr[n] = -2048; xi[n] = 1000; end
    run_block(xr, xi, 0);
    // tone at bin 3
    foreach (xr[n]) begin
      xr[n] = $rtoi(2000.0 * $cos(2.0 * 3.14159265358979 * 3.0 * n / 16.0));
      xi[n] = $rtoi(2000.0 * $sin(2.0 * 3.14159265358979 * 3.0 * n / 16.0));
    end
    run_block(xr, xi, 1);
    // random blocks
    for (int b = 0; b < 30; b++) begin
      foreach (xr[n]) begin
        xr[n] = int'($urandom_range(0, 4095)) - 2048;
        xi[n] = int'($urandom_range(0, 4095)) - 2048;
      end
      run_block(xr, xi, b % 2 == 1);
    end
    $display("largest error %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
