// tb_fir16: checks the 16-tap FIR against a reference computed in the
// testbench from the same coefficient list (direct convolution over the input
// history, shift by 11, saturation to 12 bits). Random samples, including
// full-scale ones that saturate, random gaps on the input and random
// backpressure on the output. Also checks the 3-clock latency with a free-running
// output, that `last` travels with its sample, and that nothing is lost or
// duplicated under backpressure.
`timescale 1ns / 1ps
module tb_fir16;
  localparam int unsigned TAPS = 16;
  localparam int C [TAPS] = '{-12, -20, 0, 60, 150, 260, 350, 400, 400, 350, 260, 150, 60, 0, -20, -12};

  logic clk = 1'b0, rst_n;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic [31:0] in_data, out_data;
  int checks = 0, failures = 0;
  int hist[$];           // input history, newest last
  int exp_q[$];          // expected outputs
  bit exp_last_q[$];
  int n_out = 0, n_stall = 0;
  int in_prob = 100, out_prob = 100;

  always #5ns clk = ~clk;

  fir16 dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .in_last,
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

  function automatic int ref_y();
    longint acc = 0;
    int n = hist.size();
    for (int k = 0; k < TAPS; k++)
      if (n - 1 - k >= 0) acc += longint'(C[k]) * longint'(hist[n - 1 - k]);
    acc = acc >>> 11;
    if (acc > 2047) acc = 2047;
    if (acc < -2048) acc = -2048;
    return int'(acc);
  endfunction

  // drive inputs on the falling edge
  int sample_no = 0;
  always @(negedge clk) begin
    if (!rst_n) begin
      in_valid <= 1'b0; in_data <= '0; in_last <= 1'b0; out_ready <= 1'b1;
    end else begin
      if (!in_valid || in_ready) begin
        int v;
        if (sample_no % 50 < 5) v = (sample_no % 2) ? 2047 : -2048;   // saturating bursts
        else                    v = int'($urandom_range(0, 4095)) - 2048;
        in_valid <= (int'($urandom_range(0, 99)) < in_prob);
        in_data  <= 32'(v);
        in_last  <= (sample_no % 16 == 15);
      end
      out_ready <= (int'($urandom_range(0, 99)) < out_prob);
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      hist.push_back(int'($signed(in_data[11:0])));
      exp_q.push_back(ref_y());
      exp_last_q.push_back(in_last);
      sample_no++;
    end
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      int e;
      bit el;
      e = exp_q.pop_front();
      el = exp_last_q.pop_front();
      check(int'($signed(out_data)) == e && out_last == el,
            $sformatf("output %0d: %0d last %0b, expected %0d last %0b", n_out, $signed(out_data), out_last, e, el));
      n_out++;
    end
  end

  initial begin
    int t_in, t_out;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // latency with no backpressure: one sample, then measure
    in_prob = 0;
    repeat (10) @(negedge clk);
    wait (n_out == 0);
    @(negedge clk);
    force in_valid = 1'b1;
    @(posedge clk); t_in = int'($time / 10ns);
    @(negedge clk);
    release in_valid;
    while (!out_valid) @(posedge clk);
    t_out = int'($time / 10ns);
    check(t_out - t_in == 3, $sformatf("latency %0d clocks, expected 3", t_out - t_in));
    // random traffic
    in_prob = 80; out_prob = 60;
    repeat (3000) @(negedge clk);
    in_prob = 100; out_prob = 100;
    repeat (500) @(negedge clk);
    in_prob = 0;
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d results missing", exp_q.size()));
    check(n_stall > 0, "backpressure exercised");
    check(n_out > 2000, $sformatf("%0d results", n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
