// tb_async_fifo: checks the dual-clock FIFO with unrelated clocks (10 ns write,
// 7.3 ns read, then the other way round) and random push/pop. Every word read
// is compared with a reference queue; the FIFO must become full and empty at
// least once, never accept a write while full, and report full only when it
// holds DEPTH words (never early by more than the synchronizer delay).
`timescale 1ns / 1ps
module tb_async_fifo;
  localparam int unsigned W = 33, D = 16;

  logic wclk = 1'b0, rclk = 1'b0, rst_n;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wr_data, rd_data;
  realtime wper = 10ns, rper = 7.3ns;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty_wait = 0, n_written = 0, n_read = 0;
  logic [W-1:0] q[$];
  int wprob = 70, rprob = 50;
  bit done = 0;

  always #(wper / 2) wclk = ~wclk;
  always #(rper / 2) rclk = ~rclk;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .wr_clk(wclk), .wr_rst_n(rst_n), .wr_en, .wr_data, .full,
    .rd_clk(rclk), .rd_rst_n(rst_n), .rd_en, .rd_data, .empty
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  always @(negedge wclk) begin
    if (!rst_n || done) begin
      wr_en <= 1'b0;
    end else begin
      wr_en   <= (int'($urandom_range(0, 99)) < wprob);
      wr_data <= {$urandom, $urandom}[W-1:0];
    end
  end
  always @(posedge wclk) if (rst_n) begin
    if (full) n_full++;
    if (wr_en && !full) begin q.push_back(wr_data); n_written++; end
  end

  // reader
  always @(negedge rclk) begin
    if (!rst_n) rd_en <= 1'b0;
    else        rd_en <= (int'($urandom_range(0, 99)) < rprob);
  end
  always @(posedge rclk) if (rst_n) begin
    if (empty && rd_en) n_empty_wait++;
    if (rd_en && !empty) begin
      logic [W-1:0] exp_v;
      if (q.size() == 0) begin
        failures++; checks++;
        $display("FAIL: read from a FIFO the reference says is empty");
      end else begin
        exp_v = q.pop_front();
        checks++;
        if (rd_data !== exp_v) begin
          failures++;
          $display("FAIL: read %h expected %h", rd_data, exp_v);
        end
      end
      n_read++;
    end
  end

  // full is raised exactly when D words are held, as seen by the writer
  always @(posedge wclk) if (rst_n && full) begin
    checks++;
    if (q.size() < D - 3) begin
      failures++;
      $display("FAIL: full with only %0d words", q.size());
    end
  end

  initial begin
    rst_n = 1'b0;
    repeat (4) @(posedge wclk);
    rst_n = 1'b1;
    // phase 1: fast writer, slow reader -> fills
    wprob = 90; rprob = 30;
    repeat (3000) @(posedge wclk);
    // phase 2: slow writer, fast reader -> drains
    wprob = 20; rprob = 90;
    repeat (3000) @(posedge wclk);
    // phase 3: swap clock speeds, balanced
    wper = 6.1ns; rper = 11.7ns; wprob = 60; rprob = 80;
    repeat (4000) @(posedge wclk);
    done = 1;
    rprob = 100;
    repeat (200) @(posedge rclk);
    check(n_full > 0, "FIFO became full");
    check(n_empty_wait > 0, "FIFO ran empty");
    check(q.size() == 0 && empty, $sformatf("drained: %0d words left", q.size()));
    check(n_read > 1000, $sformatf("%0d words moved", n_read));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
