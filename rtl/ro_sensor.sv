// ro_sensor: one ring-oscillator speed sensor.
//
// The sensor measures the local speed of the fabric by counting the cycles of
// its own ring oscillator during a measurement window T set by the processor.
//   * A 1-bit input register, clocked by the system clock, takes `activate` when
//     `enable` (its clock enable) is high. Its output starts and stops the ring.
//   * The ring oscillator (ro_ring) produces the RO clock.
//   * A CNT_W-bit up-counter runs on the RO clock and counts its rising edges.
//   * A CNT_W-bit output register, also on the RO clock, takes the counter value
//     on every RO edge, so it is stable once the ring has stopped.
// `sensor_rst` clears the counter and the output register asynchronously (the RO
// clock does not run while the sensors are being reset). After a window of n
// RO rising edges `count` holds n-1 (the output register lags the counter by one
// edge); the frequency is f_ro = count / T. The count wraps at 2^CNT_W.
// `count` belongs to the RO clock domain: read it only after the ring has stopped,
// when it is static. The 16-bit counter, the input register with its enable and
// the RO-clocked output register follow the sensor drawing; the asynchronous
// reset is this design's choice.
`timescale 1ns / 1ps
module ro_sensor #(
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned STAGE_PS = 417
) (
  input  logic             sys_clk,
  input  logic             sys_rst_n,
  input  logic             sensor_rst,
  input  logic             activate,
  input  logic             enable,
  output logic [CNT_W-1:0] count
);

  logic act_q;
  logic ro_clk;
  logic [CNT_W-1:0] cnt_q;

  // Input register: D = Activate, CE = Enable, clock = system clock
  always_ff @(posedge sys_clk or negedge sys_rst_n) begin
    if (!sys_rst_n)  act_q <= 1'b0;
    else if (enable) act_q <= activate;
  end

  ro_ring #(.STAGE_PS(STAGE_PS)) u_ring (
    .activate(act_q),
    .ro_clk  (ro_clk)
  );

  // Up-counter and output register in the RO clock domain
  always_ff @(posedge ro_clk or posedge sensor_rst) begin
    if (sensor_rst) begin
      cnt_q <= '0;
      count <= '0;
    end else begin
      cnt_q <= cnt_q + 1'b1;
      count <= cnt_q;
    end
  end

endmodule
