// ro_network: the sensing network, N identical RO sensors and their read-out
// multiplexer.
//
// N_SENSORS copies of ro_sensor are meant to be placed uniformly over the fabric,
// one per map cell. All of them share the reset, activate and enable commands,
// so they measure over the same window T. A large multiplexer, addressed by
// `sel`, forwards the count of one sensor; its output is registered on the
// system clock, so `count` shows the sensor chosen by `sel` one clock later.
// An address at or beyond N_SENSORS reads zero.
//
// Sensor i gets the stage delay BASE_STAGE_PS + (13*i mod SPREAD_PS). The delay
// only matters in simulation, where it stands for the process variation that
// the network exists to measure (defaults give 400..433 MHz rings); placement
// and routing fix it on silicon. The 408-sensor default is the XC7Z020T network;
// the delay pattern and the registered multiplexer are this design's choices.
`timescale 1ns / 1ps
module ro_network #(
  parameter int unsigned N_SENSORS     = 408,
  parameter int unsigned CNT_W         = 16,
  parameter int unsigned BASE_STAGE_PS = 385,
  parameter int unsigned SPREAD_PS     = 32,
  localparam int unsigned SEL_W = (N_SENSORS > 1) ? $clog2(N_SENSORS) : 1
) (
  input  logic             sys_clk,
  input  logic             sys_rst_n,
  input  logic             sensor_rst,
  input  logic             activate,
  input  logic             enable,
  input  logic [SEL_W-1:0] sel,
  output logic [CNT_W-1:0] count
);

  logic [CNT_W-1:0] counts [N_SENSORS];

  for (genvar i = 0; i < N_SENSORS; i++) begin : g_sensor
    ro_sensor #(
      .CNT_W   (CNT_W),
      .STAGE_PS(BASE_STAGE_PS + ((13 * i) % SPREAD_PS))
    ) u_sensor (
      .sys_clk   (sys_clk),
      .sys_rst_n (sys_rst_n),
      .sensor_rst(sensor_rst),
      .activate  (activate),
      .enable    (enable),
      .count     (counts[i])
    );
  end

  // Read-out multiplexer, registered in the system clock domain
  always_ff @(posedge sys_clk or negedge sys_rst_n) begin
    if (!sys_rst_n)                   count <= '0;
    else if (32'(sel) < N_SENSORS)    count <= counts[sel];
    else                              count <= '0;
  end

endmodule
