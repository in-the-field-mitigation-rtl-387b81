// sensing_system: fabric side of the variability-map system.
//
// The processor reaches the network through one AXI-lite port (ro_axil_ctrl);
// the controller drives the shared reset, activate and enable lines of all
// sensors and the address of the read-out multiplexer of ro_network, and
// returns the selected sensor's count on reads of DATA. A complete map is one
// reset, one activation window T and N_SENSORS select/read pairs. Everything
// runs on the system clock except the sensors' own RO clock domains. The split
// into an embedded processor and a network of sensors follows the document; the
// register map is this design's.
`timescale 1ns / 1ps
module sensing_system
  import vm_pkg::*;
#(
  parameter int unsigned N_SENSORS     = 408,
  parameter int unsigned CNT_W         = 16,
  parameter int unsigned BASE_STAGE_PS = 385,
  parameter int unsigned SPREAD_PS     = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t axil_req,
  output axil_rsp_t axil_rsp
);

  localparam int unsigned SEL_W = (N_SENSORS > 1) ? $clog2(N_SENSORS) : 1;

  logic             sensor_rst, activate, enable;
  logic [SEL_W-1:0] sel;
  logic [CNT_W-1:0] count;

  ro_axil_ctrl #(.N_SENSORS(N_SENSORS), .CNT_W(CNT_W)) u_ctrl (
    .clk, .rst_n, .axil_req, .axil_rsp,
    .sensor_rst, .activate, .enable, .sel, .count
  );

  ro_network #(
    .N_SENSORS(N_SENSORS), .CNT_W(CNT_W),
    .BASE_STAGE_PS(BASE_STAGE_PS), .SPREAD_PS(SPREAD_PS)
  ) u_net (
    .sys_clk(clk), .sys_rst_n(rst_n),
    .sensor_rst, .activate, .enable, .sel, .count
  );

endmodule
