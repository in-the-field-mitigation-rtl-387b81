// vm_pkg: types and constants shared by the variability-mitigation fabric logic.
//
// Holds the AXI-lite request/response bundles used by the sensing-network
// controller and the clock-manager configuration port, the AXI-stream beat
// carried through the dual-clock FIFOs, and the register map of the sensing
// network. The 16-bit sensor count and the 408-sensor network of the Zynq
// XC7Z020T follow the document; the register addresses, the 32-bit stream beat
// and the benchmark selector encoding are this design's own choices.
`timescale 1ns / 1ps
package vm_pkg;

  localparam int unsigned AXIL_AW = 8;   // AXI-lite address bits used
  localparam int unsigned AXIL_DW = 32;  // 32-bit commands (Section 3.2)

  localparam int unsigned RO_CNT_W   = 16;   // sensor up-counter width
  localparam int unsigned N_SENS_Z20 = 408;  // sensors on the XC7Z020T map

  // Sensing-network register map (byte addresses)
  localparam logic [AXIL_AW-1:0] RO_REG_CTRL  = 8'h00;  // [0] reset [1] activate [2] enable
  localparam logic [AXIL_AW-1:0] RO_REG_SEL   = 8'h04;  // multiplexer address
  localparam logic [AXIL_AW-1:0] RO_REG_DATA  = 8'h08;  // count of the selected sensor
  localparam logic [AXIL_AW-1:0] RO_REG_NSENS = 8'h0C;  // number of sensors (read-only)

  // Clock-manager register map
  localparam logic [AXIL_AW-1:0] PLL_REG_FREQ   = 8'h00;  // target frequency, MHz
  localparam logic [AXIL_AW-1:0] PLL_REG_STATUS = 8'h04;  // [0] locked

  typedef struct packed {
    logic [AXIL_AW-1:0]   awaddr;
    logic                 awvalid;
    logic [AXIL_DW-1:0]   wdata;
    logic [AXIL_DW/8-1:0] wstrb;
    logic                 wvalid;
    logic                 bready;
    logic [AXIL_AW-1:0]   araddr;
    logic                 arvalid;
    logic                 rready;
  } axil_req_t;

  typedef struct packed {
    logic               awready;
    logic               wready;
    logic [1:0]         bresp;
    logic               bvalid;
    logic               arready;
    logic [AXIL_DW-1:0] rdata;
    logic [1:0]         rresp;
    logic               rvalid;
  } axil_rsp_t;

  // One AXI-stream beat: 32 data bits and the end-of-packet marker.
  typedef struct packed {
    logic        last;
    logic [31:0] data;
  } axis_beat_t;

  localparam int unsigned AXIS_BEAT_W = $bits(axis_beat_t);

  typedef enum logic [0:0] {
    BENCH_FIR = 1'b0,
    BENCH_FFT = 1'b1
  } bench_e;

endpackage
