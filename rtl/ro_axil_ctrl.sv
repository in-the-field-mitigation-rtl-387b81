// ro_axil_ctrl: AXI-lite slave through which the processor drives the sensing
// network.
//
// The processor runs a measurement with 32-bit register writes and reads:
//   CTRL  (0x00, R/W): bit 0 resets all sensors, bit 1 is the activation level,
//                      bit 2 is the clock enable of the sensors' input register.
//   SEL   (0x04, R/W): multiplexer address, the sensor to read.
//   DATA  (0x08, R)  : 16-bit count of the selected sensor (zero-extended).
//   NSENS (0x0C, R)  : number of sensors in the network.
// A typical measurement writes CTRL=1 (reset), CTRL=6 (activate with enable),
// waits the window T on the processor's timer, writes CTRL=4 (deactivate), then
// for each sensor writes SEL and reads DATA.
//
// Handshake: a write is taken when AWVALID and WVALID are both high and no
// response is pending (AWREADY = WREADY, one beat), and answered with BVALID
// on the next clock. A read is taken when ARVALID is high and no read data is
// pending, and RVALID rises the next clock. All responses are OKAY; unused
// addresses read zero and ignore writes. WSTRB is honoured per byte lane.
// That the processor talks to the network over AXI-lite with 32-bit commands and
// selects the sensor by a multiplexer address follows the document; the register
// layout is this design's own.
`timescale 1ns / 1ps
module ro_axil_ctrl
  import vm_pkg::*;
#(
  parameter int unsigned N_SENSORS = 408,
  parameter int unsigned CNT_W     = 16,
  localparam int unsigned SEL_W = (N_SENSORS > 1) ? $clog2(N_SENSORS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  axil_req_t        axil_req,
  output axil_rsp_t        axil_rsp,
  // toward the RO network
  output logic             sensor_rst,
  output logic             activate,
  output logic             enable,
  output logic [SEL_W-1:0] sel,
  input  logic [CNT_W-1:0] count
);

  logic [2:0]         ctrl_q;
  logic [31:0]        sel_q;
  logic               bvalid_q, rvalid_q;
  logic [AXIL_DW-1:0] rdata_q;
  logic               wr_go, rd_go;

  assign wr_go = axil_req.awvalid && axil_req.wvalid && !bvalid_q;
  assign rd_go = axil_req.arvalid && !rvalid_q;

  function automatic logic [31:0] merge(input logic [31:0] old_v, input logic [31:0] new_v,
                                        input logic [3:0] strb);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = strb[b] ? new_v[8*b +: 8] : old_v[8*b +: 8];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q   <= '0;
      sel_q    <= '0;
      bvalid_q <= 1'b0;
    end else begin
      if (wr_go) begin
        unique case (axil_req.awaddr)
          RO_REG_CTRL: ctrl_q <= merge(32'(ctrl_q), axil_req.wdata, axil_req.wstrb)[2:0];
          RO_REG_SEL:  sel_q  <= merge(sel_q, axil_req.wdata, axil_req.wstrb);
          default: ;
        endcase
        bvalid_q <= 1'b1;
      end else if (axil_req.bready) begin
        bvalid_q <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      if (rd_go) begin
        unique case (axil_req.araddr)
          RO_REG_CTRL:  rdata_q <= 32'(ctrl_q);
          RO_REG_SEL:   rdata_q <= sel_q;
          RO_REG_DATA:  rdata_q <= 32'(count);
          RO_REG_NSENS: rdata_q <= 32'(N_SENSORS);
          default:      rdata_q <= '0;
        endcase
        rvalid_q <= 1'b1;
      end else if (axil_req.rready) begin
        rvalid_q <= 1'b0;
      end
    end
  end

  always_comb begin
    axil_rsp         = '0;
    axil_rsp.awready = wr_go;
    axil_rsp.wready  = wr_go;
    axil_rsp.bvalid  = bvalid_q;
    axil_rsp.bresp   = 2'b00;
    axil_rsp.arready = rd_go;
    axil_rsp.rvalid  = rvalid_q;
    axil_rsp.rdata   = rdata_q;
    axil_rsp.rresp   = 2'b00;
  end

  assign sensor_rst = ctrl_q[0];
  assign activate   = ctrl_q[1];
  assign enable     = ctrl_q[2];
  assign sel        = sel_q[SEL_W-1:0];

  // AXI rule: a master keeps VALID and its payload until the slave is ready.
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    axil_req.arvalid && !axil_rsp.arready |=> axil_req.arvalid && $stable(axil_req.araddr));
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    axil_req.awvalid && !axil_rsp.awready |=> axil_req.awvalid && $stable(axil_req.awaddr));

endmodule
