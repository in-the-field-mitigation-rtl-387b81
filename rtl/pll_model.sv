// pll_model: behavioural model of the clock manager (PLL) that clocks the
// benchmark and that the processor retunes at run time.
//
// This is a behavioural model: the real part is the FPGA's analog clock
// manager. Its configuration port is an AXI-lite slave on the reference clock
// (the 100 MHz DMA/PLL domain):
//   FREQ   (0x00, R/W): output frequency in MHz. A write starts a
//                       reconfiguration: `locked` falls, the output clock stops
//                       low, and after RECONF_CYCLES reference clocks (30 us at
//                       100 MHz) the clock restarts at the new frequency and
//                       `locked` rises.
//   STATUS (0x04, R)  : bit 0 = locked; bits 31:16 = frequency in effect.
// After reset the model locks to F_INIT_MHZ in the same RECONF_CYCLES. The
// register logic and the lock timer are synchronous logic; only the generation
// of `clk_out` uses delays, half a period of round(500000 / f) picoseconds.
// The 30 us reconfiguration time and run-time retuning over AXI-lite follow the
// document; the register map and the start-up behaviour are this model's own.
`timescale 1ns / 1ps
module pll_model
  import vm_pkg::*;
#(
  parameter int unsigned F_INIT_MHZ    = 140,
  parameter int unsigned RECONF_CYCLES = 3000
) (
  input  logic      ref_clk,
  input  logic      rst_n,
  input  axil_req_t axil_req,
  output axil_rsp_t axil_rsp,
  output logic      clk_out,
  output logic      locked
);

  logic [15:0] freq_req_q;   // last frequency written
  logic [15:0] freq_act_q;   // frequency in effect
  logic [31:0] lock_cnt_q;
  logic        bvalid_q, rvalid_q;
  logic [31:0] rdata_q;
  logic        wr_go, rd_go, start_reconf;

  assign wr_go = axil_req.awvalid && axil_req.wvalid && !bvalid_q;
  assign rd_go = axil_req.arvalid && !rvalid_q;
  assign start_reconf = wr_go && (axil_req.awaddr == PLL_REG_FREQ);

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      freq_req_q <= 16'(F_INIT_MHZ);
      freq_act_q <= 16'(F_INIT_MHZ);
      lock_cnt_q <= RECONF_CYCLES;
      locked     <= 1'b0;
      bvalid_q   <= 1'b0;
    end else begin
      if (start_reconf) begin
        freq_req_q <= axil_req.wdata[15:0];
        lock_cnt_q <= RECONF_CYCLES;
        locked     <= 1'b0;
      end else if (lock_cnt_q != 0) begin
        lock_cnt_q <= lock_cnt_q - 1;
        if (lock_cnt_q == 1) begin
          locked     <= (freq_req_q != 0);
          freq_act_q <= freq_req_q;
        end
      end
      if (wr_go)                 bvalid_q <= 1'b1;
      else if (axil_req.bready)  bvalid_q <= 1'b0;
    end
  end

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else if (rd_go) begin
      unique case (axil_req.araddr)
        PLL_REG_FREQ:   rdata_q <= 32'(freq_req_q);
        PLL_REG_STATUS: rdata_q <= {freq_act_q, 15'b0, locked};
        default:        rdata_q <= '0;
      endcase
      rvalid_q <= 1'b1;
    end else if (axil_req.rready) begin
      rvalid_q <= 1'b0;
    end
  end

  always_comb begin
    axil_rsp         = '0;
    axil_rsp.awready = wr_go;
    axil_rsp.wready  = wr_go;
    axil_rsp.bvalid  = bvalid_q;
    axil_rsp.arready = rd_go;
    axil_rsp.rvalid  = rvalid_q;
    axil_rsp.rdata   = rdata_q;
  end

  // Output clock: runs only while locked
  int unsigned half_ps;
  assign half_ps = (freq_act_q == 0) ? 32'd1000 : (32'd500000 + {16'b0, freq_act_q} / 2) / {16'b0, freq_act_q};

  initial clk_out = 1'b0;
  always begin
    if (!locked) begin
      clk_out = 1'b0;
      wait (locked);
    end else begin
      #(half_ps * 1ps);
      clk_out = locked ? ~clk_out : 1'b0;
    end
  end

endmodule
