// axil_bfm: AXI-lite master used by the testbenches in place of the processor.
// `write(addr, data)` issues one write (address and data together, all byte
// strobes unless `strb` is given) and waits for the response; `read(addr, data)`
// issues one read and returns the data. Signals change on the falling edge of
// `clk` and are sampled by the slave on the rising edge. `n_writes`/`n_reads`
// count completed transfers.
`timescale 1ns / 1ps
module axil_bfm
  import vm_pkg::*;
(
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);

  int n_writes = 0;
  int n_reads  = 0;

  initial req = '0;

  task automatic write(input logic [7:0] addr, input logic [31:0] data, input logic [3:0] strb = 4'hF);
    @(negedge clk);
    req.awaddr  = addr;
    req.awvalid = 1'b1;
    req.wdata   = data;
    req.wstrb   = strb;
    req.wvalid  = 1'b1;
    req.bready  = 1'b1;
    do @(posedge clk); while (!rsp.awready);
    @(negedge clk);
    req.awvalid = 1'b0;
    req.wvalid  = 1'b0;
    while (!rsp.bvalid) @(negedge clk);
    @(negedge clk);
    req.bready = 1'b0;
    n_writes++;
  endtask

  task automatic read(input logic [7:0] addr, output logic [31:0] data);
    @(negedge clk);
    req.araddr  = addr;
    req.arvalid = 1'b1;
    req.rready  = 1'b1;
    do @(posedge clk); while (!rsp.arready);
    @(negedge clk);
    req.arvalid = 1'b0;
    while (!rsp.rvalid) @(negedge clk);
    data = rsp.rdata;
    @(negedge clk);
    req.rready = 1'b0;
    n_reads++;
  endtask

endmodule
