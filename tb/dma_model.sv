// dma_model: stands in for the DMA engine and external memory in the
// testbenches. `run(vec, n_res, res)` streams the words of `vec` to the
// design (tlast on the final word) with random idle cycles, while collecting
// `n_res` result words from the design with a random tready; it returns when
// all results have arrived. `src_prob`/`snk_prob` set the percentage of cycles
// with tvalid/tready offered. It counts the cycles in which the design pushed
// back on the input (tvalid && !tready) and in which it offered a result the
// model did not take (tvalid && !tready). All signals change on falling edges.
`timescale 1ns / 1ps
module dma_model (
  input  logic        clk,
  output logic [31:0] s_tdata,
  output logic        s_tvalid,
  input  logic        s_tready,
  output logic        s_tlast,
  input  logic [31:0] m_tdata,
  input  logic        m_tvalid,
  output logic        m_tready,
  input  logic        m_tlast
);

  int src_prob = 80;
  int snk_prob = 60;
  int n_in_backpressure  = 0;
  int n_out_backpressure = 0;
  int n_last_seen = 0;

  initial begin
    s_tdata = '0; s_tvalid = 1'b0; s_tlast = 1'b0; m_tready = 1'b0;
  end

  task automatic run(input logic [31:0] vec[$], input int n_res, output logic [31:0] res[$],
                     input int max_cycles = 1000000);
    int sent = 0;
    int cycles = 0;
    res = {};
    while ((sent < vec.size() || res.size() < n_res) && cycles < max_cycles) begin
      bit take_in, take_out;
      logic [31:0] d;
      logic l;
      @(negedge clk);
      cycles++;
      if (!s_tvalid && sent < vec.size() && int'($urandom_range(0, 99)) < src_prob) begin
        s_tvalid = 1'b1;
        s_tdata  = vec[sent];
        s_tlast  = (sent == vec.size() - 1);
      end
      m_tready = (res.size() < n_res) && (int'($urandom_range(0, 99)) < snk_prob);
      #1ps;
      // the handshakes of the coming rising edge are decided now
      take_in  = s_tvalid && s_tready;
      take_out = m_tvalid && m_tready;
      if (s_tvalid && !s_tready) n_in_backpressure++;
      if (m_tvalid && !m_tready) n_out_backpressure++;
      d = m_tdata;
      l = m_tlast;
      @(posedge clk);
      if (take_out) begin
        res.push_back(d);
        if (l) n_last_seen++;
      end
      if (take_in) begin
        sent++;
        @(negedge clk);
        s_tvalid = 1'b0;
        m_tready = m_tready && (res.size() < n_res);
        #1ps;
        // no new word in this cycle: only the result side can move
        take_out = m_tvalid && m_tready;
        d = m_tdata;
        l = m_tlast;
        @(posedge clk);
        if (take_out) begin
          res.push_back(d);
          if (l) n_last_seen++;
        end
      end
    end
    @(negedge clk);
    s_tvalid = 1'b0;
    m_tready = 1'b0;
  endtask

endmodule
