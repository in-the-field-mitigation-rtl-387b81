// fft16: 16-point FFT, the second benchmark design ("User IP").
//
// Radix-2 decimation-in-time FFT over a block of 16 complex samples, computed in
// place by a single butterfly unit. The block goes through three phases:
//   LOAD   : 16 samples are taken (in_ready high) and written at bit-reversed
//            addresses of a 16-entry register buffer.
//   COMPUTE: 4 stages of 8 butterflies, one butterfly per clock (32 clocks).
//            In stage s (span h = 2^s) butterfly b works on i = (b >> s)*2h +
//            (b mod h) and j = i + h with twiddle W16^k, k = (b mod h) * 8/h:
//              t = X[j]*W,  X[i] <= (X[i] + t) / 2,  X[j] <= (X[i] - t) / 2.
//            The halving in every stage keeps the values in range; the block
//            result is DFT(x)/16. Twiddle products and halvings are rounded
//            (half up), so each stage adds at most about half an LSB of error.
//   UNLOAD : the 16 results leave in natural order, the 16th with `last`.
// A block's first result is valid 32 clocks after its 16th sample was taken;
// out_ready stalls the unload. Samples and results are packed as {imag, real},
// 16 bits each, with DW significant bits (sign-extended). Twiddles are
// Q1.11: round(2047*cos(2*pi*k/16)) and round(-2047*sin(2*pi*k/16)), k = 0..7.
// The 16-point size and 10..13-bit accuracy follow the document; the
// architecture (radix-2 in place, one butterfly) and the per-stage scaling are
// this design's own.
`timescale 1ns / 1ps
module fft16 #(
  parameter int unsigned DW = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  input  logic        in_last,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic        out_last
);

  localparam int unsigned N  = 16;
  localparam int unsigned IW = 16;  // internal word width per component
  localparam int unsigned TW = 12;  // twiddle width, Q1.11

  typedef enum logic [1:0] {LOAD, COMPUTE, UNLOAD} phase_e;

  typedef struct packed {
    logic signed [IW-1:0] im;
    logic signed [IW-1:0] re;
  } cplx_t;

  // W16^k = cos - j sin, k = 0..7
  localparam logic signed [TW-1:0] TW_RE [8] = '{2047, 1891, 1447, 783, 0, -783, -1447, -1891};
  localparam logic signed [TW-1:0] TW_IM [8] = '{0, -783, -1447, -1891, -2047, -1891, -1447, -783};

  cplx_t       buf_q [N];
  phase_e      phase_q;
  logic [3:0]  idx_q;    // load / unload index
  logic [1:0]  stage_q;
  logic [2:0]  bfly_q;

  function automatic logic [3:0] bitrev4(input logic [3:0] a);
    return {a[0], a[1], a[2], a[3]};
  endfunction

  // Butterfly addressing
  logic [3:0] h, ia, ja;
  logic [2:0] tk;
  always_comb begin
    h  = 4'd1 << stage_q;
    ia = 4'(({1'b0, bfly_q} >> stage_q) << (3'(stage_q) + 3'd1)) | ({1'b0, bfly_q} & (h - 4'd1));
    ja = ia | h;
    tk = 3'((({1'b0, bfly_q} & (h - 4'd1)) << (2'd3 - stage_q)));
  end

  // Butterfly arithmetic
  logic signed [IW+TW-1:0] pr, pi;
  logic signed [IW:0]      tr, ti, sr, si, dr, di;
  cplx_t                   a, b, xi_n, xj_n;
  always_comb begin
    a  = buf_q[ia];
    b  = buf_q[ja];
    pr = (IW+TW)'(b.re) * (IW+TW)'(TW_RE[tk]) - (IW+TW)'(b.im) * (IW+TW)'(TW_IM[tk]);
    pi = (IW+TW)'(b.re) * (IW+TW)'(TW_IM[tk]) + (IW+TW)'(b.im) * (IW+TW)'(TW_RE[tk]);
    tr = (IW+1)'((pr + (IW+TW)'(1 << (TW - 2))) >>> (TW - 1));
    ti = (IW+1)'((pi + (IW+TW)'(1 << (TW - 2))) >>> (TW - 1));
    sr = (IW+1)'(a.re) + tr + 1'b1;
    si = (IW+1)'(a.im) + ti + 1'b1;
    dr = (IW+1)'(a.re) - tr + 1'b1;
    di = (IW+1)'(a.im) - ti + 1'b1;
    xi_n.re = sr[IW:1];
    xi_n.im = si[IW:1];
    xj_n.re = dr[IW:1];
    xj_n.im = di[IW:1];
  end

  logic take, give;
  assign in_ready  = (phase_q == LOAD);
  assign take      = in_valid && in_ready;
  assign out_valid = (phase_q == UNLOAD);
  assign give      = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= LOAD;
      idx_q   <= '0;
      stage_q <= '0;
      bfly_q  <= '0;
      for (int k = 0; k < N; k++) buf_q[k] <= '0;
    end else begin
      unique case (phase_q)
        LOAD: if (take) begin
          buf_q[bitrev4(idx_q)] <= '{im: IW'($signed(in_data[16 +: DW])),
                                     re: IW'($signed(in_data[0 +: DW]))};
          idx_q <= idx_q + 1'b1;
          if (idx_q == 4'(N - 1)) phase_q <= COMPUTE;
        end
        COMPUTE: begin
          buf_q[ia] <= xi_n;
          buf_q[ja] <= xj_n;
          bfly_q    <= bfly_q + 1'b1;
          if (bfly_q == 3'd7) begin
            stage_q <= stage_q + 1'b1;
            if (stage_q == 2'd3) phase_q <= UNLOAD;
          end
        end
        UNLOAD: if (give) begin
          idx_q <= idx_q + 1'b1;
          if (idx_q == 4'(N - 1)) phase_q <= LOAD;
        end
        default: phase_q <= LOAD;
      endcase
    end
  end

  assign out_data = {buf_q[idx_q].im, buf_q[idx_q].re};
  assign out_last = (idx_q == 4'(N - 1));

  // in_last is not needed: a block is always 16 samples.
  logic unused_ok;
  assign unused_ok = in_last ^ (|in_data[31:16+DW]) ^ (|in_data[15:DW]);

endmodule
