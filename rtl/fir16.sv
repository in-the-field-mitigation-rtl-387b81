// fir16: 16-tap FIR filter, one of the two benchmark designs ("User IP") whose
// maximum clock frequency the framework measures.
//
// Direct form: a TAPS-deep delay line of DW-bit signed samples, TAPS registered
// products with the CW-bit signed coefficients COEF, then a registered adder
// tree. The sum is shifted right arithmetically by CW-1 bits (coefficients are
// Q1.(CW-1) fixed point) and saturated to DW bits:
//   y[n] = sat( (sum_k COEF[k] * x[n-k]) >>> (CW-1) ).
// The delay line starts at zero after reset and runs on across packets.
//
// Stream interface, one sample per clock: a sample is taken when in_valid and
// in_ready. The result appears 3 clocks after its sample was taken, with the
// sample's `last` flag. When out_valid is high and out_ready low the whole
// pipeline holds (in_ready falls), so nothing is lost. Input sample and result
// sit sign-extended in the low bits of the 32-bit stream word.
// The 16 taps and 10..13-bit sample width follow the document; the coefficient
// set (a symmetric low-pass), the 12-bit default width and the pipeline are this
// design's own.
`timescale 1ns / 1ps
module fir16 #(
  parameter int unsigned TAPS = 16,
  parameter int unsigned DW   = 12,
  parameter int unsigned CW   = 12,
  parameter logic signed [CW-1:0] COEF [TAPS] = '{
    -12, -20, 0, 60, 150, 260, 350, 400, 400, 350, 260, 150, 60, 0, -20, -12}
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

  localparam int unsigned PW = DW + CW;               // product width
  localparam int unsigned SW = PW + $clog2(TAPS);     // sum width

  logic signed [DW-1:0] x_q [TAPS];
  logic                 v0_q, last0_q;
  logic signed [PW-1:0] p_q [TAPS];
  logic                 v1_q, last1_q;
  logic signed [DW-1:0] y_q;
  logic                 v2_q, last2_q;
  logic                 stall, take;

  assign stall    = v2_q && !out_ready;
  assign in_ready = !stall;
  assign take     = in_valid && in_ready;

  // Stage 0: delay line
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) x_q[k] <= '0;
      v0_q    <= 1'b0;
      last0_q <= 1'b0;
    end else if (!stall) begin
      if (take) begin
        x_q[0] <= in_data[DW-1:0];
        for (int k = 1; k < TAPS; k++) x_q[k] <= x_q[k-1];
      end
      v0_q    <= take;
      last0_q <= in_last;
    end
  end

  // Stage 1: products
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) p_q[k] <= '0;
      v1_q    <= 1'b0;
      last1_q <= 1'b0;
    end else if (!stall) begin
      for (int k = 0; k < TAPS; k++) p_q[k] <= PW'(x_q[k]) * PW'(COEF[k]);
      v1_q    <= v0_q;
      last1_q <= last0_q;
    end
  end

  // Stage 2: adder tree, scaling and saturation
  logic signed [SW-1:0] sum, scaled;
  always_comb begin
    sum = '0;
    for (int k = 0; k < TAPS; k++) sum += SW'(p_q[k]);
    scaled = sum >>> (CW - 1);
  end

  localparam logic signed [SW-1:0] YMAX = SW'((1 << (DW - 1)) - 1);
  localparam logic signed [SW-1:0] YMIN = -SW'(1 << (DW - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_q     <= '0;
      v2_q    <= 1'b0;
      last2_q <= 1'b0;
    end else if (!stall) begin
      if (scaled > YMAX)      y_q <= YMAX[DW-1:0];
      else if (scaled < YMIN) y_q <= YMIN[DW-1:0];
      else                    y_q <= scaled[DW-1:0];
      v2_q    <= v1_q;
      last2_q <= last1_q;
    end
  end

  assign out_valid = v2_q;
  assign out_data  = 32'(y_q);
  assign out_last  = last2_q;

endmodule
