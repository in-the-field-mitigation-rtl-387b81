// ro_ring: behavioural model of the three-stage ring oscillator of one sensor.
//
// This is a behavioural model, not synthesizable logic: on the FPGA the ring is
// a hand-placed chain of LUTs (each followed by a pass-through latch) closed into
// an asynchronous loop, and its frequency is set only by the delay of the local
// silicon. Here each stage is given a propagation delay of STAGE_PS picoseconds,
// which stands for that local delay, LUT plus latch plus routing.
//
// Structure: a gated first stage that inverts the loop signal while `activate`
// is high and holds a constant otherwise, followed by two inverters that close
// the loop (three inverting stages, an odd count, so the loop oscillates), and a
// third inverter that drives `ro_clk` out of the loop. The clock period is
// 6 * STAGE_PS; with the default 417 ps it is about 400 MHz, the middle of the
// RO frequencies measured on 28 nm devices. When `activate` falls the ring
// settles with `ro_clk` low. The exact gating function of the first stage is this
// model's choice; the three-stage loop and the buffered output follow the sensor
// drawing.
`timescale 1ns / 1ps
module ro_ring #(
  parameter int unsigned STAGE_PS = 417  // delay of one stage, picoseconds
) (
  input  logic activate,
  output logic ro_clk
);

  logic g0, s1, s2;

  initial begin
    g0 = 1'b1;
    s1 = 1'b0;
    s2 = 1'b1;
  end

  // Each stage settles STAGE_PS after its inputs change (transport delay).
  always @(activate or s2) g0 <= #(STAGE_PS * 1ps) ~(activate & s2);
  always @(g0)             s1 <= #(STAGE_PS * 1ps) ~g0;
  always @(s1)             s2 <= #(STAGE_PS * 1ps) ~s1;

  assign ro_clk = ~s2;

endmodule
