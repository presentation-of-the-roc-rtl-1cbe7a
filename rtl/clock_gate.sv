// clock_gate: glitch-free clock gate used by the power-on module.
// The enable is sampled on the falling edge of the clock, so the gated clock
// can only start or stop while the clock is low: it never produces a
// shortened high pulse and its idle level is logic 0, as the power-on module
// requires. Timing: a change of en seen before a falling edge takes effect
// at the next rising edge.
// Ports: clk free clock, en enable (synchronous to clk), gclk gated clock.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  timeunit 1ns; timeprecision 100ps;
  logic en_q;
  always_ff @(negedge clk) en_q <= en;
  assign gclk = clk & en_q;
endmodule
