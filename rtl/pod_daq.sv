// pod_daq: the part of the power-on module driven by the DAQ during the
// common acquisition and conversion phases.
// PowerON from the DAQ asynchronously sets a two-stage synchronizer; the
// enable that opens the clock gate comes from its last stage. When the DAQ
// drops PowerON the zero is shifted through the synchronizer by the clock
// itself, so the gated clock stops synchronously two rising edges later and
// then one falling edge for the gate. Asynchronous set and synchronous
// release follow the power-on module's description; the two-stage depth is
// this design's reading of "a few clock ticks".
// Ports: clk free-running (once the LVDS receiver is on) acquisition clock,
// pwr_on PowerON from the DAQ, req request kept towards the LVDS bias
// (high from PowerON until the release has passed the synchronizer),
// gclk gated clock for the acquisition and conversion logic.
module pod_daq (
  input  logic clk,
  input  logic pwr_on,
  output logic req,
  output logic gclk
);
  timeunit 1ns; timeprecision 100ps;
  logic [1:0] sync_q;

  always_ff @(posedge clk or posedge pwr_on) begin
    if (pwr_on) sync_q <= 2'b11;
    else        sync_q <= {sync_q[0], 1'b0};
  end

  assign req = sync_q[1];

  clock_gate u_gate (.clk(clk), .en(sync_q[1]), .gclk(gclk));
endmodule
