// pod_readout: the part of the power-on module driven by the daisy-chained
// readout token.
// The StartReadout pulse (the EndReadout of the previous chip) sets the
// request flip-flop asynchronously; that powers the LVDS receiver, whose
// clock then clocks a two-stage synchronizer. When the synchronized request
// appears, the readout clock gate opens and a one-cycle internal
// StartReadout is produced for the readout state machine (it is seen by the
// first rising edge of the gated clock). The local EndReadout clears the
// request synchronously; the gate closes two to three clock ticks later.
// Ports: rclk free-running readout clock, rst_n asynchronous reset of the
// request, start_ro StartReadout pulse from the previous chip, end_ro local
// EndReadout (synchronous to rclk), req request towards the LVDS bias,
// start_int internal StartReadout, gclk gated readout clock.
module pod_readout (
  input  logic rclk,
  input  logic rst_n,
  input  logic start_ro,
  input  logic end_ro,
  output logic req,
  output logic start_int,
  output logic gclk
);
  timeunit 1ns; timeprecision 100ps;
  logic       req_q;
  logic [2:0] sync_q;
  logic       req_load;

  // Set/reset flip-flop: reset or the token loads it asynchronously
  // (reset wins), the local EndReadout clears it on the clock.
  assign req_load = start_ro | ~rst_n;

  always_ff @(posedge rclk or posedge req_load) begin
    if (req_load)    req_q <= rst_n;
    else if (end_ro) req_q <= 1'b0;
  end

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) sync_q <= '0;
    else        sync_q <= {sync_q[1:0], req_q};
  end

  assign req       = req_q | sync_q[1];
  assign start_int = sync_q[1] & ~sync_q[2];

  clock_gate u_gate (.clk(rclk), .en(sync_q[1]), .gclk(gclk));
endmodule
