// pod: Power On Digital module of an ILC ROC chip.
// It keeps the digital part of the chip unpowered for most of the 200 ms ILC
// cycle by stopping its clocks and switching off the bias of the LVDS clock
// receivers. It has three parts, as in the chip: the DAQ part (pod_daq),
// which follows PowerON for the common acquisition and conversion phases;
// the readout part (pod_readout), which follows the daisy-chained readout
// token; and the LVDS management, here the OR of the two requests that
// drives the receivers' bias enable. Clocks start asynchronously, as soon as
// the receivers wake, are enabled and stopped synchronously and rest at 0.
// The module holds eight flip-flops: two synchronizer stages and a gate
// stage for the DAQ part, the request, three synchronizer stages and a gate
// stage for the readout part.
// Ports: clk/rclk receiver outputs (acquisition and readout clocks),
// pwr_on PowerON from the DAQ, rst_n chip reset, start_ro StartReadout from
// the previous chip, end_ro local EndReadout, lvds_en receiver bias enable,
// gclk/grclk gated clocks, start_int internal StartReadout, daq_on/ro_on the
// two power requests.
module pod (
  input  logic clk,
  input  logic rclk,
  input  logic pwr_on,
  input  logic rst_n,
  input  logic start_ro,
  input  logic end_ro,
  output logic lvds_en,
  output logic gclk,
  output logic grclk,
  output logic start_int,
  output logic daq_on,
  output logic ro_on
);
  timeunit 1ns; timeprecision 100ps;
  pod_daq u_daq (
    .clk(clk), .pwr_on(pwr_on), .req(daq_on), .gclk(gclk)
  );

  pod_readout u_ro (
    .rclk(rclk), .rst_n(rst_n), .start_ro(start_ro), .end_ro(end_ro),
    .req(ro_on), .start_int(start_int), .gclk(grclk)
  );

  // LVDS management: the receivers stay biased while either part needs them.
  assign lvds_en = daq_on | ro_on;
endmodule
