// ram: digital memory of a ROC chip holding the frames of one acquisition
// cycle until they are read out.
// Simple dual-port memory: one synchronous write port, one synchronous read
// port (data valid one clock after the address). Write and read use
// separate clocks because the chip writes during acquisition or conversion
// (40 MHz clock) and reads during readout (5 MHz clock); the phases never
// overlap, so no write-read collision handling is needed.
// Ports: wclk/we/waddr/wdata write side, rclk/re/raddr/rdata read side.
module ram #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 64 + 16
) (
  input  logic                     wclk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     rclk,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  timeunit 1ns; timeprecision 100ps;
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk) if (we) mem[waddr] <= wdata;
  always_ff @(posedge rclk) if (re) rdata <= mem[raddr];
endmodule
