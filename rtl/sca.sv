// sca: behavioural model of the switched capacitor array (analog memory).
// This is a model of an analog block, not synthesizable logic.
// Each channel has DEPTH capacitor cells. Every cap works as a track and
// hold cap: while the column is selected for writing and not held it
// follows the channel's (shaped) input, keeping the maximum it has seen, and
// the hold strobe freezes that maximum, as the track and hold cap locks the
// capacitor at the peak of the signal. Analog levels are carried as
// unsigned millivolt codes (AMP_W bits). A column is read by placing its
// address on rcol; the cap voltages appear on vout after a delay.
// Ports: track starts tracking into column wcol (clears the peak),
// hold freezes it, vin per-channel input levels, rcol/vout read side.
module sca #(
  parameter int unsigned N_CH  = 64,
  parameter int unsigned DEPTH = 32,
  parameter int unsigned AMP_W = 16
) (
  input  logic                         track,
  input  logic                         hold,
  input  logic [$clog2(DEPTH)-1:0]     wcol,
  input  logic [N_CH-1:0][AMP_W-1:0]   vin,
  input  logic [$clog2(DEPTH)-1:0]     rcol,
  output logic [N_CH-1:0][AMP_W-1:0]   vout
);
  timeunit 1ns; timeprecision 100ps;
  logic [N_CH-1:0][AMP_W-1:0] cap [DEPTH];
  logic [N_CH-1:0][AMP_W-1:0] peak;
  logic tracking;
  logic [$clog2(DEPTH)-1:0] col_q;

  initial begin
    tracking = 1'b0; col_q = '0; peak = '0;
    for (int c = 0; c < DEPTH; c++) cap[c] = '0;
  end

  // track: follow the input from the start of tracking, keeping its peak
  always @(posedge track) begin
    tracking = 1'b1;
    col_q    = wcol;
    peak     = vin;
  end

  always @(vin) begin
    if (tracking)
      for (int ch = 0; ch < N_CH; ch++)
        if (vin[ch] > peak[ch]) peak[ch] = vin[ch];
  end

  // hold: the capacitor of the selected column keeps the peak
  always @(posedge hold) begin
    if (tracking) cap[col_q] = peak;
    tracking = 1'b0;
  end

  always @(rcol or hold) #1 vout = cap[rcol];
endmodule
