// roc_chain: a daisy chain of ILC ROC chips sharing their readout lines.
// To keep the number of lines to the DAQ small, all chips of a chain share
// Data and TransmitOn. The lines are open-collector in the chips; here they
// are modelled as a wired OR of each chip's drive, which is exact as long
// as only one chip talks at a time (an assertion checks that rule). The
// DAQ's StartReadout goes to the first chip; each chip's EndReadout is the
// next chip's StartReadout, and the last one returns to the DAQ as the end
// of the chain's readout. PowerON, reset, the acquisition window and the
// clocks are common to all chips. Chip k carries identifier k+1.
// Ports: as roc_chip, with trig/vin given per chip, plus start_ro from the
// DAQ, end_ro back to it, data and transmit_on the shared lines.
module roc_chain
  import roc_pkg::*;
#(
  parameter int unsigned N_CHIPS     = N_CHIPS_DEF,
  parameter int unsigned N_CH        = N_CH_DEF,
  parameter int unsigned DEPTH       = DEPTH_DEF,
  parameter int unsigned CONV_CYCLES = CONV_CYC_DEF,
  parameter bit          ANALOG      = 1'b1
) (
  input  logic                                    clk_p,
  input  logic                                    clk_n,
  input  logic                                    rclk_p,
  input  logic                                    rclk_n,
  input  logic                                    pwr_on,
  input  logic                                    rst_n,
  input  logic                                    acq_on,
  input  logic [N_CHIPS-1:0][N_CH-1:0]            trig,
  input  logic [N_CHIPS-1:0][N_CH-1:0][AMP_W-1:0] vin,
  input  logic                                    start_ro,
  output logic                                    end_ro,
  output logic                                    data,
  output logic                                    transmit_on,
  output logic [N_CHIPS-1:0]                      lvds_en,
  output logic [N_CHIPS-1:0]                      conv_done,
  output logic [N_CHIPS-1:0]                      tx_on_chip
);
  timeunit 1ns; timeprecision 100ps;
  logic [N_CHIPS:0]   token;
  logic [N_CHIPS-1:0] data_chip;

  assign token[0] = start_ro;
  assign end_ro   = token[N_CHIPS];

  for (genvar k = 0; k < N_CHIPS; k++) begin : g_chip
    logic [$clog2(DEPTH):0] n_frames;
    logic                   daq_on, ro_on;

    roc_chip #(.N_CH(N_CH), .DEPTH(DEPTH), .CONV_CYCLES(CONV_CYCLES),
               .ANALOG(ANALOG)) u_chip (
      .clk_p(clk_p), .clk_n(clk_n), .rclk_p(rclk_p), .rclk_n(rclk_n),
      .pwr_on(pwr_on), .rst_n(rst_n), .acq_on(acq_on), .trig(trig[k]),
      .vin(vin[k]), .chip_id(8'(k + 1)), .start_ro_in(token[k]),
      .data_o(data_chip[k]), .tx_on(tx_on_chip[k]), .end_ro_out(token[k+1]),
      .lvds_en(lvds_en[k]), .conv_done(conv_done[k]), .n_frames(n_frames),
      .daq_on(daq_on), .ro_on(ro_on)
    );
  end

  // open-collector shared lines, modelled as wired OR
  assign data        = |data_chip;
  assign transmit_on = |tx_on_chip;

  // only one chip may talk at a time
  always_comb assert ($onehot0(tx_on_chip))
    else $error("several chips drive TransmitOn: %b", tx_on_chip);
endmodule
