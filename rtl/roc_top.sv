// roc_top: the ROC readout systems side by side.
// Two ILC calorimeter readout chains, each a daisy chain of chips with the
// power-on module: a digital one (HARDROC-like: hits go straight to RAM)
// and an analog one (SKIROC/SPIROC-like: SCA, ADC, then RAM). Each chain has
// its own DAQ lines: clock pairs, PowerON, reset, acquisition window,
// StartReadout in, EndReadout back, and the shared Data and TransmitOn.
// Beside them stands the autonomous PARISROC-style chip, which needs only a
// clock and a reset and sends tagged frames of hit channels by itself.
// Ports: d_* digital chain, a_* analog chain, p_* autonomous chip.
module roc_top
  import roc_pkg::*;
#(
  parameter int unsigned N_CHIPS     = N_CHIPS_DEF,
  parameter int unsigned N_CH        = N_CH_DEF,
  parameter int unsigned DEPTH       = DEPTH_DEF,
  parameter int unsigned CONV_CYCLES = CONV_CYC_DEF,
  parameter int unsigned P_N_CH      = 16,
  parameter int unsigned P_CONV_CYC  = 1024
) (
  // digital chain
  input  logic                                    d_clk_p, d_clk_n,
  input  logic                                    d_rclk_p, d_rclk_n,
  input  logic                                    d_pwr_on, d_rst_n, d_acq_on,
  input  logic [N_CHIPS-1:0][N_CH-1:0]            d_trig,
  input  logic                                    d_start_ro,
  output logic                                    d_end_ro,
  output logic                                    d_data, d_transmit_on,
  output logic [N_CHIPS-1:0]                      d_lvds_en,
  // analog chain
  input  logic                                    a_clk_p, a_clk_n,
  input  logic                                    a_rclk_p, a_rclk_n,
  input  logic                                    a_pwr_on, a_rst_n, a_acq_on,
  input  logic [N_CHIPS-1:0][N_CH-1:0]            a_trig,
  input  logic [N_CHIPS-1:0][N_CH-1:0][AMP_W-1:0] a_vin,
  input  logic                                    a_start_ro,
  output logic                                    a_end_ro,
  output logic                                    a_data, a_transmit_on,
  output logic [N_CHIPS-1:0]                      a_lvds_en,
  output logic [N_CHIPS-1:0]                      a_conv_done,
  // autonomous chip
  input  logic                                    p_clk, p_rst_n,
  input  logic [P_N_CH-1:0]                       p_trig,
  input  logic [P_N_CH-1:0][AMP_W-1:0]            p_vin,
  output logic                                    p_data, p_transmit_on,
  output phase_e                                  p_phase,
  output logic [31:0]                             p_n_frames, p_n_lost
);
  timeunit 1ns; timeprecision 100ps;
  logic [N_CHIPS-1:0] d_conv_done, d_tx, a_tx;

  roc_chain #(.N_CHIPS(N_CHIPS), .N_CH(N_CH), .DEPTH(DEPTH),
              .CONV_CYCLES(CONV_CYCLES), .ANALOG(1'b0)) u_dchain (
    .clk_p(d_clk_p), .clk_n(d_clk_n), .rclk_p(d_rclk_p), .rclk_n(d_rclk_n),
    .pwr_on(d_pwr_on), .rst_n(d_rst_n), .acq_on(d_acq_on), .trig(d_trig),
    .vin('0), .start_ro(d_start_ro), .end_ro(d_end_ro), .data(d_data),
    .transmit_on(d_transmit_on), .lvds_en(d_lvds_en),
    .conv_done(d_conv_done), .tx_on_chip(d_tx)
  );

  roc_chain #(.N_CHIPS(N_CHIPS), .N_CH(N_CH), .DEPTH(DEPTH),
              .CONV_CYCLES(CONV_CYCLES), .ANALOG(1'b1)) u_achain (
    .clk_p(a_clk_p), .clk_n(a_clk_n), .rclk_p(a_rclk_p), .rclk_n(a_rclk_n),
    .pwr_on(a_pwr_on), .rst_n(a_rst_n), .acq_on(a_acq_on), .trig(a_trig),
    .vin(a_vin), .start_ro(a_start_ro), .end_ro(a_end_ro), .data(a_data),
    .transmit_on(a_transmit_on), .lvds_en(a_lvds_en),
    .conv_done(a_conv_done), .tx_on_chip(a_tx)
  );

  parisroc #(.N_CH(P_N_CH), .CONV_CYCLES(P_CONV_CYC)) u_paris (
    .clk(p_clk), .rst_n(p_rst_n), .trig(p_trig), .vin(p_vin),
    .data_o(p_data), .tx_on(p_transmit_on), .phase(p_phase),
    .n_frames(p_n_frames), .n_lost(p_n_lost)
  );
endmodule
