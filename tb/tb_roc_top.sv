// tb_roc_top: end-to-end run of the whole design at reduced sizes (three
// chips per chain, eight channels, memories of four frames, short
// conversions, a four-channel autonomous chip). The DAQ play and all checks
// are in roc_top_bench; the last initial block is the watchdog.
module tb_roc_top;
  timeunit 1ns; timeprecision 100ps;
  import roc_pkg::*;
  localparam int NC = 3, N = 8, D = 4, P_N = 4;
  logic clk40, clk5, pclk;
  logic d_pwr_on, d_rst_n, d_acq_on, d_start_ro, d_end_ro, d_data, d_transmit_on;
  logic a_pwr_on, a_rst_n, a_acq_on, a_start_ro, a_end_ro, a_data, a_transmit_on;
  logic [NC-1:0][N-1:0] d_trig, a_trig;
  logic [NC-1:0][N-1:0][AMP_W-1:0] a_vin;
  logic [NC-1:0] d_lvds_en, a_lvds_en, a_conv_done;
  logic p_rst_n, p_data, p_transmit_on;
  logic [P_N-1:0] p_trig;
  logic [P_N-1:0][AMP_W-1:0] p_vin;
  phase_e p_phase;
  logic [31:0] p_n_frames, p_n_lost;

  roc_top #(.N_CHIPS(NC), .N_CH(N), .DEPTH(D), .CONV_CYCLES(20), .P_N_CH(P_N), .P_CONV_CYC(30)) dut (
    .d_clk_p(clk40), .d_clk_n(~clk40), .d_rclk_p(clk5), .d_rclk_n(~clk5),
    .a_clk_p(clk40), .a_clk_n(~clk40), .a_rclk_p(clk5), .a_rclk_n(~clk5),
    .p_clk(pclk), .*);

  roc_top_bench #(.NC(NC), .N(N), .D(D), .CC(20), .P_N(P_N), .P_CC(30), .P_HITS(40), .P_GAP(150)) bench (.*);

  initial begin
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", bench.checks, bench.failures + 1);
    $finish;
  end
endmodule
