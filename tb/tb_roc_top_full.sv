// tb_roc_top_full: one complete ILC cycle of the whole design with every
// parameter at its default: four chips per chain, 64 channels, 32 frames per
// chip, 3744-cycle conversions, and a 16-channel autonomous chip receiving
// hits throughout. The DAQ play and all checks are in roc_top_bench; the
// last initial block is the watchdog.
module tb_roc_top_full;
  timeunit 1ns; timeprecision 100ps;
  import roc_pkg::*;
  localparam int NC = 4, N = 64, D = 32, P_N = 16;
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

  roc_top  dut (
    .d_clk_p(clk40), .d_clk_n(~clk40), .d_rclk_p(clk5), .d_rclk_n(~clk5),
    .a_clk_p(clk40), .a_clk_n(~clk40), .a_rclk_p(clk5), .a_rclk_n(~clk5),
    .p_clk(pclk), .*);

  roc_top_bench #(.NC(NC), .N(N), .D(D), .CC(3744), .P_N(P_N), .P_CC(1024), .P_HITS(40), .P_GAP(3000)) bench (.*);

  initial begin
    #200ms;
    $display("TB_RESULT checks=%0d failures=%0d", bench.checks, bench.failures + 1);
    $finish;
  end
endmodule
