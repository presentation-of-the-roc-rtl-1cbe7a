// tb_roc_chain: a chain of three digital chips sharing Data and TransmitOn.
// Chip 1 gets two events, chip 2 none, chip 3 more events than its memory
// holds. After acquisition the DAQ passes the token to the first chip and
// rebuilds the frames from the shared lines. Checks: frames arrive in chain
// order with the right identifiers, BCIDs and hit patterns; the empty chip
// passes the token on; the chain's EndReadout comes back once; never more
// than one chip drives TransmitOn; at most two chips (the one finishing and
// the one starting) have their receivers biased during readout; all are off
// at the end.
module tb_roc_chain;
  timeunit 1ns; timeprecision 100ps;
  import roc_pkg::*;
  localparam int NC = 3, N = 4, D = 4, BW = 16, FW = 8 + BW + N;

  logic clk_src = 0, rclk_src = 0;
  logic pwr_on = 0, rst_n = 1, acq_on = 0, start_ro = 0;
  logic [NC-1:0][N-1:0] trig = '0;
  logic [NC-1:0][N-1:0][AMP_W-1:0] vin = '0;
  logic end_ro, data, transmit_on;
  logic [NC-1:0] lvds_en, conv_done, tx_on_chip;
  int checks = 0, failures = 0;

  roc_chain #(.N_CHIPS(NC), .N_CH(N), .DEPTH(D), .ANALOG(1'b0)) dut (
    .clk_p(clk_src), .clk_n(~clk_src), .rclk_p(rclk_src), .rclk_n(~rclk_src), .*);

  always #12.5 clk_src  = ~clk_src;
  always #100  rclk_src = ~rclk_src;

  logic [FW-1:0] sh; int nb = 0, n_end = 0, max_pow = 0, bcid_ref = 0, multi = 0;
  logic [FW-1:0] got [$], exp_q [$];
  logic reading = 0;
  always @(negedge rclk_src) begin
    if (transmit_on) begin sh = {sh[FW-2:0], data}; if (++nb == FW) begin got.push_back(sh); nb = 0; end end
    if (!$onehot0(tx_on_chip)) multi++;
    if (reading && $countones(lvds_en) > max_pow) max_pow = $countones(lvds_en);
  end
  always @(posedge end_ro) n_end++;
  always @(posedge clk_src) if (acq_on) bcid_ref++;

  task automatic check(input bit c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic hit(input int chip, input bit store);
    logic [N-1:0] h = N'($urandom | 1);
    @(negedge clk_src);
    trig[chip] = h;
    if (store) exp_q.push_back({8'(chip + 1), BW'(bcid_ref), h});
    @(negedge clk_src) trig = '0;
    repeat (3) @(negedge clk_src);
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [FW-1:0] e0 [$], e2 [$];
    #1 rst_n = 0;
    #1000 pwr_on = 1; #300 rst_n = 1; #200;
    @(negedge clk_src) acq_on = 1;
    hit(0, 1); hit(2, 1); hit(0, 1);
    for (int i = 0; i < D; i++) hit(2, i < D - 1);
    acq_on = 0;
    #200 pwr_on = 0;
    #500;
    check(lvds_en == '0, "receivers off before readout");
    // expected order: chip 1 frames, then chip 3 frames
    foreach (exp_q[i]) if (exp_q[i][FW-1 -: 8] == 8'd1) e0.push_back(exp_q[i]); else e2.push_back(exp_q[i]);
    exp_q = {e0, e2};
    reading = 1;
    start_ro = 1; #150 start_ro = 0;
    wait (n_end == 1);
    #3000;
    check(n_end == 1, "one chain EndReadout");
    check(got.size() == exp_q.size(), $sformatf("frames %0d exp %0d", got.size(), exp_q.size()));
    foreach (got[i]) if (i < exp_q.size())
      check(got[i] === exp_q[i], $sformatf("frame %0d %h exp %h", i, got[i], exp_q[i]));
    check(multi == 0, "one talker at a time");
    check(max_pow >= 1 && max_pow <= 2, $sformatf("chips powered at once: %0d", max_pow));
    check(lvds_en == '0, "all receivers off after readout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
