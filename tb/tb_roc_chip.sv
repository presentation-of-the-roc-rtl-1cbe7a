// tb_roc_chip: one ILC cycle of a single chip, analog (SCA and ADC) and
// digital, from the clock receivers to the serial line. The DAQ side sets
// PowerON during reset, opens the acquisition window, injects events with
// known amplitudes, waits for the end of conversion, drops PowerON, then
// passes the readout token. The frames rebuilt from Data/TransmitOn are
// compared with frames worked out from the stimulus: chip identifier, BCID
// (acquisition clocks since the window opened), hit pattern and ADC codes
// floor(v*4096/2048). Also checks that the receivers are unbiased between
// phases, that EndReadout comes once, and that the readout length matches.
module tb_roc_chip;
  timeunit 1ns; timeprecision 100ps;
  import roc_pkg::*;
  localparam int N = 4, D = 4, CC = 20, BW = 16, AB = 12;
  localparam int FW_A = 8 + BW + N + N * AB, FW_D = 8 + BW + N;

  logic clk_src = 0, rclk_src = 0;
  logic pwr_on = 0, rst_n = 1, acq_on = 0, start_a = 0, start_d = 0;
  logic [N-1:0] trig = '0;
  logic [N-1:0][AMP_W-1:0] vin = '0;
  int checks = 0, failures = 0;

  always #12.5 clk_src  = ~clk_src;
  always #100  rclk_src = ~rclk_src;

  logic da, ta, ea, la, ca, dqa, rqa, dd, td, ed, ld, cd, dqd, rqd;
  logic [2:0] nfa, nfd;

  roc_chip #(.N_CH(N), .DEPTH(D), .CONV_CYCLES(CC), .ANALOG(1'b1)) dut_a (
    .clk_p(clk_src), .clk_n(~clk_src), .rclk_p(rclk_src), .rclk_n(~rclk_src),
    .pwr_on(pwr_on), .rst_n(rst_n), .acq_on(acq_on), .trig(trig), .vin(vin),
    .chip_id(8'hA1), .start_ro_in(start_a), .data_o(da), .tx_on(ta),
    .end_ro_out(ea), .lvds_en(la), .conv_done(ca), .n_frames(nfa),
    .daq_on(dqa), .ro_on(rqa));

  roc_chip #(.N_CH(N), .DEPTH(D), .CONV_CYCLES(CC), .ANALOG(1'b0)) dut_d (
    .clk_p(clk_src), .clk_n(~clk_src), .rclk_p(rclk_src), .rclk_n(~rclk_src),
    .pwr_on(pwr_on), .rst_n(rst_n), .acq_on(acq_on), .trig(trig), .vin(vin),
    .chip_id(8'hD2), .start_ro_in(start_d), .data_o(dd), .tx_on(td),
    .end_ro_out(ed), .lvds_en(ld), .conv_done(cd), .n_frames(nfd),
    .daq_on(dqd), .ro_on(rqd));

  // serial receivers on the DAQ side
  logic [FW_A-1:0] sh_a; int nb_a = 0; logic [FW_A-1:0] got_a [$];
  logic [FW_D-1:0] sh_d; int nb_d = 0; logic [FW_D-1:0] got_d [$];
  int end_a = 0, end_d = 0;
  always @(negedge rclk_src) begin
    if (ta) begin sh_a = {sh_a[FW_A-2:0], da}; if (++nb_a == FW_A) begin got_a.push_back(sh_a); nb_a = 0; end end
    if (td) begin sh_d = {sh_d[FW_D-2:0], dd}; if (++nb_d == FW_D) begin got_d.push_back(sh_d); nb_d = 0; end end
  end
  always @(posedge ea) end_a++;
  always @(posedge ed) end_d++;

  // reference frames
  logic [FW_A-1:0] exp_a [$];
  logic [FW_D-1:0] exp_d [$];
  int bcid_ref = 0;
  always @(posedge clk_src) if (acq_on) bcid_ref++;

  task automatic check(input bit c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 rst_n = 0;
    #2000;
    check(!la && !ld, "receivers off before the cycle");
    pwr_on = 1; #300; rst_n = 1; #200;
    @(negedge clk_src) acq_on = 1;
    for (int e = 0; e < D + 2; e++) begin     // two more events than fit
      logic [N-1:0] h; logic [N*AB-1:0] codes;
      repeat (7 + e) @(negedge clk_src);
      h = N'($urandom | 1);
      for (int ch = 0; ch < N; ch++) begin
        int v = h[ch] ? $urandom_range(0, 2200) : 0;
        int c = (v * 4096) / 2048; if (c > 4095) c = 4095;
        vin[ch] = AMP_W'(v);
        codes[ch*AB +: AB] = AB'(c);   // channel ch sits at bits [ch*AB +: AB]
      end
      trig = h;
      if (e < D) begin
        exp_a.push_back({8'hA1, BW'(bcid_ref), h, codes});
        exp_d.push_back({8'hD2, BW'(bcid_ref), h});
      end
      @(negedge clk_src) trig = '0;
      repeat (6) @(negedge clk_src);
      vin = '0;
    end
    repeat (5) @(negedge clk_src);
    acq_on = 0;
    wait (ca);
    check(nfa == 3'(D) && nfd == 3'(D), "memory filled");
    #100 pwr_on = 0;
    #400;
    check(!la && !ld && !dqa && !dqd, "receivers off after PowerON release");
    // readout of the analog chip, then the digital one
    start_a = 1; #150 start_a = 0;
    wait (end_a == 1); #10;
    start_d = 1; #150 start_d = 0;
    wait (end_d == 1);
    #1 rst_n = 0;
    #2000;
    check(!la && !ld, "receivers off after readout");
    check(end_a == 1 && end_d == 1, "one EndReadout each");
    check(got_a.size() == D && got_d.size() == D, $sformatf("frames %0d %0d", got_a.size(), got_d.size()));
    for (int i = 0; i < got_a.size() && i < exp_a.size(); i++)
      check(got_a[i] === exp_a[i], $sformatf("analog frame %0d %h exp %h", i, got_a[i], exp_a[i]));
    for (int i = 0; i < got_d.size() && i < exp_d.size(); i++)
      check(got_d[i] === exp_d[i], $sformatf("digital frame %0d %h exp %h", i, got_d[i], exp_d[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
