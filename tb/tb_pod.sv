// tb_pod: runs the power-on module through a full ILC cycle with clock
// receiver models in front of it: PowerON during reset powers the receivers
// at once and the gated acquisition clock appears; releasing PowerON stops
// it synchronously within three clock ticks; the StartReadout token powers
// the receivers again, gives exactly one internal StartReadout seen by the
// first gated readout edge; EndReadout stops the readout clock within three
// ticks. No gated edge may appear while the module is off.
module tb_pod;
  timeunit 1ns; timeprecision 100ps;
  logic clk_src = 0, rclk_src = 0;
  logic pwr_on = 0, rst_n = 0, start_ro = 0, end_ro = 0;
  logic clk, rclk, lvds_en, gclk, grclk, start_int, daq_on, ro_on;
  int checks = 0, failures = 0;
  int n_g = 0, n_gr = 0, n_start_seen = 0;

  always #12.5 clk_src  = ~clk_src;   // 40 MHz
  always #100  rclk_src = ~rclk_src;  // 5 MHz

  lvds_rx #(.WAKE_NS(150.0)) u_rx0 (.in_p(clk_src),  .in_n(~clk_src),  .en(lvds_en), .out(clk));
  lvds_rx #(.WAKE_NS(150.0)) u_rx1 (.in_p(rclk_src), .in_n(~rclk_src), .en(lvds_en), .out(rclk));

  pod dut (.*);

  always @(posedge gclk)  n_g++;
  always @(posedge grclk) begin n_gr++; if (start_int) n_start_seen++; end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int g0, ticks;
    #3000;                                    // settle from random start
    n_gr = 0; n_start_seen = 0;
    check(!lvds_en && !daq_on && !ro_on, "off at start");
    g0 = n_g; #2000; check(n_g == g0, "no acquisition clock while off");
    // acquisition/conversion: PowerON set during reset
    pwr_on = 1; rst_n = 0; #1;
    check(lvds_en && daq_on, "PowerON powers LVDS asynchronously");
    #300 rst_n = 1;                           // reset longer than LVDS wake-up
    g0 = n_g; #2000;
    check(n_g - g0 >= 75, "acquisition clock running");
    // release PowerON: count receiver ticks until the gated clock stops
    @(negedge clk_src); pwr_on = 0;
    ticks = 0; g0 = n_g;
    repeat (6) begin @(posedge clk_src); #1; if (n_g != g0) ticks++; g0 = n_g; end
    check(ticks >= 1 && ticks <= 3, $sformatf("stop after %0d ticks", ticks));
    #10 check(!lvds_en, "LVDS released after PowerON");
    g0 = n_g; #3000; check(n_g == g0, "acquisition clock stopped");
    check(n_gr == 0, "no readout clock during acquisition");
    // readout: token from the previous chip
    @(negedge rclk_src); #37;
    start_ro = 1; #1 check(lvds_en && ro_on, "token powers LVDS asynchronously");
    #199 start_ro = 0;
    wait (n_gr > 0);
    check(n_start_seen == 1, "StartReadout seen at first gated edge");
    repeat (10) @(posedge grclk);
    check(n_start_seen == 1, "single internal StartReadout");
    #1 end_ro = 1; @(posedge grclk); #1 end_ro = 0;
    ticks = 0; g0 = n_gr;
    repeat (6) begin @(posedge rclk_src); #1; if (n_gr != g0) ticks++; g0 = n_gr; end
    check(ticks >= 1 && ticks <= 3, $sformatf("readout stop after %0d ticks", ticks));
    check(!lvds_en && !ro_on, "LVDS released after EndReadout");
    g0 = n_gr; #5000; check(n_gr == g0 && n_g == 0 + n_g, "all clocks stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
