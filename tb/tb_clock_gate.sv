// tb_clock_gate: checks that the gated clock follows the enable sampled at
// the previous falling edge, is always low while the clock is low, and never
// shows a shortened pulse, with a random enable.
module tb_clock_gate;
  timeunit 1ns; timeprecision 100ps;
  logic clk = 1'b0, en = 1'b0, gclk, exp_en = 1'b0;
  int checks = 0, failures = 0;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;
  always @(negedge clk) exp_en = en;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pulses = 0, expected = 0;
    repeat (400) begin
      @(posedge clk);
      #1;
      checks++;
      if (gclk !== exp_en) begin failures++; $display("gclk %b exp %b", gclk, exp_en); end
      if (exp_en) expected++;
      if (gclk) pulses++;
      #3;
      checks++;
      if (gclk !== exp_en) failures++;  // stays high for the whole high phase
      en = 1'($urandom_range(0, 1));    // change anywhere in the high phase
      #0.5;
      checks++;
      if (gclk !== exp_en) failures++;  // a late enable change must not cut the pulse
      #1.5;
      checks++;
      if (gclk !== 1'b0) failures++;
    end
    checks++;
    if (pulses != expected || pulses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
