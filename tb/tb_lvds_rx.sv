// tb_lvds_rx: checks the receiver model's wake-up delay, that its output
// follows the differential clock once awake, rests low when disabled, and
// stops at once when the bias is removed.
module tb_lvds_rx;
  timeunit 1ns; timeprecision 100ps;
  logic clk = 1'b0, en = 1'b0, out;
  int checks = 0, failures = 0;

  lvds_rx #(.WAKE_NS(150.0)) dut (.in_p(clk), .in_n(~clk), .en(en), .out(out));

  always #12.5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_quiet(input realtime span);
    realtime t0 = $realtime;
    while ($realtime - t0 < span) begin
      #1; checks++;
      if (out !== 1'b0) failures++;
    end
  endtask

  initial begin
    realtime t_en, t_first;
    expect_quiet(300);             // disabled: no output
    @(posedge clk); #2;
    en = 1'b1; t_en = $realtime;
    @(posedge out); t_first = $realtime;
    checks++;
    if (t_first - t_en < 150 || t_first - t_en > 150 + 25) begin
      failures++; $display("wake-up %0t", t_first - t_en);
    end
    repeat (20) begin             // awake: follows the clock
      @(negedge clk); #1; checks++; if (out !== 1'b0) failures++;
      @(posedge clk); #1; checks++; if (out !== 1'b1) failures++;
    end
    #1 en = 1'b0;                 // bias removed while the clock is high
    #0.5; checks++; if (out !== 1'b0) failures++;
    expect_quiet(200);
    en = 1'b1; #100 en = 1'b0;    // too short a wake-up: nothing comes out
    expect_quiet(300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
