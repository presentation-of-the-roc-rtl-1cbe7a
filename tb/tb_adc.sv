// tb_adc: converts random levels and checks the code against
// floor(v * 2^BITS / FS), saturation above full scale, the conversion time
// of CONV_CYCLES clocks, and that a start during a conversion is ignored.
module tb_adc;
  timeunit 1ns; timeprecision 100ps;
  localparam int BITS = 12, FS = 2048, CC = 50;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [15:0] vin = '0;
  logic [BITS-1:0] code;
  int checks = 0, failures = 0;

  adc #(.BITS(BITS), .AMP_W(16), .FS_LOG2(11), .CONV_CYCLES(CC)) dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (30) begin
      int v, expc, cyc;
      v = (($urandom % 5) == 0) ? $urandom_range(2048, 60000) : $urandom_range(0, 2047);
      expc = (v * 4096) / FS; if (expc > 4095) expc = 4095;
      @(negedge clk); vin = 16'(v); start = 1;
      @(negedge clk); start = 0; vin = 16'($urandom);   // input may move after sampling
      cyc = 1;
      repeat (5) @(negedge clk); start = 1;                // ignored: busy
      @(negedge clk); start = 0; cyc += 6;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 2;
      if (code !== BITS'(expc)) begin failures++; $display("v=%0d code=%0d exp=%0d", v, code, expc); end
      if (cyc != CC + 1) begin failures++; $display("latency %0d", cyc); end
      @(negedge clk); checks++; if (done || busy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
