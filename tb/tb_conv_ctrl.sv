// tb_conv_ctrl: with a stand-in ADC that answers a fixed number of cycles
// after each start, checks that n stored columns give n conversions in
// column order, each written to RAM at its column address after the ADC's
// done, with the SCA column held steady while it converts, that the whole
// run takes the expected number of cycles, and that conv_done follows. An
// empty memory must give conv_done at once.
module tb_conv_ctrl;
  timeunit 1ns; timeprecision 100ps;
  localparam int D = 8, LAT = 20, SETTLE = 2;
  logic clk = 0, rst_n = 0, start = 0, adc_done = 0, adc_start;
  logic [3:0] n_frames = '0, n_conv;
  logic [2:0] sca_rcol, waddr;
  logic we, busy, conv_done;
  int checks = 0, failures = 0, writes = 0, starts = 0;
  logic [2:0] col_at_start;

  conv_ctrl #(.DEPTH(D), .SETTLE(SETTLE)) dut (.*);

  always #12.5 clk = ~clk;

  // stand-in ADC
  initial forever begin
    @(posedge clk);
    if (adc_start) begin
      starts++; col_at_start = sca_rcol;
      repeat (LAT - 1) begin
        @(posedge clk); #1;
        checks++; if (sca_rcol !== col_at_start) failures++;
      end
      @(negedge clk) adc_done = 1;
      @(negedge clk) adc_done = 0;
    end
  end

  always @(posedge clk) if (we) begin
    checks++;
    if (waddr !== 3'(writes)) begin failures++; $display("write %0d at %0d", writes, waddr); end
    writes++;
  end

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input int n);
    int cyc = 0;
    rst_n = 0; writes = 0; starts = 0;
    repeat (2) @(negedge clk);
    rst_n = 1; n_frames = 4'(n);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!conv_done && cyc < 2000) begin @(negedge clk); cyc++; end
    checks += 3;
    if (writes != n || starts != n || n_conv != 4'(n)) begin
      failures++; $display("n=%0d writes=%0d starts=%0d", n, writes, starts);
    end
    // per conversion: settle, start, LAT cycles of the ADC, write, next
    if (n > 0 && (cyc < n * (LAT + SETTLE) || cyc > n * (LAT + SETTLE + 5))) begin
      failures++; $display("n=%0d took %0d cycles", n, cyc);
    end
    if (busy) failures++;
    @(negedge clk) start = 1;              // already done: ignored
    @(negedge clk) start = 0;
    repeat (5) @(negedge clk);
    checks++; if (busy || writes != n) failures++;
  endtask

  initial begin
    run(5);
    run(0);
    run(D);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
