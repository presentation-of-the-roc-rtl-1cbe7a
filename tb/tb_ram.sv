// tb_ram: writes random words at random addresses with one clock and reads
// them back with another, comparing against a reference array; also checks
// the one-cycle read latency and that re=0 holds the output.
module tb_ram;
  timeunit 1ns; timeprecision 100ps;
  localparam int D = 32, W = 80;
  logic wclk = 0, rclk = 0, we = 0, re = 0;
  logic [4:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] ref_mem [D];
  int checks = 0, failures = 0;

  ram #(.DEPTH(D), .WIDTH(W)) dut (.*);

  always #12.5 wclk = ~wclk;
  always #100  rclk = ~rclk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < D; a++) begin
      @(negedge wclk); we = 1; waddr = 5'(a);
      wdata = {$urandom, $urandom, 16'($urandom)}; ref_mem[a] = wdata;
    end
    repeat (50) begin
      @(negedge wclk); we = 1; waddr = 5'($urandom_range(0, D-1));
      wdata = {$urandom, $urandom, 16'($urandom)}; ref_mem[waddr] = wdata;
    end
    @(negedge wclk); we = 0;
    for (int a = D-1; a >= 0; a--) begin
      @(negedge rclk); re = 1; raddr = 5'(a);
      @(posedge rclk); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("addr %0d", a); end
    end
    @(negedge rclk); re = 0; raddr = 5'd3;
    @(posedge rclk); #1; checks++;
    if (rdata !== ref_mem[0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
