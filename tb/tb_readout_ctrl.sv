// tb_readout_ctrl: fills a reference memory with random frames, starts the
// readout and rebuilds the frames from the serial Data line, sampled on the
// falling edge while TransmitOn is high. Checks every bit of every frame
// (chip identifier then RAM word, most significant bit first), the number of
// frames, a single one-cycle EndReadout exactly n*(FRAME_W+ID_W+3) cycles
// after the start, and an immediate EndReadout with an empty memory.
module tb_readout_ctrl;
  timeunit 1ns; timeprecision 100ps;
  localparam int D = 8, FW = 20, IW = 8, SH = FW + IW;
  logic clk = 0, rst_n = 0, start = 0;
  logic [IW-1:0] chip_id = 8'h5A;
  logic [3:0] n_frames = '0, n_sent;
  logic re, data_o, tx_on, end_ro, busy;
  logic [2:0] raddr;
  logic [FW-1:0] rdata, mem [D];
  int checks = 0, failures = 0;

  readout_ctrl #(.DEPTH(D), .FRAME_W(FW), .ID_W(IW)) dut (.*);

  always #100 clk = ~clk;
  always @(posedge clk) if (re) rdata <= mem[raddr];

  logic [SH-1:0] rx;
  int rx_bits = 0, rx_frames = 0, end_pulses = 0, end_len = 0;
  logic [SH-1:0] got [$];
  always @(negedge clk) begin
    if (tx_on) begin
      rx = {rx[SH-2:0], data_o}; rx_bits++;
      if (rx_bits == SH) begin got.push_back(rx); rx_bits = 0; end
    end
    if (end_ro) end_len++;
  end

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input int n);
    int cyc = 0, end_at = -1;
    got.delete(); rx_bits = 0; end_len = 0;
    for (int i = 0; i < D; i++) mem[i] = FW'($urandom);
    n_frames = 4'(n);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (cyc < 2000 && end_at < 0) begin
      if (end_ro) end_at = cyc;
      @(negedge clk); cyc++;
    end
    repeat (4) @(negedge clk);
    checks += 3;
    if (end_at != n * (SH + 3)) begin failures++; $display("n=%0d end at %0d", n, end_at); end
    if (end_len != 1) begin failures++; $display("EndReadout %0d cycles", end_len); end
    if (got.size() != n || rx_bits != 0) begin failures++; $display("frames %0d bits %0d", got.size(), rx_bits); end
    for (int i = 0; i < got.size(); i++) begin
      checks++;
      if (got[i] !== {chip_id, mem[i]}) begin failures++; $display("frame %0d %h", i, got[i]); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(3);
    run(0);
    chip_id = 8'h81;
    run(D);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
