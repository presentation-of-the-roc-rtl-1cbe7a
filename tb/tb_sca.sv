// tb_sca: writes every column of a small SCA with a random pulse shape per
// channel (rising then falling), and checks that each cell kept the peak of
// its pulse, that later input changes leave held cells alone, and that the
// read port returns the addressed column.
module tb_sca;
  timeunit 1ns; timeprecision 100ps;
  localparam int N = 4, D = 8, AW = 16;
  logic track = 0, hold = 0;
  logic [2:0] wcol = '0, rcol = '0;
  logic [N-1:0][AW-1:0] vin = '0, vout;
  logic [N-1:0][AW-1:0] peak [D];
  int checks = 0, failures = 0;

  sca #(.N_CH(N), .DEPTH(D), .AMP_W(AW)) dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int c = 0; c < D; c++) begin
      logic [N-1:0][AW-1:0] amp;
      for (int ch = 0; ch < N; ch++) amp[ch] = AW'($urandom_range(100, 2000));
      peak[c] = amp;
      vin = '0; wcol = 3'(c); #10;
      track = 1; #10;
      for (int s = 1; s <= 4; s++) begin        // rising edge of the pulse
        for (int ch = 0; ch < N; ch++) vin[ch] = AW'(amp[ch] * s / 4);
        #10;
      end
      for (int s = 3; s >= 0; s--) begin        // falling edge
        for (int ch = 0; ch < N; ch++) vin[ch] = AW'(amp[ch] * s / 4);
        #10;
      end
      hold = 1; track = 0; #10;
      vin = '1; #10;                            // after hold: ignored
      hold = 0; #10;
    end
    for (int c = D-1; c >= 0; c--) begin
      rcol = 3'(c); #5;
      for (int ch = 0; ch < N; ch++) begin
        checks++;
        if (vout[ch] !== peak[c][ch]) begin
          failures++; $display("col %0d ch %0d got %0d exp %0d", c, ch, vout[ch], peak[c][ch]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
