// tb_parisroc: random hits on the channels of a small autonomous chip, some
// simultaneous and some in bursts that overflow a channel's SCA stack. Each
// frame read from Data/TransmitOn (channel, time stamp, ADC code) must match
// a hit that was sent, with code floor(v*1024/2048); within a channel the
// frames come in time order; every hit is either read out once or counted
// lost, and the chip reads out nothing but hit channels. Also counts that
// hits were stacked while a conversion or readout was going on, and that
// losses happened.
module tb_parisroc;
  timeunit 1ns; timeprecision 100ps;
  import roc_pkg::*;
  localparam int N = 4, SD = 2, TS = 24, AB = 10, CC = 30;
  localparam int FW = 2 + TS + AB;

  logic clk = 0, rst_n = 1;
  logic [N-1:0] trig = '0;
  logic [N-1:0][AMP_W-1:0] vin = '0;
  logic data_o, tx_on;
  phase_e phase;
  logic [31:0] n_frames, n_lost;
  int checks = 0, failures = 0;

  parisroc #(.N_CH(N), .SCA_DEPTH(SD), .TS_W(TS), .ADC_BITS(AB), .CONV_CYCLES(CC)) dut (.*);

  always #12.5 clk = ~clk;

  int tsref = 0;
  always @(posedge clk) if (rst_n) tsref++;

  typedef struct { int ts; int code; } hit_t;
  hit_t sent [N][$];
  int n_sent = 0, n_got = 0, stacked = 0, busy_hits = 0;

  logic [FW-1:0] sh; int nb = 0;
  always @(negedge clk) if (tx_on) begin
    sh = {sh[FW-2:0], data_o};
    if (++nb == FW) begin
      int ch, ts, code, k;
      nb = 0; n_got++;
      ch = int'(sh[FW-1 -: 2]); ts = int'(sh[AB +: TS]); code = int'(sh[AB-1:0]);
      k = -1;
      foreach (sent[ch][i]) if (k < 0 && sent[ch][i].ts == ts) k = i;
      checks++;
      if (k < 0) begin failures++; $display("frame ch %0d ts %0d matches no hit", ch, ts); end
      else begin
        // all older hits of this channel must have been read or lost already
        checks++;
        if (sent[ch][k].code != code) begin failures++; $display("ch %0d code %0d exp %0d", ch, code, sent[ch][k].code); end
        for (int j = 0; j < k; j++) sent[ch].pop_front();   // skipped ones were lost
        sent[ch].pop_front();
      end
    end
  end

  task automatic check(input bit c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 rst_n = 0;
    #100 rst_n = 1;
    repeat (60) begin
      logic [N-1:0] h;
      repeat ($urandom_range(5, 150)) @(negedge clk);
      h = N'($urandom);
      if (($urandom % 5) == 0) h = '1;
      if (phase != PH_ACQ) busy_hits++;
      for (int ch = 0; ch < N; ch++) if (h[ch]) begin
        int v = $urandom_range(0, 2500);
        int c = (v * 1024) / 2048; if (c > 1023) c = 1023;
        vin[ch] = AMP_W'(v);
        sent[ch].push_back('{tsref, c});
        n_sent++;
      end
      trig = h;
      @(negedge clk) trig = '0;
      repeat (5) @(negedge clk);
      vin = '0;
    end
    repeat (3000) @(negedge clk);
    check(n_got == int'(n_frames), "frames counted");
    check(n_got + int'(n_lost) == n_sent, $sformatf("read %0d + lost %0d != sent %0d", n_got, n_lost, n_sent));
    check(n_lost > 0, "SCA overflow happened");
    check(busy_hits > 0, "hits arrived during conversion or readout");
    check(phase == PH_ACQ && !tx_on, "idle at the end");
    $display("sent=%0d read=%0d lost=%0d during-busy=%0d", n_sent, n_got, n_lost, busy_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
