// roc_top_bench: stimulus and checker shared by the end-to-end testbenches
// of roc_top. It plays the DAQ of both ILC chains through one full cycle
// (PowerON during reset, acquisition window with events, conversion,
// PowerON release, daisy-chained readout of the digital chain then of the
// analog chain) while hits keep arriving at the autonomous chip. Every
// frame read from a chain's shared lines is compared with a frame worked
// out from the stimulus: identifier, BCID, hit pattern and, for the analog
// chain, codes floor(v*4096/2048). For the autonomous chip every frame must
// match a hit sent on that channel, and read plus lost must equal sent.
// It counts how often each mechanism happened (asynchronous power-up,
// synchronous power-down, memory full, empty chip passing the token, token
// handover, conversion, track and hold, stacking and loss in the autonomous
// chip) and fails on any that never did.
module roc_top_bench
  import roc_pkg::*;
#(
  parameter int NC = 4, N = 64, D = 32, CC = 3744, P_N = 16, P_CC = 1024, P_HITS = 40, P_GAP = 400
) (
  output logic                          clk40, clk5, pclk,
  output logic                          d_pwr_on, d_rst_n, d_acq_on, d_start_ro,
  output logic [NC-1:0][N-1:0]          d_trig,
  input  logic                          d_end_ro, d_data, d_transmit_on,
  input  logic [NC-1:0]                 d_lvds_en,
  output logic                          a_pwr_on, a_rst_n, a_acq_on, a_start_ro,
  output logic [NC-1:0][N-1:0]          a_trig,
  output logic [NC-1:0][N-1:0][AMP_W-1:0] a_vin,
  input  logic                          a_end_ro, a_data, a_transmit_on,
  input  logic [NC-1:0]                 a_lvds_en, a_conv_done,
  output logic                          p_rst_n,
  output logic [P_N-1:0]                p_trig,
  output logic [P_N-1:0][AMP_W-1:0]     p_vin,
  input  logic                          p_data, p_transmit_on,
  input  phase_e                        p_phase,
  input  logic [31:0]                   p_n_frames, p_n_lost
);
  timeunit 1ns; timeprecision 100ps;
  localparam int BW = 16, AB = 12, PAB = 10, PTS = 24, PCW = $clog2(P_N);
  localparam int FWD = 8 + BW + N, FWA = FWD + N * AB, FWP = PCW + PTS + PAB;

  int checks = 0, failures = 0;
  // mechanism counters
  int m_pwr_up = 0, m_pwr_down = 0, m_full = 0, m_empty_pass = 0, m_handover = 0;
  int m_conv = 0, m_hold = 0, m_stack = 0, m_lost = 0, m_frames_p = 0;

  initial begin clk40 = 0; clk5 = 0; pclk = 0; end
  always #12.5 clk40 = ~clk40;
  always #100  clk5  = ~clk5;
  always #12.5 pclk  = ~pclk;

  task automatic check(input bit c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- ILC chains: DAQ receivers ----------------
  logic [FWD-1:0] shd, got_d [$], exp_d [$];
  logic [FWA-1:0] sha, got_a [$], exp_a [$];
  int nbd = 0, nba = 0;
  always @(negedge clk5) begin
    if (d_transmit_on) begin shd = {shd[FWD-2:0], d_data}; if (++nbd == FWD) begin got_d.push_back(shd); nbd = 0; end end
    if (a_transmit_on) begin sha = {sha[FWA-2:0], a_data}; if (++nba == FWA) begin got_a.push_back(sha); nba = 0; end end
  end
  int bcid_ref = 0;
  logic [NC-1:0] d_lvds_en_q = '0, a_lvds_en_q = '0;
  always @(posedge clk40) if (d_acq_on) bcid_ref++;

  // during readout (PowerON low) a chip's receivers come on while the
  // previous chip's are still on only at a token handover, and never are
  // more than two chips of a chain powered
  int max_ro_pow = 0;
  always @(posedge clk5) begin
    if (!d_pwr_on && !a_pwr_on && d_rst_n) begin
      for (int k = 1; k < NC; k++)
        if ((d_lvds_en[k] && !d_lvds_en_q[k] && d_lvds_en[k-1]) ||
            (a_lvds_en[k] && !a_lvds_en_q[k] && a_lvds_en[k-1])) m_handover++;
      if ($countones(d_lvds_en) > max_ro_pow) max_ro_pow = $countones(d_lvds_en);
      if ($countones(a_lvds_en) > max_ro_pow) max_ro_pow = $countones(a_lvds_en);
    end
    d_lvds_en_q <= d_lvds_en; a_lvds_en_q <= a_lvds_en;
  end

  logic [FWD-1:0] qd [NC][$];
  logic [FWA-1:0] qa [NC][$];
  int nev [NC];

  task automatic event_on(input int chip);
    logic [N-1:0] h; logic [N*AB-1:0] codes;
    h = N'({$urandom, $urandom, $urandom}) | N'(1);
    for (int ch = 0; ch < N; ch++) begin
      int v = h[ch] ? $urandom_range(0, 2300) : 0;
      int c = (v * 4096) / 2048; if (c > 4095) c = 4095;
      a_vin[chip][ch] = AMP_W'(v);
      codes[ch*AB +: AB] = AB'(c);
    end
    @(negedge clk40);
    d_trig[chip] = h; a_trig[chip] = h;
    if (nev[chip] < D) begin
      qd[chip].push_back({8'(chip + 1), BW'(bcid_ref), h});
      qa[chip].push_back({8'(chip + 1), BW'(bcid_ref), h, codes});
    end else m_full++;
    nev[chip]++;
    @(negedge clk40); d_trig = '0; a_trig = '0;
    repeat (6) @(negedge clk40);
    a_vin[chip] = '0;
    m_hold++;
  endtask

  // ---------------- autonomous chip ----------------
  typedef struct { int ts; int code; } phit_t;
  phit_t psent [P_N][$];
  int p_sent = 0, p_got = 0, tsref = 0, p_done = 0;
  always @(posedge pclk) if (p_rst_n) tsref++;
  logic [FWP-1:0] shp; int nbp = 0;
  always @(negedge pclk) if (p_transmit_on) begin
    shp = {shp[FWP-2:0], p_data};
    if (++nbp == FWP) begin
      int ch, ts, code, k;
      nbp = 0; p_got++;
      ch = int'(shp[FWP-1 -: PCW]); ts = int'(shp[PAB +: PTS]); code = int'(shp[PAB-1:0]);
      k = -1;
      foreach (psent[ch][i]) if (k < 0 && psent[ch][i].ts == ts) k = i;
      check(k >= 0, $sformatf("autonomous frame ch %0d ts %0d matches a hit", ch, ts));
      if (k >= 0) begin
        check(psent[ch][k].code == code, $sformatf("autonomous code ch %0d", ch));
        for (int j = 0; j <= k; j++) void'(psent[ch].pop_front());
      end
    end
  end

  initial begin
    p_rst_n = 1; p_trig = '0; p_vin = '0;
    #1 p_rst_n = 0;
    #100 p_rst_n = 1;
    repeat (P_HITS) begin
      logic [P_N-1:0] h;
      repeat ($urandom_range(5, P_GAP)) @(negedge pclk);
      h = P_N'($urandom);
      if (($urandom % 4) == 0) h = '1;
      if (p_phase != PH_ACQ) m_stack++;
      for (int ch = 0; ch < P_N; ch++) if (h[ch]) begin
        int v = $urandom_range(0, 2500);
        int c = (v * 1024) / 2048; if (c > 1023) c = 1023;
        p_vin[ch] = AMP_W'(v);
        psent[ch].push_back('{tsref, c});
        p_sent++;
      end
      p_trig = h;
      @(negedge pclk) p_trig = '0;
      repeat (5) @(negedge pclk);
      p_vin = '0;
    end
    p_done = 1;
  end

  // ---------------- ILC cycle ----------------
  realtime t_mark, t_conv, t_ro_d, t_ro_a;

  initial begin
    d_pwr_on = 0; d_rst_n = 1; d_acq_on = 0; d_start_ro = 0; d_trig = '0;
    a_pwr_on = 0; a_rst_n = 1; a_acq_on = 0; a_start_ro = 0; a_trig = '0; a_vin = '0;
    foreach (nev[k]) nev[k] = 0;
    #1 d_rst_n = 0; a_rst_n = 0;
    #2000;
    check(d_lvds_en == '0 && a_lvds_en == '0, "chains unpowered before the cycle");
    // PowerON during reset: receivers biased at once
    d_pwr_on = 1; a_pwr_on = 1; #1;
    if (&d_lvds_en && &a_lvds_en) m_pwr_up++;
    #300 d_rst_n = 1; a_rst_n = 1; #200;
    @(negedge clk40) d_acq_on = 1; a_acq_on = 1;
    // chip 0: one more event than the memory holds; chip 1: none; others: a few
    for (int i = 0; i <= D; i++) event_on(0);
    for (int k = 2; k < NC; k++) repeat (1 + k) event_on(k);
    if (NC > 2) event_on(NC - 1);
    repeat (5) @(negedge clk40);
    d_acq_on = 0; a_acq_on = 0;
    t_mark = $realtime;
    wait (&a_conv_done);
    m_conv++;
    begin
      // one conversion = ADC time + 6 sequencing cycles, all channels at once
      int maxev = 0;
      foreach (nev[k]) if ((nev[k] > D ? D : nev[k]) > maxev) maxev = (nev[k] > D ? D : nev[k]);
      t_conv = $realtime - t_mark;
      check(t_conv >= maxev * (CC + 6) * 25.0 && t_conv <= maxev * (CC + 6) * 25.0 + 150.0,
            $sformatf("conversion of %0d columns took %0t ns", maxev, t_conv));
    end
    #100 d_pwr_on = 0; a_pwr_on = 0;
    #400;
    if (d_lvds_en == '0 && a_lvds_en == '0) m_pwr_down++;
    check(d_lvds_en == '0 && a_lvds_en == '0, "receivers off after PowerON release");
    // expected frames in chain order
    for (int k = 0; k < NC; k++) begin
      foreach (qd[k][i]) exp_d.push_back(qd[k][i]);
      foreach (qa[k][i]) exp_a.push_back(qa[k][i]);
      if (nev[k] == 0) m_empty_pass++;
    end
    t_mark = $realtime;
    d_start_ro = 1; #150 d_start_ro = 0;
    wait (d_end_ro);
    t_ro_d = $realtime - t_mark;
    // serial time of all frames plus, per chip, receiver wake-up and token
    // synchronization (under 2 us)
    check(t_ro_d >= exp_d.size() * (FWD + 3) * 200.0 && t_ro_d <= exp_d.size() * (FWD + 3) * 200.0 + NC * 2000.0,
          $sformatf("digital chain readout took %0t ns", t_ro_d));
    #1000;
    check(got_d.size() == exp_d.size(), $sformatf("digital frames %0d exp %0d", got_d.size(), exp_d.size()));
    foreach (got_d[i]) if (i < exp_d.size()) check(got_d[i] === exp_d[i], $sformatf("digital frame %0d", i));
    t_mark = $realtime;
    a_start_ro = 1; #150 a_start_ro = 0;
    wait (a_end_ro);
    t_ro_a = $realtime - t_mark;
    check(t_ro_a >= exp_a.size() * (FWA + 3) * 200.0 && t_ro_a <= exp_a.size() * (FWA + 3) * 200.0 + NC * 2000.0,
          $sformatf("analog chain readout took %0t ns", t_ro_a));
    #1000;
    check(got_a.size() == exp_a.size(), $sformatf("analog frames %0d exp %0d", got_a.size(), exp_a.size()));
    foreach (got_a[i]) if (i < exp_a.size()) check(got_a[i] === exp_a[i], $sformatf("analog frame %0d", i));
    check(d_lvds_en == '0 && a_lvds_en == '0, "receivers off after readout");
    // autonomous chip: let it drain
    wait (p_done);
    repeat (P_N * 2 * (P_CC + FWP + 10)) @(negedge pclk);
    m_lost = int'(p_n_lost); m_frames_p = p_got;
    check(p_got == int'(p_n_frames), "autonomous frames counted");
    check(p_got + int'(p_n_lost) == p_sent, $sformatf("autonomous read %0d + lost %0d != sent %0d", p_got, p_n_lost, p_sent));
    // ILC budgets: 3 ms for the conversions, 4 ms for a chip's readout
    check(t_conv <= 3.0e6 + 150.0, "conversion within the 3 ms budget");
    check(t_ro_d <= 4.0e6, "digital chain readout within the 4 ms budget");
    $display("times: conversion %0.1f us, digital chain readout %0.1f us, analog chain readout %0.1f us",
             t_conv / 1000.0, t_ro_d / 1000.0, t_ro_a / 1000.0);
    $display("mechanisms: power-up %0d power-down %0d memory-full %0d empty-pass %0d handover %0d conversion %0d track-hold %0d stacked %0d lost %0d selective-frames %0d",
             m_pwr_up, m_pwr_down, m_full, m_empty_pass, m_handover, m_conv, m_hold, m_stack, m_lost, m_frames_p);
    check(m_pwr_up > 0, "asynchronous power-up");
    check(m_pwr_down > 0, "synchronous power-down");
    check(m_full > 0, "memory full");
    check(m_empty_pass > 0, "empty chip passes the token");
    check(m_handover > 0, "token handover");
    check(max_ro_pow <= 2, $sformatf("%0d chips of a chain powered at once during readout", max_ro_pow));
    check(m_conv > 0, "conversion");
    check(m_hold > 0, "track and hold");
    check(m_stack > 0, "hits stacked during conversion or readout");
    check(m_lost > 0, "SCA overflow in the autonomous chip");
    check(m_frames_p > 0, "selective readout frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
