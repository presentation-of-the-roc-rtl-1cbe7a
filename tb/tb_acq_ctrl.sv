// tb_acq_ctrl: drives random discriminator patterns during an acquisition
// window and compares every RAM write (address, BCID, hit pattern) with a
// reference model that applies the analog dead time (HOLD_DELAY cycles
// after each event) and the memory-full limit. Also checks that the SCA
// column is held HOLD_DELAY cycles after its track starts, that the
// memory fills, and that nothing is written outside the window. A second
// instance in digital mode (no dead time) is checked the same way.
module tb_acq_ctrl;
  timeunit 1ns; timeprecision 100ps;
  localparam int N = 8, D = 8, BW = 16, HD = 4;
  logic clk = 0, rst_n = 0, acq_on = 0;
  logic [N-1:0] trig = '0;
  int checks = 0, failures = 0;

  // analog instance
  logic we, sca_track, sca_hold, full;
  logic [2:0] waddr, sca_wcol;
  logic [BW-1:0] wbcid, bcid;
  logic [N-1:0] whits;
  logic [3:0] n_frames;
  acq_ctrl #(.N_CH(N), .DEPTH(D), .BCID_W(BW), .ANALOG(1'b1), .HOLD_DELAY(HD)) dut (.*);

  // digital instance
  logic dwe, dtr, dho, dfull;
  logic [2:0] dwaddr, dwcol;
  logic [BW-1:0] dwbcid, dbcid;
  logic [N-1:0] dwhits;
  logic [3:0] dn;
  acq_ctrl #(.N_CH(N), .DEPTH(D), .BCID_W(BW), .ANALOG(1'b0), .HOLD_DELAY(HD)) dut_d (
    .clk(clk), .rst_n(rst_n), .acq_on(acq_on), .trig(trig), .we(dwe), .waddr(dwaddr),
    .wbcid(dwbcid), .whits(dwhits), .sca_track(dtr), .sca_hold(dho), .sca_wcol(dwcol),
    .n_frames(dn), .full(dfull), .bcid(dbcid));

  always #12.5 clk = ~clk;

  typedef struct { int bcid; logic [N-1:0] hits; } ev_t;
  ev_t exp_a[$], exp_d[$];
  int ref_bcid = 0, dead = 0, na = 0, nd = 0, track_at = -1, cyc = 0, n_holds = 0;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference model and monitors, evaluated at each rising edge
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (acq_on && trig != '0) begin
      if (dead == 0 && na < D) begin exp_a.push_back('{ref_bcid, trig}); na++; dead = HD; end
      else if (dead > 0) dead--;
      if (nd < D) begin exp_d.push_back('{ref_bcid, trig}); nd++; end
    end else if (dead > 0) dead--;
    if (acq_on) ref_bcid++;
  end

  always @(negedge clk) if (rst_n) begin
    if (we) begin
      ev_t e;
      checks++;
      if (exp_a.size() == 0) begin failures++; $display("unexpected write"); end
      else begin
        e = exp_a.pop_front();
        if (wbcid !== BW'(e.bcid) || whits !== e.hits || waddr !== 3'(na - 1 - exp_a.size())) begin
          failures++; $display("A: bcid %0d/%0d hits %h/%h", wbcid, e.bcid, whits, e.hits);
        end
      end
    end
    if (dwe) begin
      ev_t e;
      checks++;
      if (exp_d.size() == 0) begin failures++; $display("unexpected digital write"); end
      else begin
        e = exp_d.pop_front();
        if (dwbcid !== BW'(e.bcid) || dwhits !== e.hits) begin
          failures++; $display("D: bcid %0d/%0d", dwbcid, e.bcid);
        end
      end
    end
  end

  // hold timing: rising edge of hold HD cycles after rising edge of track
  logic tr_q = 0, ho_q = 0;
  always @(posedge clk) begin
    if (sca_track && !tr_q) track_at = cyc;
    if (sca_hold && !ho_q) begin
      n_holds++; checks++;
      if (cyc - track_at != HD) begin failures++; $display("hold after %0d", cyc - track_at); end
    end
    tr_q <= sca_track; ho_q <= sca_hold;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (5) @(negedge clk) trig = N'($urandom);   // outside the window: ignored
    @(negedge clk) trig = '0; acq_on = 1;
    repeat (120) begin
      @(negedge clk);
      trig = (($urandom % 4) == 0) ? N'($urandom | 1) : '0;
    end
    @(negedge clk) trig = '0; acq_on = 0;
    repeat (10) @(negedge clk) trig = N'($urandom);
    trig = '0;
    repeat (10) @(negedge clk);
    checks += 5;
    if (exp_a.size() != 0 || exp_d.size() != 0) begin failures++; $display("missing writes"); end
    if (n_frames != 4'(na) || dn != 4'(nd)) failures++;
    if (!dfull || nd != D) begin failures++; $display("digital did not fill: %0d", nd); end
    if (n_holds != na) begin failures++; $display("holds %0d events %0d", n_holds, na); end
    if (bcid != 16'(ref_bcid)) failures++;
    $display("events analog=%0d digital=%0d", na, nd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
