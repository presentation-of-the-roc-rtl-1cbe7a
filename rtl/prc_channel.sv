// prc_channel: independent channel manager of the autonomous PARISROC-style
// chip. Acquisition never stops in this chip, so every channel keeps its own
// small stack of SCA cells. A rising edge on the channel's discriminator
// output, when a cell is free, starts the track and hold of the next cell
// and records the coarse time stamp; HOLD_DELAY cycles later the cell is
// held and becomes pending. A trigger that finds every cell in use, or that
// comes while a cell is still being held, is lost and counted. The
// sequencer takes pending cells oldest first and releases them with pop.
// Per-channel independence and stacking triggers into the SCA while it is
// not full follow the chip's description; the stack depth, the hold delay
// and the time-stamp width are this design's choices.
// Ports: clk, rst_n, trig discriminator output, ts time-stamp counter,
// sca_track/sca_hold/sca_wcol/sca_rcol control of the channel's SCA,
// pending a held cell waits, head_ts its time stamp, pop release it,
// n_lost triggers lost because the SCA was full.
module prc_channel #(
  parameter int unsigned SCA_DEPTH  = 2,
  parameter int unsigned TS_W       = 24,
  parameter int unsigned HOLD_DELAY = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         trig,
  input  logic [TS_W-1:0]              ts,
  output logic                         sca_track,
  output logic                         sca_hold,
  output logic [$clog2(SCA_DEPTH)-1:0] sca_wcol,
  output logic [$clog2(SCA_DEPTH)-1:0] sca_rcol,
  output logic                         pending,
  output logic [TS_W-1:0]              head_ts,
  input  logic                         pop,
  output logic [15:0]                  n_lost
);
  timeunit 1ns; timeprecision 100ps;
  localparam int unsigned AW = (SCA_DEPTH > 1) ? $clog2(SCA_DEPTH) : 1;

  logic [TS_W-1:0] ts_mem [SCA_DEPTH];
  logic [AW-1:0]   wptr, rptr;
  logic [AW:0]     n_held, n_used;   // held cells / cells in use (incl. tracking)
  logic            trig_q, holding;
  logic [3:0]      hold_cnt;
  logic            trig_rise;

  assign trig_rise = trig & ~trig_q;
  assign pending   = (n_held != '0);
  assign head_ts   = ts_mem[rptr];
  assign sca_wcol  = wptr;
  assign sca_rcol  = rptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_q    <= 1'b0;
      holding   <= 1'b0;
      hold_cnt  <= '0;
      wptr      <= '0;
      rptr      <= '0;
      n_held    <= '0;
      n_used    <= '0;
      sca_track <= 1'b0;
      sca_hold  <= 1'b0;
      n_lost    <= '0;
      for (int i = 0; i < SCA_DEPTH; i++) ts_mem[i] <= '0;
    end else begin
      trig_q   <= trig;
      sca_hold <= 1'b0;
      if (holding) begin
        if (hold_cnt <= 4'd1) begin
          holding   <= 1'b0;
          sca_track <= 1'b0;
          sca_hold  <= 1'b1;
          wptr      <= (wptr == AW'(SCA_DEPTH-1)) ? '0 : wptr + 1'b1;
        end else hold_cnt <= hold_cnt - 1'b1;
      end
      if (trig_rise) begin
        if (holding || n_used == (AW+1)'(SCA_DEPTH)) n_lost <= n_lost + 1'b1;
        else begin
          ts_mem[wptr] <= ts;
          sca_track    <= 1'b1;
          holding      <= 1'b1;
          hold_cnt     <= 4'(HOLD_DELAY);
        end
      end
      // occupancy bookkeeping
      n_used <= n_used + (AW+1)'(trig_rise && !holding && n_used != (AW+1)'(SCA_DEPTH))
                       - (AW+1)'(pop && pending);
      n_held <= n_held + (AW+1)'(holding && hold_cnt <= 4'd1)
                       - (AW+1)'(pop && pending);
      if (pop && pending) rptr <= (rptr == AW'(SCA_DEPTH-1)) ? '0 : rptr + 1'b1;
    end
  end
endmodule
