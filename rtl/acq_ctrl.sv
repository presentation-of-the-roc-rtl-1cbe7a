// acq_ctrl: acquisition controller of an ILC ROC chip.
// While the DAQ holds acq_on (the bunch-train window) a bunch-crossing
// counter (BCID) advances on every acquisition clock. A clock cycle in which
// any discriminator output is high is an event: its BCID and hit pattern are
// written into the next free RAM frame, as long as the memory is not full.
// In a digital chip that frame is the whole datum. In an analog chip the
// event also starts the track and hold of the next SCA column; the column is
// held HOLD_DELAY cycles later, at the peak of the shaped signal, and new
// triggers are ignored until then. The counters are cleared by the chip
// reset that the DAQ applies before each acquisition.
// Storing hits directly in RAM (digital) or through the SCA (analog)
// follows the chips' high-level description; the frame contents, the
// BCID counter and the hold delay are this design's choices.
// Ports: clk gated acquisition clock, rst_n chip reset, acq_on window,
// trig discriminator outputs, we/waddr/wbcid/whits RAM write,
// sca_track/sca_hold/sca_wcol SCA write control, n_frames frames stored,
// full memory full, bcid current counter.
module acq_ctrl #(
  parameter int unsigned N_CH       = 64,
  parameter int unsigned DEPTH      = 32,
  parameter int unsigned BCID_W     = 16,
  parameter bit          ANALOG     = 1'b1,
  parameter int unsigned HOLD_DELAY = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     acq_on,
  input  logic [N_CH-1:0]          trig,
  output logic                     we,
  output logic [$clog2(DEPTH)-1:0] waddr,
  output logic [BCID_W-1:0]        wbcid,
  output logic [N_CH-1:0]          whits,
  output logic                     sca_track,
  output logic                     sca_hold,
  output logic [$clog2(DEPTH)-1:0] sca_wcol,
  output logic [$clog2(DEPTH):0]   n_frames,
  output logic                     full,
  output logic [BCID_W-1:0]        bcid
);
  timeunit 1ns; timeprecision 100ps;
  localparam int unsigned HW = (HOLD_DELAY < 1) ? 1 : $clog2(HOLD_DELAY + 1);

  logic          holding;
  logic [HW-1:0] hold_cnt;
  logic          event_ok;

  assign full     = (n_frames == ($clog2(DEPTH)+1)'(DEPTH));
  assign event_ok = acq_on && (|trig) && !full && !(ANALOG && holding);
  assign sca_wcol = waddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcid      <= '0;
      n_frames  <= '0;
      we        <= 1'b0;
      waddr     <= '0;
      wbcid     <= '0;
      whits     <= '0;
      sca_track <= 1'b0;
      sca_hold  <= 1'b0;
      holding   <= 1'b0;
      hold_cnt  <= '0;
    end else begin
      we <= 1'b0;
      if (acq_on) bcid <= bcid + 1'b1;
      if (we) waddr <= waddr + 1'b1;
      if (event_ok) begin
        we       <= 1'b1;
        wbcid    <= bcid;
        whits    <= trig;
        n_frames <= n_frames + 1'b1;
        if (ANALOG) begin
          sca_track <= 1'b1;
          sca_hold  <= 1'b0;
          holding   <= 1'b1;
          hold_cnt  <= HW'(HOLD_DELAY);
        end
      end else if (holding) begin
        if (hold_cnt <= HW'(1)) begin
          holding   <= 1'b0;
          sca_track <= 1'b0;
          sca_hold  <= 1'b1;
        end else hold_cnt <= hold_cnt - 1'b1;
      end else begin
        sca_hold <= 1'b0;
      end
    end
  end
endmodule
