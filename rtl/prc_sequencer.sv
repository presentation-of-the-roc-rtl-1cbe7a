// prc_sequencer: autonomous conversion and readout state machine of the
// PARISROC-style chip. No DAQ command is needed: as soon as any channel
// holds a pending SCA cell, the sequencer picks it (round robin from the
// channel after the last one served), routes that cell to the ADC, converts
// it, and sends one frame on Data with TransmitOn high: the channel number,
// the time stamp and the ADC code, most significant bit first, one bit per
// clock. Only hit channels are read, which is why each frame carries its
// channel number. Then it releases the cell and looks again. Acquisition in
// the channels goes on throughout. The autonomous working, the selective
// readout and the channel tag follow the chip's description; the single
// shared ADC, the round-robin order and the frame layout are this design's
// choices.
// Ports: clk, rst_n, pending/head_ts per channel, pop per channel, sel
// channel routed to the ADC, adc_start/adc_done/adc_code ADC handshake,
// data_o/tx_on serial output, phase current phase, n_frames frames sent.
module prc_sequencer
  import roc_pkg::*;
#(
  parameter int unsigned N_CH     = 16,
  parameter int unsigned TS_W     = 24,
  parameter int unsigned ADC_BITS = 10
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_CH-1:0]            pending,
  input  logic [N_CH-1:0][TS_W-1:0]  head_ts,
  output logic [N_CH-1:0]            pop,
  output logic [$clog2(N_CH)-1:0]    sel,
  output logic                       adc_start,
  input  logic                       adc_done,
  input  logic [ADC_BITS-1:0]        adc_code,
  output logic                       data_o,
  output logic                       tx_on,
  output phase_e                     phase,
  output logic [31:0]                n_frames
);
  timeunit 1ns; timeprecision 100ps;
  localparam int unsigned CW   = $clog2(N_CH);
  localparam int unsigned SH_W = CW + TS_W + ADC_BITS;

  logic [SH_W-1:0]           shreg;
  logic [$clog2(SH_W+1)-1:0] bitcnt;
  logic [CW-1:0]             next_ch;
  logic                      found;
  logic [1:0]                settle;

  // round-robin search starting after the last channel served
  always_comb begin
    found   = 1'b0;
    next_ch = '0;
    for (int k = 1; k <= N_CH; k++) begin
      automatic int c = (int'(sel) + k) % N_CH;
      if (!found && pending[c]) begin
        found   = 1'b1;
        next_ch = CW'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_ACQ;
      sel       <= CW'(N_CH - 1);
      adc_start <= 1'b0;
      pop       <= '0;
      shreg     <= '0;
      bitcnt    <= '0;
      data_o    <= 1'b0;
      tx_on     <= 1'b0;
      n_frames  <= '0;
      settle    <= '0;
    end else begin
      adc_start <= 1'b0;
      pop       <= '0;
      unique case (phase)
        PH_ACQ, PH_IDLE: if (found) begin
          sel    <= next_ch;
          settle <= 2'd2;
          phase  <= PH_CONV;
        end
        PH_CONV: begin
          if (settle == 2'd1) adc_start <= 1'b1;
          if (settle != '0) settle <= settle - 1'b1;
          else if (adc_done) begin
            shreg  <= {sel, head_ts[sel], adc_code};
            bitcnt <= '0;
            pop[sel] <= 1'b1;
            phase  <= PH_READOUT;
          end
        end
        PH_READOUT: begin
          if (bitcnt == ($clog2(SH_W+1))'(SH_W)) begin
            tx_on    <= 1'b0;
            data_o   <= 1'b0;
            n_frames <= n_frames + 1;
            phase    <= PH_ACQ;
          end else begin
            tx_on  <= 1'b1;
            data_o <= shreg[SH_W-1];
            shreg  <= {shreg[SH_W-2:0], 1'b0};
            bitcnt <= bitcnt + 1'b1;
          end
        end
        default: phase <= PH_ACQ;
      endcase
    end
  end
endmodule
