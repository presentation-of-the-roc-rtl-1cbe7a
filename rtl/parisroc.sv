// parisroc: autonomous selective-readout chip (PARISROC-style).
// Unlike the ILC chips, this chip never stops acquiring and needs no DAQ
// sequencing. Every channel is independent: a hit is stored in that
// channel's small SCA stack (prc_channel); the on-chip state machine
// (prc_sequencer) then converts the hit with the ADC and reads it out at
// once, tagged with its channel number, so only hit channels cost readout
// time. Triggers that arrive during a conversion or a readout are stacked
// in the SCA while it has room. A coarse time-stamp counter runs on the
// chip clock and dates every hit.
// Ports: clk chip clock, rst_n reset, trig discriminator outputs, vin
// shaped analog levels (mV), data_o/tx_on serial output, phase sequencer
// phase, n_frames frames sent, n_lost triggers lost to a full SCA.
module parisroc
  import roc_pkg::*;
#(
  parameter int unsigned N_CH        = 16,
  parameter int unsigned SCA_DEPTH   = 2,
  parameter int unsigned TS_W        = 24,
  parameter int unsigned ADC_BITS    = 10,
  parameter int unsigned CONV_CYCLES = 1024
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_CH-1:0]            trig,
  input  logic [N_CH-1:0][AMP_W-1:0] vin,
  output logic                       data_o,
  output logic                       tx_on,
  output phase_e                     phase,
  output logic [31:0]                n_frames,
  output logic [31:0]                n_lost
);
  timeunit 1ns; timeprecision 100ps;
  localparam int unsigned CW = $clog2(N_CH);
  localparam int unsigned SW = $clog2(SCA_DEPTH);

  logic [TS_W-1:0]             ts;
  logic [N_CH-1:0]             pending, pop;
  logic [N_CH-1:0][TS_W-1:0]   head_ts;
  logic [N_CH-1:0][AMP_W-1:0]  cell_v;
  logic [N_CH-1:0][15:0]       lost_ch;
  logic [CW-1:0]               sel;
  logic                        adc_start, adc_done, adc_busy;
  logic [ADC_BITS-1:0]         adc_code;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ts <= '0;
    else        ts <= ts + 1'b1;

  for (genvar ch = 0; ch < N_CH; ch++) begin : g_ch
    logic          track, hold;
    logic [SW-1:0] wcol, rcol;

    prc_channel #(.SCA_DEPTH(SCA_DEPTH), .TS_W(TS_W)) u_mgr (
      .clk(clk), .rst_n(rst_n), .trig(trig[ch]), .ts(ts),
      .sca_track(track), .sca_hold(hold), .sca_wcol(wcol), .sca_rcol(rcol),
      .pending(pending[ch]), .head_ts(head_ts[ch]), .pop(pop[ch]),
      .n_lost(lost_ch[ch])
    );

    sca #(.N_CH(1), .DEPTH(SCA_DEPTH), .AMP_W(AMP_W)) u_sca (
      .track(track), .hold(hold), .wcol(wcol), .vin(vin[ch]),
      .rcol(rcol), .vout(cell_v[ch])
    );
  end

  adc #(.BITS(ADC_BITS), .AMP_W(AMP_W), .CONV_CYCLES(CONV_CYCLES)) u_adc (
    .clk(clk), .rst_n(rst_n), .start(adc_start), .vin(cell_v[sel]),
    .busy(adc_busy), .done(adc_done), .code(adc_code)
  );

  prc_sequencer #(.N_CH(N_CH), .TS_W(TS_W), .ADC_BITS(ADC_BITS)) u_seq (
    .clk(clk), .rst_n(rst_n), .pending(pending), .head_ts(head_ts),
    .pop(pop), .sel(sel), .adc_start(adc_start), .adc_done(adc_done),
    .adc_code(adc_code), .data_o(data_o), .tx_on(tx_on), .phase(phase),
    .n_frames(n_frames)
  );

  always_comb begin
    n_lost = '0;
    for (int ch = 0; ch < N_CH; ch++) n_lost = n_lost + 32'(lost_ch[ch]);
  end
endmodule
