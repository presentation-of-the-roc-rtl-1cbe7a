// conv_ctrl: conversion controller of an analog ILC ROC chip.
// After the acquisition window closes, the SCA columns written during the
// train are converted one after the other: the column is selected on the
// SCA read port, after SETTLE cycles all channel ADCs are started together,
// and when they report done the codes are written into the value RAM at the
// column's address. One conversion covers all channels of one column, so
// 32 stored events mean 32 conversions, the worst case of the ILC timing
// budget. conv_done stays high from the end of the last conversion until
// the next chip reset. The SCA-to-ADC-to-RAM chain follows the description
// of the analog chips; the sequencing details are this design's choices.
// Ports: clk gated acquisition clock, rst_n chip reset, start pulse at the
// end of acquisition, n_frames columns to convert, sca_rcol SCA read
// column, adc_start/adc_done ADC handshake, we/waddr value RAM write,
// busy, conv_done, n_conv conversions done.
module conv_ctrl #(
  parameter int unsigned DEPTH  = 32,
  parameter int unsigned SETTLE = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [$clog2(DEPTH):0]   n_frames,
  output logic [$clog2(DEPTH)-1:0] sca_rcol,
  output logic                     adc_start,
  input  logic                     adc_done,
  output logic                     we,
  output logic [$clog2(DEPTH)-1:0] waddr,
  output logic                     busy,
  output logic                     conv_done,
  output logic [$clog2(DEPTH):0]   n_conv
);
  timeunit 1ns; timeprecision 100ps;
  typedef enum logic [1:0] {C_IDLE, C_SETTLE, C_WAIT, C_NEXT} conv_state_e;
  conv_state_e state;
  logic [3:0]  settle_cnt;

  assign busy  = (state != C_IDLE);
  assign waddr = sca_rcol;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      sca_rcol   <= '0;
      adc_start  <= 1'b0;
      we         <= 1'b0;
      conv_done  <= 1'b0;
      n_conv     <= '0;
      settle_cnt <= '0;
    end else begin
      adc_start <= 1'b0;
      we        <= 1'b0;
      unique case (state)
        C_IDLE: if (start && !conv_done) begin
          sca_rcol <= '0;
          n_conv   <= '0;
          if (n_frames == '0) conv_done <= 1'b1;
          else begin
            state      <= C_SETTLE;
            settle_cnt <= 4'(SETTLE);
          end
        end
        C_SETTLE: begin
          if (settle_cnt == '0) begin
            adc_start <= 1'b1;
            state     <= C_WAIT;
          end else settle_cnt <= settle_cnt - 1'b1;
        end
        C_WAIT: if (adc_done) begin
          we     <= 1'b1;
          n_conv <= n_conv + 1'b1;
          state  <= C_NEXT;
        end
        C_NEXT: begin
          if (n_conv == n_frames) begin
            conv_done <= 1'b1;
            state     <= C_IDLE;
          end else begin
            sca_rcol   <= sca_rcol + 1'b1;
            settle_cnt <= 4'(SETTLE);
            state      <= C_SETTLE;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
