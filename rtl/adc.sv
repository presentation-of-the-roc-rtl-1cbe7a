// adc: behavioural model of one channel's analog-to-digital converter.
// This is a model of a mixed-signal block, not synthesizable logic.
// A pulse on start samples the input level; CONV_CYCLES clock cycles later
// the code appears on code and done pulses for one cycle. The transfer is
// code = vin * 2^BITS / 2^FS_LOG2 (full scale 2048 mV by default),
// saturated at full scale. The default of 3744 cycles at 40 MHz, with the
// 6 cycles of sequencing around it, is one conversion of the ILC budget of
// 3 ms for 32 conversions. Resolution, full scale and conversion time are
// this design's choices; the converter's architecture is not modelled.
// Ports: clk, rst_n, start, vin (mV), busy, done, code.
module adc #(
  parameter int unsigned BITS        = 12,
  parameter int unsigned AMP_W       = 16,
  parameter int unsigned FS_LOG2     = 11,
  parameter int unsigned CONV_CYCLES = 3744
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [AMP_W-1:0] vin,
  output logic             busy,
  output logic             done,
  output logic [BITS-1:0]  code
);
  timeunit 1ns; timeprecision 100ps;
  int unsigned cnt;
  longint unsigned scaled;
  logic [AMP_W-1:0] vs;

  assign scaled = (longint'(vs) << BITS) >> FS_LOG2;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; code <= '0; cnt <= 0; vs <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; vs <= vin; cnt <= 1;
      end else if (busy) begin
        if (cnt >= CONV_CYCLES) begin
          busy <= 1'b0; done <= 1'b1;
          code <= (scaled > (2**BITS - 1)) ? BITS'(2**BITS - 1) : BITS'(scaled);
        end else cnt <= cnt + 1;
      end
    end
  end
endmodule
