// readout_ctrl: daisy-chained serial readout of one ROC chip.
// All chips of a chain share two lines towards the DAQ, Data and
// TransmitOn, and talk one after the other. This block is woken by the
// internal StartReadout of its power-on module. It then sends every stored
// frame, most significant bit first, one bit per readout clock, holding
// TransmitOn high while it drives Data. Each frame is the chip identifier
// followed by the RAM word (BCID, hit pattern and, in an analog chip, the
// ADC codes). When the last frame is out, or at once if the memory is
// empty, it gives the one-cycle EndReadout pulse that is both the
// StartReadout of the next chip and the stop request for its own power-on
// module. Daisy chaining, the two shared lines and EndReadout as the next
// chip's StartReadout follow the chips' readout scheme; the frame format and
// the identifier are this design's choices.
// Timing: outputs are registered on the readout clock; the DAQ samples Data
// on the falling edge. A frame of FRAME_W+ID_W bits takes that many clocks
// plus two for the RAM read.
// Ports: clk gated readout clock, rst_n chip reset, start internal
// StartReadout, chip_id, n_frames, re/raddr/rdata RAM read, data_o and tx_on
// drives of the shared lines, end_ro EndReadout, busy, n_sent frames sent.
module readout_ctrl
  import roc_pkg::*;
#(
  parameter int unsigned DEPTH   = 32,
  parameter int unsigned FRAME_W = 80,
  parameter int unsigned ID_W    = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [ID_W-1:0]          chip_id,
  input  logic [$clog2(DEPTH):0]   n_frames,
  output logic                     re,
  output logic [$clog2(DEPTH)-1:0] raddr,
  input  logic [FRAME_W-1:0]       rdata,
  output logic                     data_o,
  output logic                     tx_on,
  output logic                     end_ro,
  output logic                     busy,
  output logic [$clog2(DEPTH):0]   n_sent
);
  timeunit 1ns; timeprecision 100ps;
  localparam int unsigned SH_W = FRAME_W + ID_W;

  ro_state_e                 state;
  logic                      ld_phase;
  logic [SH_W-1:0]           shreg;
  logic [$clog2(SH_W+1)-1:0] bitcnt;

  assign re    = (state == RO_LOAD) && !ld_phase;
  assign raddr = n_sent[$clog2(DEPTH)-1:0];
  assign busy  = (state != RO_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= RO_IDLE;
      ld_phase <= 1'b0;
      shreg    <= '0;
      bitcnt   <= '0;
      data_o   <= 1'b0;
      tx_on    <= 1'b0;
      end_ro   <= 1'b0;
      n_sent   <= '0;
    end else begin
      end_ro <= 1'b0;
      unique case (state)
        RO_IDLE: if (start) begin
          n_sent   <= '0;
          ld_phase <= 1'b0;
          if (n_frames == '0) begin
            state  <= RO_END;
            end_ro <= 1'b1;
          end else state <= RO_LOAD;
        end
        RO_LOAD: begin
          if (!ld_phase) ld_phase <= 1'b1;
          else begin
            ld_phase <= 1'b0;
            shreg    <= {chip_id, rdata};
            bitcnt   <= '0;
            state    <= RO_SHIFT;
          end
        end
        RO_SHIFT: begin
          if (bitcnt == ($clog2(SH_W+1))'(SH_W)) begin
            tx_on  <= 1'b0;
            data_o <= 1'b0;
            n_sent <= n_sent + 1'b1;
            if (n_sent + 1'b1 == n_frames) begin
              state  <= RO_END;
              end_ro <= 1'b1;
            end else state <= RO_LOAD;
          end else begin
            tx_on  <= 1'b1;
            data_o <= shreg[SH_W-1];
            shreg  <= {shreg[SH_W-2:0], 1'b0};
            bitcnt <= bitcnt + 1'b1;
          end
        end
        RO_END: state <= RO_IDLE;
        default: state <= RO_IDLE;
      endcase
    end
  end

  // EndReadout is a calibrated one-cycle pulse, and nothing is driven on
  // the shared lines once it has been given.
  assert property (@(posedge clk) disable iff (!rst_n) end_ro |=> !end_ro && !tx_on)
    else $error("EndReadout longer than one cycle or Data driven after it");
endmodule
