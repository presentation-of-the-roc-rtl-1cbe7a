// roc_pkg: constants and types shared by the ROC readout blocks.
// The channel count (up to 64) and the memory depth (32 conversions per
// acquisition cycle, the worst case of the ILC timing budget) follow the
// ILC chip description. The clock periods are those of the ILC chips:
// a 40 MHz acquisition clock (the highest frequency of the power-on module)
// and a 5 MHz readout clock. The remaining widths are this design's choices.
package roc_pkg;
  timeunit 1ns; timeprecision 100ps;
  localparam int unsigned N_CH_DEF      = 64;   // channels per ILC chip
  localparam int unsigned DEPTH_DEF     = 32;   // SCA columns / RAM frames
  localparam int unsigned ADC_BITS_DEF  = 12;   // ADC resolution (own choice)
  localparam int unsigned BCID_W_DEF    = 16;   // bunch-crossing counter width
  localparam int unsigned AMP_W         = 16;   // analog amplitude, in mV
  localparam int unsigned CONV_CYC_DEF  = 3744; // 3 ms / 32 conversions at 40 MHz,
                                                // less 6 cycles of sequencing
  localparam int unsigned N_CHIPS_DEF   = 4;    // chips on one daisy chain
  localparam real         CLK_NS        = 25.0;  // 40 MHz acquisition clock
  localparam real         RCLK_NS       = 200.0; // 5 MHz readout clock
  localparam real         LVDS_WAKE_NS  = 150.0; // shorter than the 200 ns reset

  // Phase of an ILC chip, as seen from its sequencing logic.
  typedef enum logic [1:0] {
    PH_IDLE    = 2'd0,
    PH_ACQ     = 2'd1,
    PH_CONV    = 2'd2,
    PH_READOUT = 2'd3
  } phase_e;

  // Readout state machine of the daisy chain.
  typedef enum logic [1:0] {
    RO_IDLE  = 2'd0,
    RO_LOAD  = 2'd1,
    RO_SHIFT = 2'd2,
    RO_END   = 2'd3
  } ro_state_e;
endpackage
