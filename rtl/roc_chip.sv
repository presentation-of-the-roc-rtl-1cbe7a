// roc_chip: the digital readout part of one ILC ROC chip, with its power-on
// module, clock receivers and, in an analog chip, the SCA and ADCs.
// The chip runs through three phases in every ILC cycle. Acquisition: while
// the DAQ holds acq_on, events (a clock with any discriminator output high)
// are stored, in a digital chip (ANALOG=0, HARDROC-like) straight into the
// RAM, in an analog chip (ANALOG=1, SKIROC/SPIROC-like) as BCID and hit
// pattern in the RAM plus the amplitudes held in an SCA column.
// Conversion (analog only): when acq_on falls the SCA columns are converted
// by one ADC per channel and the codes written into a value RAM.
// Readout: the chip waits for StartReadout from the previous chip, sends
// its frames on the shared Data/TransmitOn lines and passes the token on
// with EndReadout. The power-on module keeps both clock receivers and both
// clock domains off outside these phases: PowerON from the DAQ covers
// acquisition and conversion, the token covers readout.
// Ports: clk_p/clk_n 40 MHz and rclk_p/rclk_n 5 MHz clock pairs, pwr_on
// PowerON, rst_n reset (held longer than the receiver wake-up), acq_on
// acquisition window (synchronous to the acquisition clock), trig
// discriminator outputs, vin shaped analog levels in mV (analog chips),
// chip_id, start_ro_in StartReadout, data_o/tx_on drives of the shared lines,
// end_ro_out EndReadout, lvds_en receiver bias, conv_done, n_frames, and
// the two power requests for observation.
module roc_chip
  import roc_pkg::*;
#(
  parameter int unsigned N_CH        = N_CH_DEF,
  parameter int unsigned DEPTH       = DEPTH_DEF,
  parameter int unsigned BCID_W      = BCID_W_DEF,
  parameter int unsigned ADC_BITS    = ADC_BITS_DEF,
  parameter int unsigned CONV_CYCLES = CONV_CYC_DEF,
  parameter bit          ANALOG      = 1'b1,
  parameter int unsigned ID_W        = 8
) (
  input  logic                       clk_p,
  input  logic                       clk_n,
  input  logic                       rclk_p,
  input  logic                       rclk_n,
  input  logic                       pwr_on,
  input  logic                       rst_n,
  input  logic                       acq_on,
  input  logic [N_CH-1:0]            trig,
  input  logic [N_CH-1:0][AMP_W-1:0] vin,
  input  logic [ID_W-1:0]            chip_id,
  input  logic                       start_ro_in,
  output logic                       data_o,
  output logic                       tx_on,
  output logic                       end_ro_out,
  output logic                       lvds_en,
  output logic                       conv_done,
  output logic [$clog2(DEPTH):0]     n_frames,
  output logic                       daq_on,
  output logic                       ro_on
);
  timeunit 1ns; timeprecision 100ps;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned HDR_W = BCID_W + N_CH;
  localparam int unsigned VAL_W = ANALOG ? N_CH * ADC_BITS : 0;
  localparam int unsigned FRAME_W = HDR_W + VAL_W;

  logic clk, rclk, gclk, grclk, start_int;

  lvds_rx #(.WAKE_NS(LVDS_WAKE_NS)) u_rx_clk  (.in_p(clk_p),  .in_n(clk_n),  .en(lvds_en), .out(clk));
  lvds_rx #(.WAKE_NS(LVDS_WAKE_NS)) u_rx_rclk (.in_p(rclk_p), .in_n(rclk_n), .en(lvds_en), .out(rclk));

  pod u_pod (
    .clk(clk), .rclk(rclk), .pwr_on(pwr_on), .rst_n(rst_n),
    .start_ro(start_ro_in), .end_ro(end_ro_out), .lvds_en(lvds_en),
    .gclk(gclk), .grclk(grclk), .start_int(start_int),
    .daq_on(daq_on), .ro_on(ro_on)
  );

  // ---------------- acquisition ----------------
  logic              we;
  logic [AW-1:0]     waddr;
  logic [BCID_W-1:0] wbcid, bcid;
  logic [N_CH-1:0]   whits;
  logic              sca_track, sca_hold, full;
  logic [AW-1:0]     sca_wcol;

  acq_ctrl #(.N_CH(N_CH), .DEPTH(DEPTH), .BCID_W(BCID_W), .ANALOG(ANALOG)) u_acq (
    .clk(gclk), .rst_n(rst_n), .acq_on(acq_on), .trig(trig),
    .we(we), .waddr(waddr), .wbcid(wbcid), .whits(whits),
    .sca_track(sca_track), .sca_hold(sca_hold), .sca_wcol(sca_wcol),
    .n_frames(n_frames), .full(full), .bcid(bcid)
  );

  logic          re;
  logic [AW-1:0] raddr;
  logic [HDR_W-1:0]   hdr_rdata;
  logic [FRAME_W-1:0] frame_rdata;

  ram #(.DEPTH(DEPTH), .WIDTH(HDR_W)) u_hdr_ram (
    .wclk(gclk), .we(we), .waddr(waddr), .wdata({wbcid, whits}),
    .rclk(grclk), .re(re), .raddr(raddr), .rdata(hdr_rdata)
  );

  // ---------------- conversion (analog chips) ----------------
  if (ANALOG) begin : g_analog
    logic [N_CH-1:0][AMP_W-1:0]    vout;
    logic [N_CH-1:0][ADC_BITS-1:0] codes;
    logic [N_CH-1:0]               adc_busy, adc_done;
    logic [AW-1:0]                 rcol, cwaddr;
    logic                          adc_start, cwe, cbusy, acq_q, conv_start;
    logic [AW:0]                   n_conv;
    logic [VAL_W-1:0]              val_rdata;

    sca #(.N_CH(N_CH), .DEPTH(DEPTH), .AMP_W(AMP_W)) u_sca (
      .track(sca_track), .hold(sca_hold), .wcol(sca_wcol), .vin(vin),
      .rcol(rcol), .vout(vout)
    );

    for (genvar ch = 0; ch < N_CH; ch++) begin : g_adc
      adc #(.BITS(ADC_BITS), .AMP_W(AMP_W), .CONV_CYCLES(CONV_CYCLES)) u_adc (
        .clk(gclk), .rst_n(rst_n), .start(adc_start), .vin(vout[ch]),
        .busy(adc_busy[ch]), .done(adc_done[ch]), .code(codes[ch])
      );
    end

    // conversion starts when the acquisition window closes
    always_ff @(posedge gclk or negedge rst_n)
      if (!rst_n) acq_q <= 1'b0;
      else        acq_q <= acq_on;
    assign conv_start = acq_q & ~acq_on;

    conv_ctrl #(.DEPTH(DEPTH)) u_conv (
      .clk(gclk), .rst_n(rst_n), .start(conv_start), .n_frames(n_frames),
      .sca_rcol(rcol), .adc_start(adc_start), .adc_done(&adc_done),
      .we(cwe), .waddr(cwaddr), .busy(cbusy), .conv_done(conv_done),
      .n_conv(n_conv)
    );

    ram #(.DEPTH(DEPTH), .WIDTH(VAL_W)) u_val_ram (
      .wclk(gclk), .we(cwe), .waddr(cwaddr), .wdata(codes),
      .rclk(grclk), .re(re), .raddr(raddr), .rdata(val_rdata)
    );

    assign frame_rdata = {hdr_rdata, val_rdata};
  end else begin : g_digital
    // nothing to convert: the data are ready when acquisition ends
    assign conv_done   = ~acq_on;
    assign frame_rdata = hdr_rdata;
  end

  // ---------------- readout ----------------
  logic          ro_busy;
  logic [AW:0]   n_sent;

  readout_ctrl #(.DEPTH(DEPTH), .FRAME_W(FRAME_W), .ID_W(ID_W)) u_ro (
    .clk(grclk), .rst_n(rst_n), .start(start_int), .chip_id(chip_id),
    .n_frames(n_frames), .re(re), .raddr(raddr), .rdata(frame_rdata),
    .data_o(data_o), .tx_on(tx_on), .end_ro(end_ro_out), .busy(ro_busy),
    .n_sent(n_sent)
  );
endmodule
