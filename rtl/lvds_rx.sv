// lvds_rx: behavioural model of an LVDS clock receiver with switchable bias.
// This is a model of an analog receiver, not synthesizable logic.
// When the bias enable (en) rises, the receiver needs WAKE_NS nanoseconds
// before its output follows the differential input; while it is disabled or
// still waking up its output rests at logic 0. Disabling the bias cuts the
// output at once. The receiver's own power-up time is not given beyond being
// shorter than the roughly 200 ns reset startup time, so WAKE_NS is a chosen
// value below it.
// Ports: in_p/in_n differential input, en bias enable, out single-ended out.
module lvds_rx #(
  parameter real WAKE_NS = 150.0
) (
  input  logic in_p,
  input  logic in_n,
  input  logic en,
  output logic out
);
  timeunit 1ns; timeprecision 100ps;
  logic awake;

  initial awake = 1'b0;

  always begin
    wait (en);
    #(WAKE_NS);
    if (en) begin
      awake = 1'b1;
      wait (!en);
      awake = 1'b0;
    end
  end

  assign out = awake & in_p & ~in_n;
endmodule
