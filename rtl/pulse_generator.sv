// Behavioural model of an edge-triggered pulse generator. Not synthesizable:
// the real circuit is an AND of a signal and a delayed, inverted copy of it,
// and its pulse width is set by gate delays, modelled here explicitly.
//
// Each rising edge of in produces one high pulse on out, starting DELAY_PS
// after the edge and lasting WIDTH_PS (in must stay high that long).
// A cluster uses one, fed with the inverted control-phase clock, to clear the
// error storage at the falling edge of the control phase, and one, fed with
// the data-phase clock, as the blanking window of the error detection gate
// that hides the legitimate output transition right after a data latch opens.
// The delay values are this design's choice.
module pulse_generator #(
  parameter int unsigned DELAY_PS = 0,
  parameter int unsigned WIDTH_PS = 200
) (
  input  logic in,
  output logic out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic in_early;
  logic in_late;

  // Start quiet: no pulse at time zero.
  initial begin
    in_early = 1'b0;
    in_late  = 1'b0;
  end

  always @(in) in_early <= #(DELAY_PS) in;
  always @(in) in_late  <= #(DELAY_PS + WIDTH_PS) in;

  assign out = in_early & ~in_late;
endmodule
