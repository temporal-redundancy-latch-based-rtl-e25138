// Behavioural model of the transition detector of an EDS (error detection
// sequential). This is not synthesizable: the real circuit is a chain of
// static CMOS gates whose delays shape the pulse, and only those delays give
// it a function, so they are modelled here with explicit delays.
//
// It watches the output node of a data latch. Every transition of a, rising
// or falling, produces one high pulse on pulse: it starts DELAY_PS after the
// transition (the propagation delay through the detector) and lasts WIDTH_PS.
// The pulse is the XOR of two delayed copies of a. The delays are inertial,
// as those of real gates: a glitch on a shorter than about DELAY_PS is
// filtered and not reported, a longer one gives a pulse. Delay values are
// this design's choice; the structure follows the transition detector of the
// EDS (delayed copies of the node combined into one pulse).
module transition_detector #(
  parameter int unsigned DELAY_PS = 150,
  parameter int unsigned WIDTH_PS = 200
) (
  input  logic a,
  output logic pulse
);
  timeunit 1ps;
  timeprecision 1ps;

  logic a_early;
  logic a_late;

  // Start quiet: no pulse at time zero.
  initial begin
    a_early = 1'b0;
    a_late  = 1'b0;
  end

  // Delay lines with inertial behaviour, like the gates they stand for.
  always @(a) a_early <= #(DELAY_PS) a;
  always @(a) a_late  <= #(DELAY_PS + WIDTH_PS) a;

  assign pulse = a_early ^ a_late;
endmodule
