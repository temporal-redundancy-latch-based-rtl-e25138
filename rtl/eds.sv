// Error detection sequential (EDS): one protected data latch of TRLA.
//
// A conventional level-sensitive latch, transparent while c is high, whose
// input is chosen by a multiplexer: new data d when hold is low, its own
// output q when hold is high, so the cluster controller can keep the stored
// value for a recomputation. The selected value is forced to 0 while the
// active-low reset rn is low (the latch must be transparent for the reset to
// reach q). A transition detector watches q; its pulse passes the error
// detection gate when det_en is high and leaves as err. det_en is the shared
// blanking window of the latch group: it is low just after c rises, hiding
// the legitimate change of q when new data is taken in, and high the rest of
// the cycle, so a change of q later in the transparent phase (a transient on
// the input) or while opaque (an upset of the node) is flagged.
//
// Structure (multiplexer, reset gating, latch, transition detector, gated
// error output) follows the EDS of the architecture; which multiplexer input
// hold selects, the reset polarity and the detector delays are choices of
// this design. err is a short pulse; the cluster stores it in its shared
// error latch. The transition detector is a delay-based behavioural model,
// so a synthesis tool reduces it (and err) to a constant; a real build puts a
// library transition-detector cell in its place. Verilator may report
// NOLATCH for the latch below when it is built inside eds_group; synthesis
// infers one latch bit per EDS, as intended.
module eds #(
  parameter int unsigned TD_DELAY_PS = 150,
  parameter int unsigned TD_WIDTH_PS = 200
) (
  input  logic c,       // data-phase clock, latch transparent while high
  input  logic rn,      // active-low reset
  input  logic hold,    // 1: feed q back, 0: load d
  input  logic det_en,  // error detection window from the group
  input  logic d,
  output logic q,
  output logic err      // transition of q inside the detection window
);
  timeunit 1ps;
  timeprecision 1ps;

  logic td;

  // Multiplexer with feedback: while hold is high the latch is fed its own
  // output, which leaves q unchanged, so it is written here as a load
  // condition of the latch (same function, no combinational loop).
  // Reset wins over hold.
  always_latch begin
    if (c) begin
      if (!rn)       q = 1'b0;
      else if (!hold) q = d;
    end
  end

  transition_detector #(.DELAY_PS(TD_DELAY_PS), .WIDTH_PS(TD_WIDTH_PS)) u_td (
    .a(q), .pulse(td)
  );

  assign err = td & det_en;
endmodule
