// Group of WIDTH EDSs of one cluster, sharing one enable and one error
// detection window.
//
// All latches of a cluster are transparent on the same clock phase c and are
// held or loaded together by the controller's hold signal. One pulse
// generator on c blanks error detection for BLANK_PS after each rising edge
// of c (the time the new data needs to pass the latch and the transition
// detector), and the window det_en = not blank is given to every EDS. err
// carries one error pulse per EDS, to be merged by the cluster's OR tree.
// BLANK_PS must exceed TD_DELAY_PS + TD_WIDTH_PS; the values are this
// design's choice. The pulse generator and the transition detectors are
// delay-based behavioural models: after synthesis err is constant, and a real
// build replaces them with library cells.
module eds_group #(
  parameter int unsigned WIDTH       = 16,
  parameter int unsigned TD_DELAY_PS = 150,
  parameter int unsigned TD_WIDTH_PS = 200,
  parameter int unsigned BLANK_PS    = 500
) (
  input  logic             c,
  input  logic             rn,
  input  logic             hold,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] err
);
  timeunit 1ps;
  timeprecision 1ps;

  logic blank;
  logic det_en;

  pulse_generator #(.DELAY_PS(0), .WIDTH_PS(BLANK_PS)) u_blank (
    .in(c), .out(blank)
  );
  assign det_en = ~blank;

  for (genvar k = 0; k < WIDTH; k++) begin : g_eds
    eds #(.TD_DELAY_PS(TD_DELAY_PS), .TD_WIDTH_PS(TD_WIDTH_PS)) u_eds (
      .c(c), .rn(rn), .hold(hold), .det_en(det_en),
      .d(d[k]), .q(q[k]), .err(err[k])
    );
  end
endmodule
