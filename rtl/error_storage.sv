// Shared error storage and late error detector of one cluster.
//
// set is the merged error pulse of all EDSs of the cluster. It sets a
// triplicated SR latch, which is cleared by clr (a pulse at the end of the
// control phase) and while the active-low reset rn is low. A level-sensitive
// error latch, transparent on the data phase c like the data latches and
// likewise triplicated and voted, copies the SR latch: err is the error of
// the current data phase, held through the following control phase. late is
// the SR latch XOR the error latch: it rises when an error pulse arrives
// after the error latch has closed, that is when a transient hit the data
// latch so close to its closing edge (or after it) that the wrong value may
// already have been stored and passed on; such an error cannot be corrected
// locally.
//
// Timing: err follows the SR latch while c is high and holds while c is low.
// late is meaningful from the closing edge of c until clr; after clr it may
// be high until c rises again, a window in which the controller does not
// sample it. The structure follows the architecture; reset handling of the
// error latch is this design's choice.
module error_storage (
  input  logic c,     // data-phase clock of the cluster
  input  logic rn,    // active-low reset
  input  logic set,   // merged error pulse of the EDS group
  input  logic clr,   // periodic clear pulse
  output logic err,   // error flag of the last data phase
  output logic late   // error arrived after the error latch closed
);
  timeunit 1ps;
  timeprecision 1ps;

  logic       sr_q;
  logic [2:0] err3;

  tmr_sr_latch u_sr (.s(set), .r(clr | ~rn), .q(sr_q));

  for (genvar k = 0; k < 3; k++) begin : g_copy
    always_latch begin
      if (!rn)    err3[k] = 1'b0;
      else if (c) err3[k] = sr_q;
    end
  end

  tmr_vote #(.WIDTH(1)) u_vote (.a(err3[0]), .b(err3[1]), .c(err3[2]), .y(err));

  assign late = sr_q ^ err;
endmodule
