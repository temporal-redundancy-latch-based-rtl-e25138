// Set/reset latch in three copies with a majority vote.
//
// Stores that an error was detected in a cluster: a pulse on s sets it, a
// pulse on r clears it, and r wins when both are high. The three copies are
// independent level-sensitive latches; q is their vote, so an upset of one
// copy does not change q and the copy is overwritten by the next set or
// reset. Set/reset priority is this design's choice.
module tmr_sr_latch (
  input  logic s,
  input  logic r,
  output logic q
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [2:0] q3;

  for (genvar k = 0; k < 3; k++) begin : g_copy
    always_latch begin
      if (r)      q3[k] = 1'b0;
      else if (s) q3[k] = 1'b1;
    end
  end

  tmr_vote #(.WIDTH(1)) u_vote (.a(q3[0]), .b(q3[1]), .c(q3[2]), .y(q));
endmodule
