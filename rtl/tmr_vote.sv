// Bitwise two-out-of-three majority voter.
//
// Every stateful element of the TRLA control path (error storage latches and
// the controller state) is kept in three copies, and this voter forms the
// value the rest of the circuit sees, so that one upset copy is outvoted.
// Purely combinational; WIDTH bits are voted independently.
module tmr_vote #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y
);
  timeunit 1ps;
  timeprecision 1ps;

  assign y = (a & b) | (a & c) | (b & c);
endmodule
