// One TRLA cluster: a group of protected data latches with its own error
// storage and correction controller.
//
// Clocking: the data latches are transparent while clk_b is high (the
// cluster's data phase); the controller runs on clk_a, the complementary
// phase (the cluster's control phase). clk_a and clk_b must not overlap.
// For a cluster of negative polarity clk_b is the data phase of the negative
// latches and clk_a the other phase; a positive cluster swaps the two.
//
// Data path: WIDTH EDSs load d (or keep their value while the controller
// holds them) and drive q. Error path: the EDS error pulses are merged by an
// OR tree and set the shared triplicated SR latch; a pulse generator on the
// inverted clk_a clears it at the falling edge of clk_a, just before the next
// data phase. The error latch (on clk_b) gives err_out, the error of the last
// data phase, which goes to the downstream clusters whatever the controller
// does; late (SR latch XOR error latch) flags an error that came after the
// latches closed. Control: OR trees merge the stall requests of N_NEIGH
// neighbours and the error flags of N_UP upstream clusters; the automaton
// (trla_fsm) drives stall_out to the neighbours, hold to its own latches and
// crit_out to the system.
//
// Structure follows the cluster architecture of TRLA. The widths and delays
// are parameters of this design (WIDTH defaults to the 16 bits of a small
// CPU data word); CLR_* shape the clear pulse and must fit inside the gap
// between the two clock phases together with the EDS timing.
//
// Known warning: Verilator flags fout as circular combinational logic
// (UNOPTFLAT). The path fout.hold -> EDS latches -> transition detectors ->
// error storage -> automaton -> fout passes level-sensitive latches and a
// delayed detector and is only sampled at clock edges, so it never settles
// combinationally; the warning only costs simulation speed.
module trla_cluster
  import trla_pkg::*;
#(
  parameter int unsigned WIDTH       = 16,
  parameter int unsigned N_NEIGH     = 1,
  parameter int unsigned N_UP        = 1,
  parameter int unsigned TD_DELAY_PS = 150,
  parameter int unsigned TD_WIDTH_PS = 200,
  parameter int unsigned BLANK_PS    = 500,
  parameter int unsigned CLR_DELAY_PS = 100,
  parameter int unsigned CLR_WIDTH_PS = 200
) (
  input  logic               clk_a,          // control phase
  input  logic               clk_b,          // data phase
  input  logic               rn,             // active-low reset
  input  logic [WIDTH-1:0]   d,
  output logic [WIDTH-1:0]   q,
  input  logic [N_NEIGH-1:0] neighbor_stall,
  input  logic [N_UP-1:0]    upstream_err,
  output logic               stall_out,
  output logic               err_out,
  output logic               crit_out,
  output logic               hold,           // latches kept (observation)
  output logic               late,           // late error (observation)
  output fsm_state_e         state           // automaton state (observation)
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [WIDTH-1:0] eds_err;
  logic             any_err;
  logic             clr;
  fsm_in_t          fin;
  fsm_out_t         fout;

  eds_group #(
    .WIDTH(WIDTH), .TD_DELAY_PS(TD_DELAY_PS), .TD_WIDTH_PS(TD_WIDTH_PS),
    .BLANK_PS(BLANK_PS)
  ) u_group (
    .c(clk_b), .rn(rn), .hold(fout.hold), .d(d), .q(q), .err(eds_err)
  );

  or_tree #(.N(WIDTH)) u_err_tree (.in(eds_err), .out(any_err));

  pulse_generator #(.DELAY_PS(CLR_DELAY_PS), .WIDTH_PS(CLR_WIDTH_PS)) u_clr (
    .in(~clk_a), .out(clr)
  );

  error_storage u_store (
    .c(clk_b), .rn(rn), .set(any_err), .clr(clr), .err(err_out), .late(late)
  );

  or_tree #(.N(N_NEIGH)) u_stall_tree (.in(neighbor_stall), .out(fin.stall));
  or_tree #(.N(N_UP))    u_up_tree    (.in(upstream_err),   .out(fin.upstream_err));
  assign fin.local_err = err_out;

  trla_fsm u_fsm (
    .clk_a(clk_a), .rn(rn), .in(fin), .late(late), .out(fout), .state(state)
  );

  assign stall_out = fout.stall;
  assign crit_out  = fout.crit;
  assign hold      = fout.hold;
endmodule
