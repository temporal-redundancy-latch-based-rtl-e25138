// TRLA-protected dual-phase latch design with two clusters.
//
// A synchronous design is turned into a dual-phase latch design whose
// latches are split into a negative cluster (transparent on phi_n) and a
// positive cluster (transparent on phi_p); its combinational logic stays
// outside this module. The logic computes n_d, the next value of the
// negative latches, from p_q and any primary inputs, and p_d from n_q; the
// latch outputs n_q and p_q are brought out for it. With two clusters in a
// ring each is the other's only neighbour, upstream and downstream.
//
// Every latch is an EDS that flags a transition of its output after the
// latch has opened. A flagged cluster recomputes: the downstream cluster
// holds while the upstream error is seen, the flagged cluster takes the
// recomputed value from its unchanged input and keeps it until the
// downstream cluster has sampled it, and its neighbours stall meanwhile.
// The result is the error-free sequence of values, a few cycles later. An
// error at a latch's closing edge (late error), or an error in a cluster
// while its neighbour also reports one, cannot be corrected locally: crit
// goes high and stays high until reset, all latches hold, and the system has
// to recover.
//
// Clocking: phi_n and phi_p are the two phases of the original clock and
// must not overlap; the gap between them must cover the error storage clear
// pulse (CLR_DELAY_PS + CLR_WIDTH_PS of trla_cluster). The logic between the
// clusters must settle within one phase. rn is an active-low reset; the
// clocks must run while it is low so that the latches are cleared.
module trla_top
  import trla_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             phi_n,
  input  logic             phi_p,
  input  logic             rn,
  input  logic [WIDTH-1:0] n_d,
  output logic [WIDTH-1:0] n_q,
  input  logic [WIDTH-1:0] p_d,
  output logic [WIDTH-1:0] p_q,
  output logic             crit,
  output logic             n_hold,
  output logic             p_hold,
  output logic             n_stall,
  output logic             p_stall,
  output logic             n_err,
  output logic             p_err,
  output logic             n_late,
  output logic             p_late,
  output fsm_state_e       n_state,
  output fsm_state_e       p_state
);
  timeunit 1ps;
  timeprecision 1ps;

  logic n_crit, p_crit;

  trla_cluster #(.WIDTH(WIDTH)) u_neg (
    .clk_a(phi_p), .clk_b(phi_n), .rn(rn), .d(n_d), .q(n_q),
    .neighbor_stall(p_stall), .upstream_err(p_err),
    .stall_out(n_stall), .err_out(n_err), .crit_out(n_crit),
    .hold(n_hold), .late(n_late), .state(n_state)
  );

  trla_cluster #(.WIDTH(WIDTH)) u_pos (
    .clk_a(phi_n), .clk_b(phi_p), .rn(rn), .d(p_d), .q(p_q),
    .neighbor_stall(n_stall), .upstream_err(n_err),
    .stall_out(p_stall), .err_out(p_err), .crit_out(p_crit),
    .hold(p_hold), .late(p_late), .state(p_state)
  );

  assign crit = n_crit | p_crit;
endmodule
