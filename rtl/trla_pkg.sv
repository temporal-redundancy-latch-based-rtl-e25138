// Shared types of the temporal redundancy latch-based architecture (TRLA).
//
// The error correction automaton of every cluster has five states: idle,
// long suppressing, resume, short suppressing and critical. It reads three
// inputs, packed in the order i1 i2 i3 used by the transition labels of the
// automaton: stall information from the neighbour clusters, an error in an
// upstream cluster, and an error in its own latches. It drives three outputs,
// packed o1 o2 o3: stall information to the neighbours, the hold (disable)
// level of its own latches and the critical flag. The state encoding is this
// design's own choice; unused codes are treated as critical by the automaton.
package trla_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  typedef enum logic [2:0] {
    S_I = 3'd0,  // idle
    S_L = 3'd1,  // long suppressing: recompute the local value
    S_R = 3'd2,  // resume: hold the recomputed value for the downstream
    S_S = 3'd3,  // short suppressing: neighbour stalls or upstream error
    S_C = 3'd4   // critical: not locally correctable
  } fsm_state_e;

  typedef struct packed {
    logic stall;         // i1: any neighbour stalls
    logic upstream_err;  // i2: any upstream cluster detected an error
    logic local_err;     // i3: this cluster detected an error
  } fsm_in_t;

  typedef struct packed {
    logic stall;  // o1: stall request to up- and downstream neighbours
    logic hold;   // o2: 1 disables sampling of the local latches
    logic crit;   // o3: critical, escalate to system level
  } fsm_out_t;
endpackage
