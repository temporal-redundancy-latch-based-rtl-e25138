// Error correction automaton of one TRLA cluster (a Mealy machine).
//
// Inputs, sampled at the rising edge of clk_a, the start of the cluster's
// control phase (its data latches have just closed):
//   in.stall        stall request from any neighbour cluster      (i1)
//   in.upstream_err error detected in any upstream cluster        (i2)
//   in.local_err    error detected in this cluster's latches      (i3)
//   late            error detected after this cluster's latches closed
// Outputs, combinational from the state and i1 i2 i3 (Mealy), valid during
// the control phase and held through the next data phase because the inputs
// only change at phase boundaries:
//   out.stall (o1) to both neighbours, out.hold (o2) keeps the local latches
//   (1 = not sampling), out.crit (o3) escalates to the system.
//
// Transitions, written state --i1 i2 i3 / o1 o2 o3--> state:
//   S_I --000/000--> S_I            S_I --001/000--> S_L
//   S_I --010,110,100/010--> S_S    S_I --011,101,111/000--> S_C
//   S_L --any/100--> S_R            S_S --any/110--> S_I
//   S_R --000/010--> S_I            S_R --100/010--> S_S
//   S_R --other/010--> S_C          S_C --any/011--> S_C
// A late error moves every state to S_C. These transitions
// and outputs are those of the architecture's automaton. In words: a local
// error alone lets the latches take the recomputed value once (S_L), then
// asks the neighbours to stall (S_L, S_R) and holds the value until the
// downstream cluster has sampled it (S_R); a neighbour stall or an upstream
// error alone holds the latches (S_I to S_S, then S_S); a local error
// coinciding with either cannot be resolved and is critical. As defined,
// S_L moves to S_R whatever its inputs: a second error in the same cluster
// during the recompute phase is not acted on and the wrong recomputed value
// reaches the downstream cluster unflagged. The automaton is kept as the
// architecture defines it; errors must be at least a recovery apart.
//
// This design's choices: the state is a flip-flop on the rising edge of
// clk_a; late is also captured at the falling edge of clk_a (just before the
// error storage is cleared), so a late error seen anywhere in the control
// phase is acted on; the outputs use that captured copy (output 011 from the
// falling edge of clk_a on) and never the late input itself, which may glitch
// while the error storage is cleared; unused state codes behave as S_C; rn is
// an asynchronous active-low reset to S_I. Both registers are triplicated and
// majority voted, as is all state of the control path.
//
// In a cluster, out.hold goes back to the local latches, whose error pulses
// reach in.local_err and late through the error storage. Verilator's
// scheduler reports this as a combinational loop (UNOPTFLAT on the automaton
// outputs in trla_cluster). It is not one in the circuit: the path passes a
// latch and the delayed transition detector, and the inputs are only acted on
// at clock edges.
module trla_fsm
  import trla_pkg::*;
(
  input  logic                  clk_a,
  input  logic                  rn,
  input  fsm_in_t               in,
  input  logic                  late,
  output fsm_out_t              out,
  output fsm_state_e            state
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [2:0] st3 [3];
  logic [2:0] late3;
  logic [2:0] st_v;
  logic       late_v;
  fsm_state_e next;

  tmr_vote #(.WIDTH(3)) u_vote_st (.a(st3[0]), .b(st3[1]), .c(st3[2]), .y(st_v));
  tmr_vote #(.WIDTH(1)) u_vote_late (.a(late3[0]), .b(late3[1]), .c(late3[2]), .y(late_v));

  always_comb state = fsm_state_e'(st_v);

  always_comb begin
    next = S_C;
    out  = '{stall: 1'b0, hold: 1'b1, crit: 1'b1};
    begin
      unique case (st_v)
        S_I: begin
          unique case (in)
            3'b000: begin next = S_I; out = 3'b000; end
            3'b001: begin next = S_L; out = 3'b000; end
            3'b010, 3'b110, 3'b100: begin next = S_S; out = 3'b010; end
            default: begin next = S_C; out = 3'b000; end  // 011, 101, 111
          endcase
        end
        S_L: begin next = S_R; out = 3'b100; end
        S_R: begin
          out = 3'b010;
          if (in == 3'b000)      next = S_I;
          else if (in == 3'b100) next = S_S;
          else                   next = S_C;
        end
        S_S: begin next = S_I; out = 3'b110; end
        default: begin next = S_C; out = 3'b011; end  // S_C and unused codes
      endcase
    end
    // A late error present at the sampling edge sends the automaton to S_C;
    // the outputs are not taken from late directly, because late may glitch
    // between the two phases, when the error storage is cleared.
    if (late) next = S_C;
    // A late error captured at the end of the last control phase.
    if (late_v) begin
      next = S_C;
      out  = 3'b011;
    end
  end

  for (genvar k = 0; k < 3; k++) begin : g_copy
    always_ff @(posedge clk_a or negedge rn) begin
      if (!rn) st3[k] <= S_I;
      else     st3[k] <= next;
    end
    always_ff @(negedge clk_a or negedge rn) begin
      if (!rn) late3[k] <= 1'b0;
      else     late3[k] <= late;
    end
  end
endmodule
