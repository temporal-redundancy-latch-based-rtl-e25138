// Exhaustive test of the TRLA error correction automaton.
//
// For every state (reached from reset along a fixed input path) and every
// input combination i1 i2 i3, the combinational outputs o1 o2 o3 and the
// state after the next rising edge of clk_a are compared with a table
// written out here from the automaton's transition list. Also checked: a
// late error present at the sampling edge leads to S_C; a late error seen
// only at the falling edge of clk_a leads to S_C with output 011 before the
// next rising edge; reset returns to S_I.
module trla_fsm_tb;
  import trla_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0;
  int failures = 0;

  logic       clk_a = 1'b0;
  logic       rn = 1'b1;
  fsm_in_t    in = '0;
  logic       late = 1'b0;
  fsm_out_t   out;
  fsm_state_e state;

  trla_fsm dut (.clk_a, .rn, .in, .late, .out, .state);

  // expected output and next state, from the transition list
  task automatic expect_of(input fsm_state_e s, input logic [2:0] i,
                           output logic [2:0] o, output fsm_state_e n);
    case (s)
      S_I: begin
        if (i == 3'b000)      begin o = 3'b000; n = S_I; end
        else if (i == 3'b001) begin o = 3'b000; n = S_L; end
        else if (i == 3'b010 || i == 3'b110 || i == 3'b100) begin o = 3'b010; n = S_S; end
        else                  begin o = 3'b000; n = S_C; end
      end
      S_L: begin o = 3'b100; n = S_R; end
      S_R: begin
        o = 3'b010;
        n = (i == 3'b000) ? S_I : (i == 3'b100) ? S_S : S_C;
      end
      S_S: begin o = 3'b110; n = S_I; end
      default: begin o = 3'b011; n = S_C; end
    endcase
  endtask

  task automatic tick();
    #10 clk_a = 1'b1;
    #10 clk_a = 1'b0;
  endtask

  task automatic go_to(input fsm_state_e s);
    rn = 1'b1; in = '0; late = 1'b0;
    #2 rn = 1'b0;
    #3 rn = 1'b1;
    case (s)
      S_L: begin in = 3'b001; tick(); end
      S_R: begin in = 3'b001; tick(); in = '0; tick(); end
      S_S: begin in = 3'b010; tick(); end
      S_C: begin in = 3'b011; tick(); end
      default: ;
    endcase
  endtask

  fsm_state_e states[5] = '{S_I, S_L, S_R, S_S, S_C};

  initial begin
    for (int si = 0; si < 5; si++) begin
      for (int i = 0; i < 8; i++) begin
        logic [2:0] eo;
        fsm_state_e en;
        go_to(states[si]);
        checks++;
        if (state != states[si]) begin
          failures++;
          $display("FAIL: could not reach %s, at %s", states[si].name(), state.name());
        end
        in = 3'(i);
        #1;
        expect_of(states[si], 3'(i), eo, en);
        checks++;
        if (out != eo) begin
          failures++;
          $display("FAIL: %s in=%b out=%b expected %b", states[si].name(), 3'(i), out, eo);
        end
        tick();
        checks++;
        if (state != en) begin
          failures++;
          $display("FAIL: %s in=%b next=%s expected %s", states[si].name(), 3'(i),
                   state.name(), en.name());
        end
      end
    end

    // late error at the sampling edge, from every non-critical state
    for (int si = 0; si < 4; si++) begin
      go_to(states[si]);
      late = 1'b1;
      tick();
      late = 1'b0;
      #1;
      checks++;
      if (state != S_C || out != 3'b011) begin
        failures++;
        $display("FAIL: late at edge from %s gives %s out=%b", states[si].name(),
                 state.name(), out);
      end
    end

    // late error seen only at the falling edge of clk_a
    go_to(S_I);
    #10 clk_a = 1'b1;
    #5  late = 1'b1;
    #5  clk_a = 1'b0;
    #1  late = 1'b0;
    checks++;
    if (out != 3'b011) begin
      failures++;
      $display("FAIL: late at falling edge: out=%b", out);
    end
    tick();
    checks++;
    if (state != S_C) begin
      failures++;
      $display("FAIL: late at falling edge: state %s", state.name());
    end

    // reset leaves S_C
    rn = 1'b0;
    #1;
    checks++;
    if (state != S_I || out != 3'b000) begin
      failures++;
      $display("FAIL: reset: %s out=%b", state.name(), out);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
