// Test of one cluster (8 latches) with two neighbours and two upstream
// clusters, all played by the testbench. Data phase (clk_b) 500..4500 ps, control phase (clk_a)
// 5500..9500 ps of each 10 ns cycle; new data arrives in the control phase.
//
// Scenarios and the expected latch behaviour per data phase (H = held):
//   upstream error raised in the control phase of cycle 5 and kept until the
//     neighbour clears it: cycles 6 and 7 held (S_I then S_S), stall_out
//     high in cycle 7;
//   neighbour stall during cycle 10: cycles 10 and 11 held;
//   transient on one input in the middle of cycle 20: error flagged, cycle
//     21 loads the (unchanged) input again, stall_out high in cycle 21,
//     cycle 22 held, then normal;
//   transient at the closing edge of cycle 30: late error, crit_out and
//     hold from the next control phase on; reset clears it;
//   transient in cycle 40 while the second upstream cluster reports an
//     error: conflict, critical without a late error.
// The upstream error comes from the second upstream line, the stall from the
// second neighbour, so both OR trees are exercised.
// Every data phase checks q against the input or the held value; err_out,
// stall_out, crit_out and the automaton state are checked where named.
module trla_cluster_tb;
  import trla_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int W = 8;
  localparam int T = 10000;

  int checks = 0;
  int failures = 0;

  logic clk_a = 1'b0, clk_b = 1'b0, rn = 1'b0;
  logic [W-1:0] d = '0, q, inj = '0;
  logic [1:0] neighbor_stall = '0, upstream_err = '0;
  logic stall_out, err_out, crit_out, hold, late;
  fsm_state_e state;

  trla_cluster #(.WIDTH(W), .N_NEIGH(2), .N_UP(2)) dut (
    .clk_a, .clk_b, .rn, .d(d ^ inj), .q, .neighbor_stall, .upstream_err,
    .stall_out, .err_out, .crit_out, .hold, .late, .state
  );

  int cycle = -1;
  initial begin
    forever begin
      cycle++;
      #500  clk_b = 1'b1;
      #4000 clk_b = 1'b0;
      #1000 clk_a = 1'b1;
      #4000 clk_a = 1'b0;
      #500;
    end
  end

  // held data phases
  function automatic bit held(input int c);
    return c inside {6, 7, 10, 11, 22};
  endfunction

  // input: fresh random value in each control phase, kept where the
  // neighbour would hold (the recompute of cycle 21 sees the same input)
  always @(posedge clk_a) begin
    #1000;
    if (cycle != 20) d = W'($urandom);
  end

  logic [W-1:0] q_prev = '0;
  always @(negedge clk_b) begin
    #1;
    if (rn && cycle >= 1 && cycle < 30) begin
      checks++;
      if (held(cycle) ? (q != q_prev) : (q != d)) begin
        failures++;
        $display("FAIL cycle %0d: q=%h d=%h prev=%h held=%0b", cycle, q, d, q_prev, held(cycle));
      end
    end
    q_prev = q;
  end

  task automatic at(input int c, input int ps);
    wait (cycle == c);
    #(ps - (($time) % T));
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL cycle %0d: %s", cycle, what); end
  endtask

  initial begin
    at(2, 5000);
    rn = 1'b1;
    // upstream error
    at(5, 7000);  upstream_err = 2'b10;
    at(5, 8000);  check(hold == 1'b1 && stall_out == 1'b0, "hold on upstream error");
    at(6, 5501);  upstream_err = 2'b00;
    at(6, 6000);  check(state == S_S, "S_S after upstream error");
    at(7, 2000);  check(stall_out == 1'b1 && hold == 1'b1, "S_S stalls and holds");
    at(7, 6000);  check(state == S_I, "back to S_I");
    // neighbour stall
    at(10, 500);  neighbor_stall = 2'b10;
    at(10, 2000); check(hold == 1'b1, "hold on neighbour stall");
    at(11, 500);  neighbor_stall = 2'b00;
    at(11, 6000); check(state == S_I, "back to S_I after stall");
    // transient in the middle of a data phase
    at(20, 2000); inj = 8'h04;
    at(20, 2300); inj = '0;
    at(20, 3000); check(err_out == 1'b1, "error flagged");
    at(20, 6000); check(state == S_L && stall_out == 1'b1 && hold == 1'b0, "S_L");
    at(21, 2000); check(err_out == 1'b0, "error cleared after recompute");
    at(21, 6000); check(state == S_R && hold == 1'b1, "S_R holds");
    at(22, 6000); check(state == S_I, "back to S_I after correction");
    at(25, 0);    check(crit_out == 1'b0, "no critical so far");
    // transient at the closing edge
    at(30, 4450); inj = 8'h10;
    at(30, 5450); inj = '0;
    at(30, 6000); check(state == S_C && crit_out == 1'b1 && hold == 1'b1, "late error is critical");
    at(33, 6000); check(state == S_C && crit_out == 1'b1, "critical is kept");
    rn = 1'b0;
    #100;
    check(state == S_I && crit_out == 1'b0, "reset leaves critical");
    at(35, 5000); rn = 1'b1;
    // local error while an upstream cluster reports one: conflict
    at(40, 2000); inj = 8'h01;
    at(40, 2300); inj = '0;
    at(40, 3000); upstream_err = 2'b01;
    at(40, 6000); check(state == S_C && crit_out == 1'b1 && late == 1'b0,
                        "local error during upstream error is critical");
    upstream_err = 2'b00;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100 * T);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
