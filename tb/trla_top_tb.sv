// End-to-end test of the two-cluster TRLA design at its default width.
//
// The testbench plays the part of the protected design's logic: the negative
// latches take n_d = FN(p_q), the positive latches p_d = FP(n_q), a ring that
// runs through a long pseudo-random sequence. Single-event transients are
// injected by XOR-ing a pulse onto n_d or p_d (the nets feeding the latches);
// single-event upsets of a latch output node are injected with force/release
// on the latch variable.
//
// Checking: a latch "commits" when it closes without hold and without an
// error flag. Every commit must equal the next value of the error-free
// sequence (computed here from FN/FP, independent of the design), the two
// clusters must commit alternately, and a commit is only judged after the
// late error detector had time to react (a critical escalation voids it).
// Hence any silent corruption, lost or repeated value is a failure.
//
// Scenarios: error-free run; transient in the middle of a data phase (both
// clusters); transient that is still present at the closing edge but started
// early enough to be flagged (a wrong value is stored and then recomputed);
// transient right at the closing edge (late error, critical); upset of a
// held latch while its neighbour is recovering (local error during an
// upstream error, critical); upset of an opaque latch (late error,
// critical); then a campaign of random transients, one at a time, with one
// to two bits hit per particle, plus a fixed three-bit particle (multiple-bit
// upset). Each named mechanism is counted and must
// occur. The cost of one corrected transient is checked: each cluster loses
// exactly two commits.
module trla_top_tb;
  import trla_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int W = 16;
  localparam int T = 10000;  // clock period in ps

  int checks = 0;
  int failures = 0;

  logic         phi_n = 1'b0;
  logic         phi_p = 1'b0;
  logic         rn = 1'b0;
  logic [W-1:0] n_d, n_q, p_d, p_q;
  logic [W-1:0] set_n = '0;
  logic [W-1:0] set_p = '0;
  logic         crit, n_hold, p_hold, n_stall, p_stall, n_err, p_err, n_late, p_late;
  fsm_state_e   n_state, p_state;

  trla_top dut (
    .phi_n, .phi_p, .rn, .n_d, .n_q, .p_d, .p_q, .crit,
    .n_hold, .p_hold, .n_stall, .p_stall, .n_err, .p_err, .n_late, .p_late,
    .n_state, .p_state
  );

  function automatic logic [W-1:0] fn_logic(input logic [W-1:0] p);
    return p * 16'd25173 + 16'd13849;
  endfunction

  function automatic logic [W-1:0] fp_logic(input logic [W-1:0] n);
    return {n[W-2:0], n[W-1]} ^ 16'h5A5A;
  endfunction

  assign n_d = fn_logic(p_q) ^ set_n;
  assign p_d = fp_logic(n_q) ^ set_p;

  // Two non-overlapping phases: phi_n high 500..4500, phi_p high 5500..9500.
  initial begin
    forever begin
      #500  phi_n = 1'b1;
      #4000 phi_n = 1'b0;
      #1000 phi_p = 1'b1;
      #4000 phi_p = 1'b0;
      #500;
    end
  end

  int cycle = 0;
  always @(posedge phi_n) cycle++;

  // ---------------------------------------------------------------- checker
  logic [W-1:0] gold_n = '0, gold_p = '0;
  bit           last_was_p = 1'b1;
  bit           checking = 1'b0;
  bit           crit_seen = 1'b0;
  int           n_commits = 0, p_commits = 0;

  // mechanism counters
  int c_local_err = 0, c_wrong_stored = 0, c_upstream_hold = 0, c_stall = 0;
  int c_s_l = 0, c_s_r = 0, c_s_s = 0, c_late = 0, c_crit = 0;
  int c_mbu = 0;  // corrected particles that hit more than one latch

  task automatic judge(input bit is_n, input logic hold, input logic err,
                       input logic [W-1:0] q, input logic [W-1:0] other_q);
    logic [W-1:0] exp;
    if (!checking || crit_seen) return;
    if (hold) return;
    if (err) begin
      c_local_err++;
      exp = is_n ? fn_logic(other_q) : fp_logic(other_q);
      if (q != exp) c_wrong_stored++;
      return;
    end
    // let the late error detector react before judging the commit
    #2000;
    if (crit) return;
    checks++;
    if (last_was_p != is_n) begin
      failures++;
      $display("FAIL %0t: %s committed twice in a row", $time, is_n ? "N" : "P");
    end
    exp = is_n ? fn_logic(gold_p) : fp_logic(gold_n);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %0t: %s commit %h, expected %h", $time, is_n ? "N" : "P", q, exp);
    end
    if (is_n) begin gold_n = exp; n_commits++; end
    else      begin gold_p = exp; p_commits++; end
    last_was_p = !is_n;
  endtask

  always @(negedge phi_n) begin
    logic h, e;
    logic [W-1:0] q, o;
    #1;
    h = n_hold; e = n_err; q = n_q; o = p_q;
    judge(1'b1, h, e, q, o);
  end

  always @(negedge phi_p) begin
    logic h, e;
    logic [W-1:0] q, o;
    #1;
    h = p_hold; e = p_err; q = p_q; o = n_q;
    judge(1'b0, h, e, q, o);
  end

  // state entries and other mechanisms
  fsm_state_e n_prev = S_I, p_prev = S_I;
  always @(posedge phi_p) begin
    #1;
    if (rn) begin
      if (n_state != n_prev) begin
        if (n_state == S_L) c_s_l++;
        if (n_state == S_R) c_s_r++;
        if (n_state == S_S) c_s_s++;
      end
      n_prev = n_state;
    end
  end
  always @(posedge phi_n) begin
    #1;
    if (rn) begin
      if (p_state != p_prev) begin
        if (p_state == S_L) c_s_l++;
        if (p_state == S_R) c_s_r++;
        if (p_state == S_S) c_s_s++;
      end
      p_prev = p_state;
    end
  end
  // hold caused by an upstream error alone, stall requests seen
  always @(negedge phi_n) if (rn && n_hold && p_err && n_state == S_I) c_upstream_hold++;
  always @(negedge phi_p) if (rn && p_hold && n_err && p_state == S_I) c_upstream_hold++;
  always @(negedge phi_n) if (rn && n_hold && p_stall) c_stall++;
  always @(negedge phi_p) if (rn && p_hold && n_stall) c_stall++;
  // late errors as the automata see them, at their sampling edges
  always @(phi_p) if (rn && checking && !crit_seen && n_late) c_late++;
  always @(phi_n) if (rn && checking && !crit_seen && p_late) c_late++;
  always @(posedge crit) if (rn && checking) crit_seen = 1'b1;

  // optional trace: +trace
  bit trace = 1'b0;
  int t_lo = 0, t_hi = 0;
  initial begin
    trace = $test$plusargs("trace");
    void'($value$plusargs("tlo=%d", t_lo));
    void'($value$plusargs("thi=%d", t_hi));
  end
  always @(phi_n or phi_p or n_err or p_err or n_late or p_late or n_hold or p_hold or
           n_state or p_state or crit or set_n or set_p)
    if (trace && cycle >= t_lo && cycle <= t_hi)
      $display("%0t c%0d phn=%b php=%b | N st=%s hold=%b err=%b late=%b stall=%b | P st=%s hold=%b err=%b late=%b stall=%b | crit=%b setn=%h setp=%h",
               $time, cycle, phi_n, phi_p, n_state.name(), n_hold, n_err, n_late, n_stall,
               p_state.name(), p_hold, p_err, p_late, p_stall, crit, set_n, set_p);

  // ---------------------------------------------------------------- helpers
  task automatic wait_cycles(input int n);
    repeat (n) @(posedge phi_n);
  endtask

  // Reset for three cycles; released in the gap before a negative phase.
  task automatic do_reset();
    checking = 1'b0;
    rn = 1'b0;
    wait_cycles(3);
    @(negedge phi_p);
    #200;
    gold_n = '0;
    gold_p = '0;
    last_was_p = 1'b1;
    crit_seen = 1'b0;
    n_prev = S_I;
    p_prev = S_I;
    rn = 1'b1;
    checking = 1'b1;
  endtask

  // Transient on the latch inputs of one cluster: start offset in ps from the
  // start of the next cycle, width in ps, bit mask.
  task automatic set_pulse(input bit on_n, input int start, input int width,
                           input logic [W-1:0] mask);
    @(posedge phi_n);
    #(start - 500);
    if (on_n) set_n = mask; else set_p = mask;
    #(width);
    if (on_n) set_n = '0; else set_p = '0;
  endtask

  task automatic expect_crit(input string what, input bit want);
    wait_cycles(3);
    checks++;
    if (crit_seen != want) begin
      failures++;
      $display("FAIL %0t: %s: critical=%0b, expected %0b", $time, what, crit_seen, want);
    end
    if (want) c_crit++;
  endtask

  // ------------------------------------------------------------------- test
  int n0, p0;
  logic upset_v;
  int ok_runs, crit_runs;

  initial begin
    do_reset();

    // 1: error-free run
    wait_cycles(30);
    checks++;
    if (n_commits < 28 || p_commits < 28 || n_hold || p_hold) begin
      failures++;
      $display("FAIL: error-free run committed %0d/%0d", n_commits, p_commits);
    end

    // 2: transient in the middle of the negative data phase; cost = 2 commits
    n0 = n_commits; p0 = p_commits;
    set_pulse(1'b1, 2000, 300, 16'h0010);
    wait_cycles(19);
    checks++;
    if (n_commits - n0 != 18 || p_commits - p0 != 18) begin
      failures++;
      $display("FAIL: correction cost N %0d P %0d commits in 20 cycles, expected 18",
               n_commits - n0, p_commits - p0);
    end
    expect_crit("transient mid negative phase", 1'b0);

    // 3: same on the positive cluster
    n0 = n_commits; p0 = p_commits;
    set_pulse(1'b0, 7000, 400, 16'h8001);
    wait_cycles(19);
    checks++;
    if (n_commits - n0 != 18 || p_commits - p0 != 18) begin
      failures++;
      $display("FAIL: correction cost (P) N %0d P %0d commits in 20 cycles, expected 18",
               n_commits - n0, p_commits - p0);
    end
    expect_crit("transient mid positive phase", 1'b0);
    if (!crit_seen) c_mbu++;

    // 3b: multiple-bit upset, three negative latches hit by one particle;
    //     corrected at the same cost as a single bit
    n0 = n_commits; p0 = p_commits;
    set_pulse(1'b1, 1500, 500, 16'h0700);
    wait_cycles(19);
    checks++;
    if (n_commits - n0 != 18 || p_commits - p0 != 18) begin
      failures++;
      $display("FAIL: MBU correction cost N %0d P %0d commits in 20 cycles, expected 18",
               n_commits - n0, p_commits - p0);
    end
    expect_crit("three-bit transient mid negative phase", 1'b0);
    if (!crit_seen) c_mbu++;

    // 4: transient from mid-phase past the closing edge: wrong value stored,
    //    flagged, recomputed
    set_pulse(1'b1, 3000, 3000, 16'h0300);
    wait_cycles(10);
    expect_crit("transient across the closing edge", 1'b0);

    // 5: transient just before the closing edge: late error
    set_pulse(1'b1, 4450, 1000, 16'h0004);
    wait_cycles(2);
    expect_crit("late transient", 1'b1);
    do_reset();
    wait_cycles(5);

    // 6: upset of a positive latch while it holds for a negative error
    n0 = c_late;
    fork
      set_pulse(1'b1, 2000, 300, 16'h0001);
      begin
        @(posedge phi_n);
        #7000;  // positive phase of the same cycle, positive cluster holding
        upset_v = ~dut.u_pos.u_group.g_eds[5].u_eds.q;
        force dut.u_pos.u_group.g_eds[5].u_eds.q = upset_v;
        #10;
        release dut.u_pos.u_group.g_eds[5].u_eds.q;
      end
    join
    wait_cycles(2);
    expect_crit("local error during upstream error", 1'b1);
    checks++;
    if (c_late != n0 || p_state != S_C) begin
      failures++;
      $display("FAIL: conflict escalation: late errors %0d, positive state %s",
               c_late - n0, p_state.name());
    end
    do_reset();
    wait_cycles(5);

    // 7: upset of an opaque negative latch: late error
    @(posedge phi_n);
    #7000;
    upset_v = ~dut.u_neg.u_group.g_eds[9].u_eds.q;
    force dut.u_neg.u_group.g_eds[9].u_eds.q = upset_v;
    #10;
    release dut.u_neg.u_group.g_eds[9].u_eds.q;
    wait_cycles(2);
    expect_crit("upset of an opaque latch", 1'b1);
    do_reset();
    wait_cycles(5);

    // 8: random single transients, one particle at a time
    ok_runs = 0;
    crit_runs = 0;
    for (int run = 0; run < 12; run++) begin
      for (int k = 0; k < 6; k++) begin
        automatic bit          on_n = 1'($urandom_range(0, 1));
        automatic int          start = int'($urandom_range(600, 9900));
        automatic int          width = int'($urandom_range(200, 800));
        automatic logic [W-1:0] mask = W'(1) << $urandom_range(0, W - 1);
        if ($urandom_range(0, 3) == 0) mask |= mask << 1;
        if (start + width > T) width = T - start;
        set_pulse(on_n, start, width, mask);
        wait_cycles(7);
        if (crit_seen) break;
        if ($countones(mask) > 1) c_mbu++;
      end
      if (crit_seen) crit_runs++; else ok_runs++;
      do_reset();
      wait_cycles(3);
    end
    $display("random campaign: %0d runs corrected, %0d escalated as critical",
             ok_runs, crit_runs);

    // every mechanism must have happened
    checks++; if (c_local_err    == 0) begin failures++; $display("FAIL: no local error"); end
    checks++; if (c_wrong_stored == 0) begin failures++; $display("FAIL: no wrong value stored and recomputed"); end
    checks++; if (c_upstream_hold == 0) begin failures++; $display("FAIL: no hold on upstream error"); end
    checks++; if (c_stall        == 0) begin failures++; $display("FAIL: no neighbour stall"); end
    checks++; if (c_s_l          == 0) begin failures++; $display("FAIL: S_L never entered"); end
    checks++; if (c_s_r          == 0) begin failures++; $display("FAIL: S_R never entered"); end
    checks++; if (c_s_s          == 0) begin failures++; $display("FAIL: S_S never entered"); end
    checks++; if (c_late         == 0) begin failures++; $display("FAIL: no late error"); end
    checks++; if (c_crit         == 0) begin failures++; $display("FAIL: no critical escalation"); end
    checks++; if (c_mbu          == 0) begin failures++; $display("FAIL: no multiple-bit upset corrected"); end
    $display("mechanisms: local_err=%0d wrong_stored=%0d upstream_hold=%0d stall=%0d S_L=%0d S_R=%0d S_S=%0d late=%0d critical=%0d mbu=%0d commits N=%0d P=%0d",
             c_local_err, c_wrong_stored, c_upstream_hold, c_stall, c_s_l, c_s_r, c_s_s,
             c_late, c_crit, c_mbu, n_commits, p_commits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (3000) @(posedge phi_n);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
