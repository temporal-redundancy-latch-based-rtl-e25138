// Irradiation sweep of the two-cluster TRLA design at its default width.
//
// Each run resets the design, then lets the ring of logic functions
// (n_d = FN(p_q), p_d = FP(n_q), as in trla_top_tb) run for 785 clock cycles
// while a number of particles hit it at uniformly random times. A particle
// either puts a transient of 200..800 ps on the input of one or two latches
// of a random cluster (XOR onto n_d/p_d), or flips the output node of one
// random latch for 10 ps (an upset, by force/release; in a transparent,
// loading latch, whose input restores the node at once, as a 200 ps input
// glitch). Particles may overlap.
//
// Every committed value (a latch closing without hold and without an error
// flag) is compared with the error-free sequence. A run ends as
//   correct   - every commit matched and no critical flag,
//   escalated - crit rose (the design asks for system-level recovery); the
//               commits before it all matched,
//   silent    - a commit differed and crit had not risen.
// Particle counts 1, 2, 5, 10, 20, 50 and 100, eight runs each, are swept and
// the three outcomes are printed per count.
//
// Checked: a run whose particles are all at least 7 cycles apart (one
// recovery) must not end silent; a run that is not escalated must keep
// committing (at least 785 - 4 * particles values per cluster); a run that
// was escalated must have had the critical flag for the rest of the run.
// Silent outcomes of denser runs are reported, not counted as failures: two
// errors in the same cluster within one recovery are outside what the
// correction automaton handles.
module trla_irradiation_tb;
  import trla_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int W = 16;
  localparam int T = 10000;         // clock period in ps
  localparam int RUN_CYCLES = 785;
  localparam int N_COUNTS = 7;
  localparam int RUNS = 8;
  localparam int COUNTS [N_COUNTS] = '{1, 2, 5, 10, 20, 50, 100};

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

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge phi_n);
  endtask

  // ---------------------------------------------------------------- checker
  logic [W-1:0] gold_n = '0, gold_p = '0;
  bit           checking = 1'b0;
  bit           crit_seen = 1'b0;
  bit           mismatch = 1'b0;
  int           n_commits = 0, p_commits = 0;

  task automatic judge(input bit is_n, input logic hold, input logic err,
                       input logic [W-1:0] q);
    logic [W-1:0] exp;
    if (!checking || crit_seen || mismatch) return;
    if (hold || err) return;
    // let the late error detector react before judging the commit
    #2000;
    if (crit || crit_seen) return;
    exp = is_n ? fn_logic(gold_p) : fp_logic(gold_n);
    if (q !== exp) mismatch = 1'b1;
    if (is_n) begin gold_n = exp; n_commits++; end
    else      begin gold_p = exp; p_commits++; end
  endtask

  always @(negedge phi_n) begin
    logic h, e;
    logic [W-1:0] q;
    #1;
    h = n_hold; e = n_err; q = n_q;
    judge(1'b1, h, e, q);
  end

  always @(negedge phi_p) begin
    logic h, e;
    logic [W-1:0] q;
    #1;
    h = p_hold; e = p_err; q = p_q;
    judge(1'b0, h, e, q);
  end

  always @(posedge crit) if (rn && checking) crit_seen = 1'b1;

  // ----------------------------------------------------------- radiation
  // Upsets: one request line per latch; each flips that latch's output node
  // for 10 ps. A latch that is transparent and loading is driven by its input
  // and recovers at once; a released force would instead keep the flipped
  // value until the input changes, so there the strike is applied as a
  // 200 ps glitch of the input.
  logic [W-1:0] up_n = '0, up_p = '0;
  for (genvar k = 0; k < W; k++) begin : g_upset
    always @(posedge up_n[k]) begin
      logic v;
      if (phi_n && !n_hold) begin
        set_n[k] = ~set_n[k];
        #200;
        set_n[k] = ~set_n[k];
      end else begin
        v = ~dut.u_neg.u_group.g_eds[k].u_eds.q;
        force dut.u_neg.u_group.g_eds[k].u_eds.q = v;
        #10;
        release dut.u_neg.u_group.g_eds[k].u_eds.q;
      end
      up_n[k] = 1'b0;
    end
    always @(posedge up_p[k]) begin
      logic v;
      if (phi_p && !p_hold) begin
        set_p[k] = ~set_p[k];
        #200;
        set_p[k] = ~set_p[k];
      end else begin
        v = ~dut.u_pos.u_group.g_eds[k].u_eds.q;
        force dut.u_pos.u_group.g_eds[k].u_eds.q = v;
        #10;
        release dut.u_pos.u_group.g_eds[k].u_eds.q;
      end
      up_p[k] = 1'b0;
    end
  end

  task automatic particle(input int at_ps);
    automatic bit          on_n = 1'($urandom_range(0, 1));
    automatic int          bit_i = int'($urandom_range(0, W - 1));
    automatic logic [W-1:0] mask = W'(1) << bit_i;
    automatic int          width = int'($urandom_range(200, 800));
    #(at_ps);
    if ($urandom_range(0, 3) == 0) begin
      if (on_n) up_n[bit_i] = 1'b1; else up_p[bit_i] = 1'b1;
    end else begin
      if ($urandom_range(0, 3) == 0) mask |= {mask[W-2:0], mask[W-1]};
      if (on_n) set_n ^= mask; else set_p ^= mask;
      #(width);
      if (on_n) set_n ^= mask; else set_p ^= mask;
    end
  endtask

  // Reset for three cycles; released in the gap before a negative phase.
  task automatic do_reset();
    checking = 1'b0;
    rn = 1'b0;
    set_n = '0;
    set_p = '0;
    wait_cycles(3);
    @(negedge phi_p);
    #200;
    gold_n = '0;
    gold_p = '0;
    crit_seen = 1'b0;
    mismatch = 1'b0;
    n_commits = 0;
    p_commits = 0;
    rn = 1'b1;
    checking = 1'b1;
  endtask

  // ------------------------------------------------------------------- test
  int n_correct [N_COUNTS];
  int n_escalated [N_COUNTS];
  int n_silent [N_COUNTS];

  initial begin
    for (int ci = 0; ci < N_COUNTS; ci++) begin
      n_correct[ci] = 0;
      n_escalated[ci] = 0;
      n_silent[ci] = 0;
      for (int run = 0; run < RUNS; run++) begin
        automatic int times [] = new[COUNTS[ci]];
        automatic int min_gap = RUN_CYCLES * T;
        automatic bit crit_end;
        do_reset();
        wait_cycles(2);
        // particle times in ps from now, spread over cycles 3 .. 775
        foreach (times[k]) times[k] = int'($urandom_range(3 * T, (RUN_CYCLES - 10) * T));
        times.sort();
        for (int k = 1; k < COUNTS[ci]; k++)
          if (times[k] - times[k-1] < min_gap) min_gap = times[k] - times[k-1];
        foreach (times[k]) begin
          automatic int t = times[k];
          fork
            particle(t);
          join_none
        end
        wait_cycles(RUN_CYCLES);
        crit_end = crit;
        checking = 1'b0;
        if (crit_seen) n_escalated[ci]++;
        else if (mismatch) n_silent[ci]++;
        else n_correct[ci]++;
        if (min_gap >= 7 * T) begin
          checks++;
          if (mismatch) begin
            failures++;
            $display("FAIL: %0d particles at least 7 cycles apart gave a silent wrong value",
                     COUNTS[ci]);
          end
        end
        if (!crit_seen) begin
          checks++;
          if (n_commits < RUN_CYCLES - 4 * COUNTS[ci] ||
              p_commits < RUN_CYCLES - 4 * COUNTS[ci]) begin
            failures++;
            $display("FAIL: %0d particles: only %0d/%0d commits without escalation",
                     COUNTS[ci], n_commits, p_commits);
          end
        end else begin
          checks++;
          if (!crit_end) begin
            failures++;
            $display("FAIL: critical flag dropped before reset");
          end
        end
      end
      $display("particles %3d: runs correct %0d, escalated %0d, silent %0d (of %0d)",
               COUNTS[ci], n_correct[ci], n_escalated[ci], n_silent[ci], RUNS);
    end
    // the sweep must have seen corrected runs, also with several particles
    checks++;
    if (n_correct[0] + n_correct[1] + n_correct[2] == 0) begin
      failures++;
      $display("FAIL: no run with particles ended correct");
    end
    checks++;
    if (n_escalated[N_COUNTS-1] == 0) begin
      failures++;
      $display("FAIL: no escalation even at the highest particle count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (N_COUNTS * RUNS * (RUN_CYCLES + 10) + 100) @(posedge phi_n);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
