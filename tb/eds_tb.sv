// Test of one EDS: reset through the transparent latch, load when hold is
// low, keep the value when hold is high, opaque while c is low; no error for
// the legitimate change right after opening (detection window low); an
// error pulse for an input transient later in the transparent phase; no
// error while the window is low.
module eds_tb;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0;
  int failures = 0;
  logic c = 1'b0, rn = 1'b0, hold = 1'b0, det_en = 1'b1, d = 1'b0;
  logic q, err;
  int   n_err = 0;

  eds dut (.c, .rn, .hold, .det_en, .d, .q, .err);

  always @(posedge err) n_err++;

  task automatic expect_q(input logic v, input string what);
    checks++;
    if (q != v) begin failures++; $display("FAIL %0t %s: q=%b", $time, what, q); end
  endtask

  task automatic expect_errs(input int n, input string what);
    checks++;
    if (n_err != n) begin failures++; $display("FAIL %0t %s: %0d error pulses", $time, what, n_err); end
    n_err = 0;
  endtask

  // window low for 500 ps after c rises, as the group generates it
  always @(posedge c) begin
    det_en = 1'b0;
    #500 det_en = 1'b1;
  end

  initial begin
    d = 1'b1;
    c = 1'b1; #1000 c = 1'b0;
    #10;
    expect_q(1'b0, "reset");
    rn = 1'b1;
    n_err = 0;
    #1000;
    // load: the change at opening is hidden by the window
    c = 1'b1; #1000;
    expect_q(1'b1, "load");
    c = 1'b0; #1000;
    expect_errs(0, "legitimate load");
    // opaque: input changes do nothing
    d = 1'b0; #1000;
    expect_q(1'b1, "opaque");
    expect_errs(0, "opaque input change");
    // hold: transparent but keeps its value
    hold = 1'b1;
    c = 1'b1; #1000;
    expect_q(1'b1, "hold");
    c = 1'b0; #1000;
    expect_errs(0, "hold");
    hold = 1'b0;
    // transient on d in the middle of the transparent phase
    d = 1'b1;
    c = 1'b1; #1500;
    d = 1'b0; #300 d = 1'b1; #1000;
    expect_q(1'b1, "after transient");
    c = 1'b0; #1000;
    expect_errs(1, "transient in transparent phase");
    // transient while the window is forced low: not reported
    c = 1'b1; #1500;
    det_en = 1'b0;
    d = 1'b0; #300 d = 1'b1; #1000;
    det_en = 1'b1;
    c = 1'b0; #1000;
    expect_errs(0, "transient outside the window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
