// Test of an EDS group of 8: all latches load together without any error
// pulse (the shared window hides the change at opening), hold together, and
// a transient on one input late in the transparent phase gives an error
// pulse on that bit only. Reset clears every latch.
module eds_group_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int W = 8;
  int checks = 0;
  int failures = 0;
  logic c = 1'b0, rn = 1'b0, hold = 1'b0;
  logic [W-1:0] d = '1, q, err, seen = '0;

  eds_group #(.WIDTH(W)) dut (.c, .rn, .hold, .d, .q, .err);

  always @(err) seen |= err;

  task automatic phase(input int before_ps, input int after_ps);
    c = 1'b1; #before_ps; #after_ps; c = 1'b0; #1000;
  endtask

  initial begin
    phase(2000, 0);
    checks++;
    if (q != '0) begin failures++; $display("FAIL: reset q=%h", q); end
    rn = 1'b1;
    #1000 seen = '0;
    for (int k = 0; k < 6; k++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      d = v;
      phase(2000, 0);
      checks += 2;
      if (q != v) begin failures++; $display("FAIL: load %h got %h", v, q); end
      if (seen != '0) begin failures++; $display("FAIL: error on load %b", seen); end
      seen = '0;
    end
    hold = 1'b1;
    d = ~q;
    begin
      logic [W-1:0] keep;
      keep = q;
      phase(2000, 0);
      checks++;
      if (q != keep) begin failures++; $display("FAIL: hold"); end
    end
    hold = 1'b0;
    d = 8'h3C;
    seen = '0;
    c = 1'b1; #2000;
    d[5] = ~d[5]; #400 d[5] = ~d[5]; #1000;
    c = 1'b0; #1000;
    checks += 2;
    if (seen != 8'b0010_0000) begin failures++; $display("FAIL: error bits %b", seen); end
    if (q != 8'h3C) begin failures++; $display("FAIL: value after transient %h", q); end
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
