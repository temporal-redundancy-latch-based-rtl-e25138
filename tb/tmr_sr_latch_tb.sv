// Test of the triplicated SR latch: set pulse sets and is remembered, reset
// pulse clears, reset wins over a simultaneous set, and a single upset copy
// (forced) does not change the voted output.
module tmr_sr_latch_tb;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0;
  int failures = 0;
  logic s = 1'b0, r = 1'b1, q;

  tmr_sr_latch dut (.s, .r, .q);

  task automatic expect_q(input logic v, input string what);
    #1;
    checks++;
    if (q != v) begin failures++; $display("FAIL %s: q=%b", what, q); end
  endtask

  initial begin
    #10 r = 1'b0;
    expect_q(1'b0, "after reset");
    #10 s = 1'b1; #20 s = 1'b0;
    expect_q(1'b1, "after set pulse");
    #50;
    expect_q(1'b1, "set remembered");
    #10 r = 1'b1; #20 r = 1'b0;
    expect_q(1'b0, "after reset pulse");
    #10 s = 1'b1; r = 1'b1; #20;
    expect_q(1'b0, "reset wins");
    s = 1'b0; r = 1'b0;
    #10 s = 1'b1; #20 s = 1'b0;
    force dut.q3[1] = 1'b0;
    expect_q(1'b1, "one copy upset");
    release dut.q3[1];
    #10 r = 1'b1; #20 r = 1'b0;
    expect_q(1'b0, "cleared after upset");
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
