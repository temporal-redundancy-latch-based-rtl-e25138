// Test of the error storage: an error pulse in the data phase gives err (and
// no late), err holds after the phase closes and is gone after the clear
// pulse and the next phase; an error pulse after the phase closed gives late
// but not err; reset clears both.
module error_storage_tb;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0;
  int failures = 0;
  logic c = 1'b0, rn = 1'b0, set = 1'b0, clr = 1'b0, err, late;

  error_storage dut (.c, .rn, .set, .clr, .err, .late);

  task automatic expect2(input logic e, input logic l, input string what);
    checks++;
    if (err != e || late != l) begin
      failures++;
      $display("FAIL %0t %s: err=%b late=%b", $time, what, err, late);
    end
  endtask

  task automatic pulse_set();
    set = 1'b1; #100 set = 1'b0;
  endtask

  task automatic pulse_clr();
    clr = 1'b1; #200 clr = 1'b0;
  endtask

  initial begin
    c = 1'b1; #100 c = 1'b0;
    #100;
    expect2(1'b0, 1'b0, "reset");
    rn = 1'b1;
    // error inside the data phase
    c = 1'b1; #1000;
    pulse_set(); #100;
    expect2(1'b1, 1'b0, "error in data phase");
    #1000 c = 1'b0; #1000;
    expect2(1'b1, 1'b0, "held after closing");
    pulse_clr(); #300;
    c = 1'b1; #100;
    expect2(1'b0, 1'b0, "cleared for next phase");
    #1000 c = 1'b0; #500;
    // error after the data phase closed
    pulse_set(); #100;
    expect2(1'b0, 1'b1, "late error");
    #500 pulse_clr(); #300;
    c = 1'b1; #100;
    expect2(1'b0, 1'b0, "late cleared");
    // reset
    pulse_set(); #100;
    rn = 1'b0; #10;
    expect2(1'b0, 1'b0, "reset clears");
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
