// Test of the transition detector model: a rising and a falling edge each
// give one pulse of the set width after the set delay; a glitch longer than
// the delay gives a pulse, a much shorter one is filtered; a steady input
// gives none.
module transition_detector_tb;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0;
  int failures = 0;
  logic a = 1'b0, pulse;
  int   n_rise = 0;
  time  t_rise[$];
  time  t_fall[$];

  transition_detector #(.DELAY_PS(150), .WIDTH_PS(200)) dut (.a, .pulse);

  always @(posedge pulse) begin n_rise++; t_rise.push_back($time); end
  always @(negedge pulse) if ($time > 0) t_fall.push_back($time);

  initial begin
    #1000 a = 1'b1;   // rising edge at 1000
    #2000 a = 1'b0;   // falling edge at 3000
    #2000;
    checks++;
    if (n_rise != 2) begin failures++; $display("FAIL: %0d pulses for two edges", n_rise); end
    checks++;
    if (t_rise.size() < 2 || t_rise[0] != 1150 || t_fall[0] != 1350 ||
        t_rise[1] != 3150 || t_fall[1] != 3350) begin
      failures++;
      $display("FAIL: pulse timing wrong");
    end
    n_rise = 0;
    #1000;
    checks++;
    if (n_rise != 0 || pulse) begin failures++; $display("FAIL: pulse on steady input"); end
    a = 1'b1; #50 a = 1'b0;   // 50 ps glitch: shorter than the delay, filtered
    #1000;
    checks++;
    if (n_rise != 0) begin failures++; $display("FAIL: 50 ps glitch not filtered"); end
    a = 1'b1; #250 a = 1'b0;  // 250 ps glitch: reported
    #1000;
    checks++;
    if (n_rise == 0) begin failures++; $display("FAIL: 250 ps glitch not seen"); end
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
