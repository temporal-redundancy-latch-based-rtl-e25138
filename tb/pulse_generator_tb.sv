// Test of the pulse generator model: one pulse per rising edge, starting
// DELAY_PS after it and lasting WIDTH_PS; nothing on falling edges.
module pulse_generator_tb;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0;
  int failures = 0;
  logic in = 1'b0, out;
  time  t_rise[$];
  time  t_fall[$];

  pulse_generator #(.DELAY_PS(100), .WIDTH_PS(300)) dut (.in, .out);

  always @(posedge out) t_rise.push_back($time);
  always @(negedge out) if ($time > 0) t_fall.push_back($time);

  initial begin
    #1000 in = 1'b1;
    #2000 in = 1'b0;
    #2000 in = 1'b1;
    #2000 in = 1'b0;
    #2000;
    checks++;
    if (t_rise.size() != 2 || t_fall.size() != 2) begin
      failures++;
      $display("FAIL: %0d pulses, expected 2", t_rise.size());
    end else begin
      checks += 2;
      if (t_rise[0] != 1100 || t_fall[0] != 1400) begin failures++; $display("FAIL: first pulse"); end
      if (t_rise[1] != 5100 || t_fall[1] != 5400) begin failures++; $display("FAIL: second pulse"); end
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
