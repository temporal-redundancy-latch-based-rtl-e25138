// Exhaustive test of the majority voter at width 3: every combination of
// three 3-bit words is checked bit by bit against a count of the ones.
module tmr_vote_tb;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0;
  int failures = 0;
  logic [2:0] a, b, c, y;

  tmr_vote #(.WIDTH(3)) dut (.a, .b, .c, .y);

  initial begin
    for (int i = 0; i < 512; i++) begin
      {a, b, c} = 9'(i);
      #1;
      for (int k = 0; k < 3; k++) begin
        int ones;
        ones = int'(a[k]) + int'(b[k]) + int'(c[k]);
        checks++;
        if (y[k] != (ones >= 2)) begin
          failures++;
          $display("FAIL: a=%b b=%b c=%b y=%b", a, b, c, y);
        end
      end
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
