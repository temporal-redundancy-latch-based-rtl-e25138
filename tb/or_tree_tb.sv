// Test of the OR tree at widths 1, 5 and 16: all-zero, every single one-hot
// input and random inputs are compared with a loop over the bits.
module or_tree_tb;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0;
  int failures = 0;
  logic [0:0]  in1;
  logic [4:0]  in5;
  logic [15:0] in16;
  logic        o1, o5, o16;

  or_tree #(.N(1))  d1  (.in(in1),  .out(o1));
  or_tree #(.N(5))  d5  (.in(in5),  .out(o5));
  or_tree #(.N(16)) d16 (.in(in16), .out(o16));

  function automatic logic any_one(input logic [15:0] v, input int n);
    for (int k = 0; k < n; k++) if (v[k]) return 1'b1;
    return 1'b0;
  endfunction

  task automatic apply(input logic [15:0] v);
    in1 = v[0:0]; in5 = v[4:0]; in16 = v;
    #1;
    checks += 3;
    if (o1 != any_one(v, 1))   begin failures++; $display("FAIL N=1 %h", v); end
    if (o5 != any_one(v, 5))   begin failures++; $display("FAIL N=5 %h", v); end
    if (o16 != any_one(v, 16)) begin failures++; $display("FAIL N=16 %h", v); end
  endtask

  initial begin
    apply('0);
    for (int k = 0; k < 16; k++) apply(16'(1) << k);
    for (int r = 0; r < 200; r++) apply(16'($urandom) & 16'($urandom));
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
