// detff_tb: self-checking testbench for the double edge triggered flop.
//
// Random bits go on d1 and d2 each clock period. The model: while clk is
// high, q must show d2 as it was at the rising edge; while clk is low, q
// must show d1 as it was at the falling edge. Each input is changed inside
// the phase in which its value is on q. That catches an input that is
// transparent instead of edge sampled, and two inputs that are swapped.
// Delays are in ps.
module detff_tb;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 1'b0, d1 = 1'b0, d2 = 1'b0, q;
  logic exp_hi, exp_lo;
  int checks = 0, failures = 0;

  detff dut (.clk(clk), .d1(d1), .d2(d2), .q(q));

  task automatic check(input logic want, input string what);
    checks++;
    if (q !== want) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b at %0t", what, q, want, $time);
    end
  endtask

  initial begin
    for (int i = 0; i < 400; i++) begin
      d1 = 1'($urandom);
      d2 = 1'($urandom);
      #250 clk = 1'b1;  exp_hi = d2;
      #50  check(exp_hi, "high phase shows d2 from rising edge");
      d2 = ~d2;
      d1 = 1'($urandom);
      #150 check(exp_hi, "high phase after d2 changed");
      #50  clk = 1'b0;  exp_lo = d1;
      #50  check(exp_lo, "low phase shows d1 from falling edge");
      d1 = ~d1;
      #150 check(exp_lo, "low phase after d1 changed");
      #50;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
