// petff_tb: self-checking testbench for the positive edge triggered flop.
//
// Each cycle sets d in the low phase and checks that q takes it at the
// rising edge. d is then flipped in the high phase. The test checks that q
// neither follows d while the clock is high (no latch behaviour) nor reloads
// at the falling edge. Delays are in ps.
module petff_tb;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 1'b0, d = 1'b0, q, exp_q;
  int checks = 0, failures = 0;

  petff dut (.clk(clk), .d(d), .q(q));

  task automatic check(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b at %0t", what, got, want, $time);
    end
  endtask

  initial begin
    for (int i = 0; i < 400; i++) begin
      d = 1'($urandom);
      #250 clk = 1'b1;  exp_q = d;
      #50  check(q, exp_q, "after rising edge");
      d = ~d;
      #200 check(q, exp_q, "high phase, d changed");
      clk = 1'b0;
      #50  check(q, exp_q, "after falling edge");
      #200;
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
