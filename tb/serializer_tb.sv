// serializer_tb: self-checking testbench for the DETFF-tree serializer.
//
// It runs the document's 8-bit tree (LEVELS = 3) at 1.25 Gb/s with clocks of
// 625, 312.5 and 156.25 MHz. It also runs a 4-bit and a 16-bit tree to
// exercise the depth parameter. Each depth is checked bit by bit by
// serializer_check. The checks cover the D1..D8 output order, the latency of
// W-1 bit times from the launching edge and one word per slow-clock period.
// The 8-bit tree starts with the input patterns of the document, including
// the "1,1,0,1,0,1,1,0" example.
module serializer_tb;
  timeunit 1ps; timeprecision 1ps;
  int c2, f2, c3, f3, c4, f4;
  bit d2, d3, d4;
  int checks, failures;

  serializer_check #(.LEVELS(3), .NWORDS(300)) u_w8  (.checks(c3), .failures(f3), .done(d3));
  serializer_check #(.LEVELS(2), .NWORDS(100)) u_w4  (.checks(c2), .failures(f2), .done(d2));
  serializer_check #(.LEVELS(4), .NWORDS(100)) u_w16 (.checks(c4), .failures(f4), .done(d4));

  initial begin
    wait (d2 && d3 && d4);
    checks   = c2 + c3 + c4;
    failures = f2 + f3 + f4;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(800 * 5000);
    checks   = c2 + c3 + c4;
    failures = f2 + f3 + f4 + 1;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
