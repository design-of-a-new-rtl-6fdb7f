// netff: negative edge triggered D flip-flop.
//
// The mirror of petff. It is a C2MOS master-slave register whose master
// stage follows D while CLK is high and whose slave stage passes that value
// while CLK is low. D is taken on the falling edge of CLK and held for a full
// clock period. The deserializer uses this flop for the bits that arrive on
// falling edges. In the DETFF it is the half that serves the D1 input.
//
// Interface: clk, d in; q out. q changes only on a falling edge of clk.
// The document gives no reset for the flop, so there is none.
module netff (
  input  logic clk,
  input  logic d,
  output logic q
);
  timeunit 1ps; timeprecision 1ps;
  always_ff @(negedge clk) q <= d;
endmodule
