// petff: positive edge triggered D flip-flop.
//
// Behavioural-RTL form of a master-slave register built from two clocked
// CMOS (C2MOS) stages. The master stage follows D while CLK is low, and the
// slave stage passes the master's value while CLK is high. Together they
// take D on the rising edge of CLK and hold it for a full clock period.
// The deserializer uses this flop for the bits that arrive on rising edges.
// In the DETFF it is the half that serves the D2 input.
//
// Interface: clk, d in; q out. q changes only on a rising edge of clk.
// The document gives no reset for the flop, so there is none.
module petff (
  input  logic clk,
  input  logic d,
  output logic q
);
  timeunit 1ps; timeprecision 1ps;
  always_ff @(posedge clk) q <= d;
endmodule
