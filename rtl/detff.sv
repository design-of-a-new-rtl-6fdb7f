// detff: double edge triggered flip-flop with two data inputs.
//
// This cell is the building block of the serializer. It pairs a negative
// edge triggered flop on input d1 with a positive edge triggered flop on
// input d2. Both flops' C2MOS output stages drive the same node q, and each
// drives it only in its own clock phase:
//   - while clk is low, q shows d1 as sampled on the last falling edge;
//   - while clk is high, q shows d2 as sampled on the last rising edge.
// One cell therefore turns two bits per clock period into a stream at twice
// the clock rate. No extra latch or 2:1 multiplexer cell is needed: the
// selection is simply which output stage is enabled.
//
// Interface: clk, d1, d2 in; q out. q changes at both edges of clk.
// The edge that serves each input follows the clock phases printed on the
// transistor schematic of the cell. The clock-level select on q models the
// two tri-stated output stages sharing one node.
module detff (
  input  logic clk,
  input  logic d1,
  input  logic d2,
  output logic q
);
  timeunit 1ps; timeprecision 1ps;
  logic q_neg;  // d1, taken on the falling edge
  logic q_pos;  // d2, taken on the rising edge

  netff u_neg (.clk(clk), .d(d1), .q(q_neg));
  petff u_pos (.clk(clk), .d(d2), .q(q_pos));

  // Only one output stage is enabled at a time: the rising-edge half while
  // clk is high, the falling-edge half while clk is low.
  assign q = clk ? q_pos : q_neg;
endmodule
