// deserializer: 1:8 deserializer that samples the stream on both clock edges.
//
// The serial input feeds two shift registers that both run on fclk/2 (625 MHz
// for a 1.25 Gb/s stream). One is built of rising-edge flops (petff). The
// other is built of falling-edge flops (netff). So each register sees every
// other bit, and the distributed clock runs at half the bit rate.
// Odd bits D1, D3, D5, D7 are taken on rising edges and even bits D2, D4, D6,
// D8 on falling edges. With WIDTH = 8 each register has four stages:
//   rising-edge chain:   din -> D7 -> D5 -> D3 -> D1
//   falling-edge chain:  din -> D8 -> D6 -> D4 -> D2
// The parallel outputs are the flop outputs themselves. There is no output
// register.
//
// Timing: the first bit of a word (D1) must be on a rising edge. After the
// falling edge that takes D8, dout holds the whole word until the next
// rising edge, one bit time later. A word is therefore valid in every fourth
// clock period, at 156.25 MHz. Framing, that is choosing which rising edge
// carries D1, is the job of the clock supplied to clk.
//
// Interface: clk (fclk/2 or a recovered clock at that rate), din in;
// dout[0] is D1, the first bit received. The structure and the output
// mapping follow the document. WIDTH as a parameter and the missing reset
// (the document gives none) are this design's choices.
module deserializer #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             din,
  output logic [WIDTH-1:0] dout
);
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned STAGES = WIDTH / 2;

  logic odd_q  [STAGES];  // rising-edge chain, stage 0 nearest the input
  logic even_q [STAGES];  // falling-edge chain

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    logic odd_d, even_d;
    if (k == 0) begin : g_first
      assign odd_d  = din;
      assign even_d = din;
    end else begin : g_next
      assign odd_d  = odd_q[k-1];
      assign even_d = even_q[k-1];
    end
    petff u_odd  (.clk(clk), .d(odd_d),  .q(odd_q[k]));
    netff u_even (.clk(clk), .d(even_d), .q(even_q[k]));
    // Stage k of the odd chain holds D(WIDTH-1-2k), of the even chain D(WIDTH-2k).
    assign dout[WIDTH - 2 - 2*k] = odd_q[k];
    assign dout[WIDTH - 1 - 2*k] = even_q[k];
  end
endmodule
