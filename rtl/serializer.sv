// serializer: 8:1 serializer built as a binary tree of DETFF cells.
//
// Each detff turns two inputs into one stream at twice its clock rate. A tree
// of them therefore serializes 2**LEVELS parallel bits with no shift register
// and no full-rate clock. For the default LEVELS = 3 (8 bits) the tree has
// seven cells:
//   - four leaf cells on fclk/8, each taking two parallel bits;
//   - two middle cells on fclk/4;
//   - one output cell on fclk/2, which drives a new bit on each edge.
// At fclk = 1.25 GHz the parallel word is taken at 156.25 MHz and leaves as
// a 1.25 Gb/s stream.
//
// Input order. The leaves do not get the bits in order. They get them in
// bit-reversed index order: leaf pairs (D1,D5), (D3,D7), (D2,D6), (D4,D8).
// This makes the stream come out as D1, D2, ..., D8 with no reordering
// downstream. The cells are kept as a heap: cell k (1 .. WIDTH-1) takes
// node[2k] on its falling-edge input d1 and node[2k+1] on its rising-edge
// input d2, and drives node[k]. Cell k runs on clk_div[floor(log2 k)].
// node[WIDTH+m] is din[bitrev(m)].
//
// Timing, in bit times (one bit time = one fclk period). Take t = 0 as a
// rising edge of the slowest clock. That edge launches a word that must be
// held until the next such edge. D1..D4 are taken at t = 4 (falling edge)
// and D5..D8 at t = 8 (rising edge). D1 is driven on dout during [7,8), and
// Dk during [6+k, 7+k). One word leaves per period of the slowest clock.
// Each bit boundary is an edge of clk_div[0].
// clk_div must come from a ripple divider such as clock_divider, so that each
// slower clock switches just after the faster one. Each cell samples its
// input just before the cell feeding it switches halves.
//
// Interface: clk_div[i] = fclk / 2**(i+1); din[0] is D1, the first bit out;
// dout is the serial stream. The tree, its clock rates and the input order
// follow the document. Making the depth a parameter is this design's own
// choice. There is no reset: the first word out after power-up is arbitrary.
module serializer #(
  parameter int unsigned LEVELS = 3,
  localparam int unsigned WIDTH = 2 ** LEVELS
) (
  input  logic [LEVELS-1:0] clk_div,
  input  logic [WIDTH-1:0]  din,
  output logic              dout
);
  timeunit 1ps; timeprecision 1ps;
  // Bit-reversal of an index of LEVELS bits.
  function automatic int unsigned bitrev(input int unsigned m);
    int unsigned r = 0;
    for (int unsigned b = 0; b < LEVELS; b++)
      if (m[b]) r |= 1 << (LEVELS - 1 - b);
    return r;
  endfunction

  logic node [1:2*WIDTH-1];

  for (genvar m = 0; m < WIDTH; m++) begin : g_in
    assign node[WIDTH + m] = din[bitrev(m)];
  end

  for (genvar k = 1; k < WIDTH; k++) begin : g_cell
    detff u_cell (
      .clk (clk_div[$clog2(k + 1) - 1]),
      .d1  (node[2*k]),
      .d2  (node[2*k + 1]),
      .q   (node[k])
    );
  end

  assign dout = node[1];
endmodule
