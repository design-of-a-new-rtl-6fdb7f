// serdes_top: transmitter and receiver ends of an on-chip serial link.
//
// A wide on-chip bus is replaced by one serial link. The transmitter divides
// the bit clock fclk into fclk/2, fclk/4 and fclk/8. It serializes one
// parallel word per fclk/8 period with a tree of double edge triggered
// cells. The receiver deserializes the stream with two half-rate shift
// registers, one on each clock edge. Neither end distributes a full-rate
// clock.
//
// The analog link between the two ends is outside this module. That covers
// the oscillator that makes fclk, the line encoder and driver, the line
// itself, and the receiver front end with its phase detector. Their
// connection points are ports:
//   tx_serial    serial stream into the line driver;
//   tx_clk_div   divided clocks; tx_clk_div[LEVELS-1] is the word clock, and
//                a new tx_data word must be presented after each of its
//                rising edges;
//   rx_serial    data recovered by the receiver front end;
//   rx_clk       half-rate clock recovered by the phase detector. Its rising
//                edges must fall in the middle of D1, D3, D5, D7 and its
//                falling edges in the middle of D2, D4, D6, D8.
// For a direct loopback, tie rx_serial to tx_serial. Then drive rx_clk with
// tx_clk_div[0] delayed by three quarters of its period.
//
// Latency in loopback, in bit times after the word clock's rising edge that
// launches a word: D1 is on the line at 7. The whole word is on rx_data from
// 14.5 to 15.5, i.e. just after the falling rx_clk edge that takes D8.
module serdes_top #(
  parameter int unsigned LEVELS = 3,
  localparam int unsigned WIDTH = 2 ** LEVELS
) (
  input  logic              fclk,
  input  logic              rst_n,
  input  logic [WIDTH-1:0]  tx_data,
  output logic [LEVELS-1:0] tx_clk_div,
  output logic              tx_serial,
  input  logic              rx_clk,
  input  logic              rx_serial,
  output logic [WIDTH-1:0]  rx_data
);
  timeunit 1ps; timeprecision 1ps;
  clock_divider #(.LEVELS(LEVELS)) u_clkdiv (
    .fclk    (fclk),
    .rst_n   (rst_n),
    .clk_div (tx_clk_div)
  );

  serializer #(.LEVELS(LEVELS)) u_ser (
    .clk_div (tx_clk_div),
    .din     (tx_data),
    .dout    (tx_serial)
  );

  deserializer #(.WIDTH(WIDTH)) u_des (
    .clk  (rx_clk),
    .din  (rx_serial),
    .dout (rx_data)
  );
endmodule
