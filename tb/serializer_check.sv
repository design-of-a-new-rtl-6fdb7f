// serializer_check: drives one serializer of a given depth and checks its
// output stream bit by bit. Used by serializer_tb at several depths.
//
// The divided clocks are made here the way a ripple divider makes them:
// clk_div[0] toggles on fclk rising edges, and clk_div[i] toggles on rising
// edges of clk_div[i-1]. Each update is non-blocking. t0 is the first rising
// edge of the slowest clock. Word n is presented at t0 + n word periods. The
// first words are fixed patterns, the rest random. The expected stream is
// independent of the tree: with W = 2**LEVELS, bit b of the stream (bit
// times counted from t0) is word (b-(W-1))/W, bit (b-(W-1)) mod W, with D1
// first. It is sampled in the middle of each bit. A correct order, the
// latency W-1 and one word per slow-clock period are checked together by
// this. Delays are in ps.
module serializer_check #(
  parameter int unsigned LEVELS = 3,
  parameter int unsigned NWORDS = 200
) (
  output int checks,
  output int failures,
  output bit done
);
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned W    = 2 ** LEVELS;
  localparam int unsigned TBIT = 800;  // 1.25 Gb/s
  localparam logic [7:0] EXAMPLE = 8'b11010110;  // D1 in the MSB, as written

  logic              fclk = 1'b0;
  logic [LEVELS-1:0] clk_div;
  logic [W-1:0]      din = '0;
  logic              dout;
  logic [W-1:0]      words [NWORDS];
  int unsigned       nword = 0, nbit = 0;

  serializer #(.LEVELS(LEVELS)) dut (.clk_div(clk_div), .din(din), .dout(dout));

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    // Patterns used in the document's power table, D1 first: 00000000,
    // 01010101, 11010110, 10101010, 11111111 (truncated or repeated to W).
    for (int n = 0; n < NWORDS; n++)
      for (int k = 0; k < W; k++)
        case (n)
          0: words[n][k] = 1'b0;
          1: words[n][k] = k[0];
          2: words[n][k] = EXAMPLE[7 - (k % 8)];
          3: words[n][k] = ~k[0];
          4: words[n][k] = 1'b1;
          default: words[n][k] = 1'($urandom);
        endcase
  end

  always #(TBIT/2) fclk = ~fclk;
  for (genvar i = 0; i < LEVELS; i++) begin : g_div
    logic q = 1'b0;
    if (i == 0) begin : g_first
      always @(posedge fclk) q <= ~q;
    end else begin : g_next
      always @(posedge clk_div[i-1]) q <= ~q;
    end
    assign clk_div[i] = q;
  end

  // Present a new word after each rising edge of the slowest clock.
  always @(posedge clk_div[LEVELS-1]) begin
    if (nword < NWORDS) din <= words[nword];
    nword++;
  end

  // Middle of each bit time: compare with the expected stream.
  always @(negedge fclk) begin
    if (nword > 0) begin
      int unsigned b, n, k;
      b = nbit;
      nbit++;
      if (b >= W - 1 && (b - (W - 1)) / W < NWORDS) begin
        n = (b - (W - 1)) / W;
        k = (b - (W - 1)) % W;
        checks++;
        if (dout !== words[n][k]) begin
          failures++;
          $display("FAIL LEVELS=%0d word %0d bit D%0d: dout=%0b expected %0b",
                   LEVELS, n, k + 1, dout, words[n][k]);
        end
        if (n == NWORDS - 1 && k == W - 1) done = 1'b1;
      end
    end
  end
endmodule
