// serdes_patterns_tb: the full link, at its default size, run with each of
// the fixed input patterns used for the document's power figures. Each
// pattern is held on tx_data for 64 consecutive words, as a constant-input
// measurement would hold it. The patterns, D1 first, are 00000000, 01010101,
// 11010110, 10101010 and 11111111. For every word the testbench checks the
// eight bits on the line. It also checks the word on rx_data 14.75 bit times
// after its launching edge. Every pattern must arrive intact every time.
// The setup is the same as serdes_top_tb: a loopback, and a receive clock
// that is the 625 MHz transmit clock shifted by 1200 ps. Delays are in ps.
module serdes_patterns_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned W      = 8;
  localparam int unsigned TBIT   = 800;
  localparam int unsigned NPAT   = 5;
  localparam int unsigned REPEAT = 64;
  localparam int unsigned NWORDS = NPAT * REPEAT;

  logic         fclk = 1'b0, rst_n = 1'b0, rx_clk = 1'b0;
  logic [W-1:0] tx_data = '0, rx_data;
  logic [2:0]   tx_clk_div;
  logic         tx_serial;
  int checks = 0, failures = 0;
  int ok_per_pat [NPAT] = '{default: 0};
  bit started = 1'b0, done = 1'b0;
  int unsigned nword = 0, nbit = 0;

  serdes_top dut (
    .fclk(fclk), .rst_n(rst_n), .tx_data(tx_data), .tx_clk_div(tx_clk_div),
    .tx_serial(tx_serial), .rx_clk(rx_clk), .rx_serial(tx_serial), .rx_data(rx_data)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Pattern p as a word with D1 in bit 0.
  function automatic logic [W-1:0] pattern(input int unsigned p);
    logic [7:0] txt [NPAT] = '{8'b00000000, 8'b01010101, 8'b11010110, 8'b10101010, 8'b11111111};
    for (int k = 0; k < W; k++) pattern[k] = txt[p][7-k];
  endfunction

  function automatic logic [W-1:0] word(input int unsigned n);
    return pattern(n / REPEAT);
  endfunction

  always #(TBIT/2) fclk = ~fclk;

  always begin
    rx_clk = 1'b0;
    wait (rst_n);
    @(posedge tx_clk_div[0]);
    #(3 * TBIT / 2);
    while (rst_n) begin
      rx_clk = ~rx_clk;
      #TBIT;
    end
  end

  always @(posedge tx_clk_div[2]) begin
    started <= 1'b1;
    if (nword < NWORDS) tx_data <= word(nword);
    nword++;
  end

  always @(negedge fclk) begin
    if (started) begin
      int unsigned b, n, k;
      b = nbit;
      nbit++;
      if (b >= W - 1 && (b - (W - 1)) / W < NWORDS) begin
        n = (b - (W - 1)) / W;
        k = (b - (W - 1)) % W;
        check(tx_serial == word(n)[k], $sformatf("line: word %0d bit D%0d", n, k + 1));
      end
    end
  end

  initial begin
    wait (started);
    #((2 * W - 2) * TBIT + 3 * TBIT / 4);
    for (int n = 0; n < NWORDS; n++) begin
      check(rx_data == word(n), $sformatf("rx word %0d: %b expected %b", n, rx_data, word(n)));
      if (rx_data == word(n)) ok_per_pat[n / REPEAT]++;
      #(W * TBIT);
    end
    done = 1'b1;
  end

  initial begin
    #(5 * TBIT);
    rst_n = 1'b1;
    wait (done);
    for (int p = 0; p < NPAT; p++)
      check(ok_per_pat[p] == REPEAT, $sformatf("pattern %0d: %0d of %0d words intact", p, ok_per_pat[p], REPEAT));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(TBIT * W * (NWORDS + 20));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
