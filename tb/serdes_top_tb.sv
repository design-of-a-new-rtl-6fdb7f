// serdes_top_tb: end-to-end test of the link at its default size (8 bits,
// fclk = 1.25 GHz).
//
// The serial output is looped straight back to the receiver. The receiver
// clock stands in for the phase detector's recovered clock: it is the 625 MHz
// transmit clock delayed by 1200 ps. This puts its rising edges in the middle
// of D1, D3, D5, D7 and its falling edges in the middle of D2, D4, D6, D8.
// Words are presented after each rising edge of the 156.25 MHz word clock. The
// first ones are the document's patterns 00000000, 01010101, 11010110,
// 10101010, 11111111 (D1 first); the rest are random. Two things are checked:
//   - the line, bit by bit: word n, bit Dk must be on tx_serial during bit
//     time 7 + 8n + (k-1) after the first word-clock edge;
//   - the parallel output: word n must be on rx_data 14.75 bit times after
//     its launching edge, just after the falling receive edge that takes D8.
// It also counts each mechanism the design relies on: bits sent in the
// high and in the low half of the 625 MHz clock (both edges of the
// output DETFF), bits taken on rising and on falling receive edges, and each
// of the document's patterns arriving intact. A count of zero is a failure.
// Delays are in ps.
module serdes_top_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned W      = 8;
  localparam int unsigned TBIT   = 800;
  localparam int unsigned NWORDS = 400;

  logic         fclk = 1'b0, rst_n = 1'b0, rx_clk = 1'b0;
  logic [W-1:0] tx_data = '0, rx_data;
  logic [2:0]   tx_clk_div;
  logic         tx_serial;
  logic [W-1:0] words [NWORDS];
  int checks = 0, failures = 0;
  int n_tx_hi = 0, n_tx_lo = 0, n_rx_rise = 0, n_rx_fall = 0, n_words_ok = 0;
  int n_pat [5] = '{default: 0};
  bit started = 1'b0, done = 1'b0;
  time t0;
  int unsigned nword = 0, nbit = 0;

  serdes_top dut (
    .fclk       (fclk),
    .rst_n      (rst_n),
    .tx_data    (tx_data),
    .tx_clk_div (tx_clk_div),
    .tx_serial  (tx_serial),
    .rx_clk     (rx_clk),
    .rx_serial  (tx_serial),
    .rx_data    (rx_data)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always #(TBIT/2) fclk = ~fclk;
  // Recovered-clock stand-in: same 1600 ps period, starting 1200 ps after
  // the first rising edge of the transmit clock.
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

  always @(posedge rx_clk) if (started) n_rx_rise++;
  always @(negedge rx_clk) if (started) n_rx_fall++;

  function automatic logic [W-1:0] pattern(input int n);
    logic [7:0] txt [5] = '{8'b00000000, 8'b01010101, 8'b11010110, 8'b10101010, 8'b11111111};
    for (int k = 0; k < W; k++) pattern[k] = txt[n][7-k];
  endfunction

  initial begin
    for (int n = 0; n < NWORDS; n++) words[n] = (n < 5) ? pattern(n) : W'($urandom);
  end

  // Word source: a new word after each rising edge of the word clock.
  always @(posedge tx_clk_div[2]) begin
    if (!started) begin
      started <= 1'b1;
      t0 = $time;
    end
    if (nword < NWORDS) tx_data <= words[nword];
    nword++;
  end

  // Line check, in the middle of each bit time.
  always @(negedge fclk) begin
    if (started) begin
      int unsigned b, n, k;
      b = nbit;
      nbit++;
      if (b >= W - 1 && (b - (W - 1)) / W < NWORDS) begin
        n = (b - (W - 1)) / W;
        k = (b - (W - 1)) % W;
        check(tx_serial == words[n][k], $sformatf("line: word %0d bit D%0d", n, k + 1));
        if (tx_clk_div[0]) n_tx_hi++; else n_tx_lo++;
      end
    end
  end

  // Parallel output check, once per word.
  initial begin
    wait (started);
    #((2 * W - 2) * TBIT + 3 * TBIT / 4);
    for (int n = 0; n < NWORDS; n++) begin
      check(rx_data == words[n], $sformatf("rx word %0d: %b expected %b", n, rx_data, words[n]));
      if (rx_data == words[n]) begin
        n_words_ok++;
        for (int p = 0; p < 5; p++) if (words[n] == pattern(p)) n_pat[p]++;
      end
      #(W * TBIT);
    end
    done = 1'b1;
  end

  initial begin
    #(5 * TBIT);
    rst_n = 1'b1;
    wait (done);
    check(n_tx_hi > 0,  "bits sent in the high half of the 625 MHz clock");
    check(n_tx_lo > 0,  "bits sent in the low half of the 625 MHz clock");
    check(n_rx_rise > 0, "bits taken on rising receive edges");
    check(n_rx_fall > 0, "bits taken on falling receive edges");
    check(n_words_ok == NWORDS, "all words received");
    for (int p = 0; p < 5; p++) check(n_pat[p] > 0, $sformatf("pattern %0d received", p));
    $display("counts: tx_hi=%0d tx_lo=%0d rx_rise=%0d rx_fall=%0d words=%0d patterns=%0d,%0d,%0d,%0d,%0d",
             n_tx_hi, n_tx_lo, n_rx_rise, n_rx_fall, n_words_ok,
             n_pat[0], n_pat[1], n_pat[2], n_pat[3], n_pat[4]);
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
