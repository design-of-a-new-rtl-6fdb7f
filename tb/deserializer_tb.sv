// deserializer_tb: self-checking testbench for the double-edge deserializer.
//
// A 1.25 Gb/s stream (800 ps per bit) is fed to the deserializer on a
// 625 MHz clock. Each bit is placed so that a clock edge falls in its middle:
// even-numbered bits on rising edges, odd-numbered bits on falling edges.
// The stream starts with the serial patterns of the document (11010110,
// 00000000, 01010101, 10101010, 11111111), first bit first, followed by
// random words. After every clock edge all eight outputs are compared with
// the bits sent. The model is independent of the shift chains: after a
// falling edge that takes bit b, output Dk must hold bit b-8+k; after a
// rising edge the odd outputs have moved on by one bit. Whole words are
// counted at every fourth falling edge. Their spacing must be 6400 ps
// (156.25 MHz). Delays are in ps.
module deserializer_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned W      = 8;
  localparam int unsigned TBIT   = 800;
  localparam int unsigned NWORDS = 200;

  logic clk = 1'b0, din = 1'b0;
  logic [W-1:0] dout;
  logic bits [NWORDS * W];
  int checks = 0, failures = 0, words_ok = 0;
  time last_word = 0;

  deserializer #(.WIDTH(W)) dut (.clk(clk), .din(din), .dout(dout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: dout=%b", what, $time, dout);
    end
  endtask

  // Rising edges at 400, 2000, ...; falling edges at 1200, 2800, ...
  initial begin
    #(TBIT/2);
    forever begin
      clk = ~clk;
      #TBIT;
    end
  end

  // The document's serial patterns, first bit in the MSB as written.
  localparam logic [7:0] PAT [5] = '{8'b11010110, 8'b00000000, 8'b01010101, 8'b10101010, 8'b11111111};

  initial begin
    for (int n = 0; n < NWORDS; n++)
      for (int k = 0; k < W; k++)
        bits[n*W + k] = (n < 5) ? PAT[n][7-k] : 1'($urandom);

    for (int b = 0; b < NWORDS * W; b++) begin
      din = bits[b];
      #(TBIT * 3 / 4);  // 200 ps after the edge that took bit b
      if (b >= W - 1) begin
        if (b % 2 == 1) begin
          // Falling edge: Dk = bit b-8+k for all k.
          for (int k = 1; k <= W; k++)
            check(dout[k-1] == bits[b - W + k], $sformatf("after falling edge, bit %0d, D%0d", b, k));
          if (b % W == W - 1) begin
            bit whole;
            whole = 1'b1;
            for (int k = 0; k < W; k++) whole &= (dout[k] == bits[b - W + 1 + k]);
            check(whole, $sformatf("word %0d", b / W));
            if (whole) words_ok++;
            if (last_word != 0) check($time - last_word == time'(W * TBIT), "word spacing 6400 ps");
            last_word = $time;
          end
        end else begin
          // Rising edge: odd outputs D1,D3,.. = bits b-6,b-4,..; even ones unchanged.
          for (int k = 1; k <= W; k++)
            check(dout[k-1] == bits[(k % 2 == 1) ? b - W + 1 + k : b - W - 1 + k],
                  $sformatf("after rising edge, bit %0d, D%0d", b, k));
        end
      end
      #(TBIT / 4);
    end
    check(words_ok == NWORDS, "all words received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(TBIT * W * (NWORDS + 10));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
