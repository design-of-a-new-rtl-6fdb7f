// clock_divider_tb: self-checking testbench for the ripple clock divider.
//
// fclk runs at 1.25 GHz (800 ps). After every fclk edge the outputs are
// compared with a model that counts toggles: stage 0 toggles once per fclk
// rising edge, and stage i toggles once per rising edge of stage i-1. The
// test also measures each output's period. It must be 1600, 3200 and 6400 ps
// (625, 312.5 and 156.25 MHz). Reset is applied twice, the second time in the
// middle of the run, and the outputs must read 0 while it is held.
module clock_divider_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned LEVELS = 3;
  localparam int unsigned TBIT   = 800;

  logic fclk = 1'b0, rst_n = 1'b0;
  logic [LEVELS-1:0] clk_div;
  int unsigned toggles [LEVELS];
  int checks = 0, failures = 0;

  clock_divider #(.LEVELS(LEVELS)) dut (.fclk(fclk), .rst_n(rst_n), .clk_div(clk_div));

  always #(TBIT/2) fclk = ~fclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (clk_div=%b)", what, $time, clk_div);
    end
  endtask

  // Toggle-count model, advanced on each fclk rising edge while out of reset.
  always @(posedge fclk or negedge rst_n) begin
    if (!rst_n) begin
      foreach (toggles[i]) toggles[i] = 0;
    end else begin
      int unsigned prev_rises;
      toggles[0]++;
      for (int i = 1; i < LEVELS; i++) begin
        // Stage i-1 rises on its odd-numbered toggles.
        prev_rises = (toggles[i-1] + 1) / 2;
        toggles[i] = prev_rises;
      end
    end
  end

  always @(negedge fclk) begin
    for (int i = 0; i < LEVELS; i++)
      check(clk_div[i] == toggles[i][0], $sformatf("stage %0d level", i));
  end

  // Period of each output, from one rising edge to the next.
  for (genvar i = 0; i < LEVELS; i++) begin : g_period
    time last = 0;
    always @(posedge clk_div[i]) begin
      if (last != 0 && rst_n)
        check($time - last == time'(TBIT * (2 ** (i + 1))), $sformatf("stage %0d period %0t", i, $time - last));
      last = $time;
    end
  end

  initial begin
    #(3 * TBIT + 100);
    check(clk_div == '0, "outputs low in reset");
    rst_n = 1'b1;
    #(200 * TBIT);
    rst_n = 1'b0;
    g_period[0].last = 0; g_period[1].last = 0; g_period[2].last = 0;
    #(2 * TBIT);
    check(clk_div == '0, "outputs low in second reset");
    rst_n = 1'b1;
    #(100 * TBIT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(10_000 * TBIT);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
