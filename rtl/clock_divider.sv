// clock_divider: ripple divider that makes the serializer's slow clocks.
//
// The serializer tree needs fclk/2, fclk/4 and fclk/8. With fclk at
// 1.25 GHz these are 625 MHz, 312.5 MHz and 156.25 MHz. Stage 0 toggles on
// every rising edge of fclk. Each later stage toggles on the rising edge of
// the stage before it. So every slower clock edge comes a little after the
// rising edge of the next faster clock. In simulation the gap is one
// non-blocking update.
// The serializer relies on this ordering: a DETFF samples its input just
// before the cells feeding it switch to their other half.
//
// Interface: fclk, rst_n (asynchronous, active low) in; clk_div out, where
// clk_div[i] = fclk / 2**(i+1). Reset clears every stage to 0, so the first
// rising edge of fclk after reset raises all of them together.
// The document names the three divided clocks but not how they are made;
// the ripple divider and its reset are this design's choice.
module clock_divider #(
  parameter int unsigned LEVELS = 3
) (
  input  logic              fclk,
  input  logic              rst_n,
  output logic [LEVELS-1:0] clk_div
);
  timeunit 1ps; timeprecision 1ps;
  for (genvar i = 0; i < LEVELS; i++) begin : g_stage
    logic q;     // this stage's clock
    logic src;   // the clock it divides
    if (i == 0) begin : g_first
      assign src = fclk;
    end else begin : g_next
      assign src = clk_div[i-1];
    end
    always_ff @(posedge src or negedge rst_n)
      if (!rst_n) q <= 1'b0;
      else        q <= ~q;
    assign clk_div[i] = q;
  end
endmodule
