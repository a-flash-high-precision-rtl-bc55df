`timescale 1ps / 1fs
// coarse_counter: free-running binary counter on clk0, the first (coarse) stage of the TDC.
//
// The counter advances by one on every rising edge of the 550 MHz clock and wraps
// modulo 2**W; it is cleared only by the power-up reset, never between measurements,
// so the START and STOP registers can sample it at any time and the interval is the
// modular difference of the two samples. Width 32 and power-up-only reset follow the
// published design; the asynchronous active-low reset is this design's choice.
//
// Interface: clk0, rst_n (async, active low) -> count[W-1:0].
// Timing: count changes just after each rising edge of clk0.
module coarse_counter #(
  parameter int unsigned W = tdc_pkg::COARSE_W
) (
  input  logic         clk0,
  input  logic         rst_n,
  output logic [W-1:0] count
);
  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;
  end
endmodule
