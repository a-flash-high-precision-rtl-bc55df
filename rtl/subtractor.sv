`timescale 1ps / 1fs
// subtractor: W-bit modular subtractor with borrow, diff = a - b - bin.
//
// The coarse TDC uses it 32 bits wide for Nc[33:2] = STOP count - START count, and the
// phase state machine uses it 2 bits wide for Nc[1:0] = STOP quarter - START quarter.
// The borrow out of the 2-bit one is fed into the 32-bit one, so together they form
// one 34-bit subtraction; the borrow chaining is this design's addition (without it
// Nc is four quarters too large whenever the STOP quarter is below the START quarter).
// Wrap of the free-running counter is handled by the modular result.
//
// Interface: a, b [W-1:0], bin -> diff [W-1:0], bout. Purely combinational.
module subtractor #(
  parameter int unsigned W = tdc_pkg::COARSE_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         bin,
  output logic [W-1:0] diff,
  output logic         bout
);
  logic [W:0] full;

  always_comb begin
    full = {1'b0, a} - {1'b0, b} - {{W{1'b0}}, bin};
    diff = full[W-1:0];
    bout = full[W];
  end
endmodule
