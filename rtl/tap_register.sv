`timescale 1ps / 1fs
// tap_register: the row of flip-flops on the taps of one delay line.
//
// On every rising edge of its phase clock the register samples all taps of its line:
// the taps the hit has already reached read one, the others zero, so the sample is a
// thermometer code of the time between the hit and the clock edge. The sample taken at
// the first edge after the hit (tap 0 high now, low at the previous edge of the same
// clock) is held in 'code' until the next hit arrives. Sampling follows the published
// design; the hold rule is this design's choice and needs the hit to stay high for
// more than one clock period and to be low for one clock period between hits.
//
// Interface: clk (one of clk0/90/180/270), rst_n, taps -> code. Timing: code is updated
// on the first clk edge after the hit and holds until the next hit.
module tap_register #(
  parameter int unsigned TAPS = tdc_pkg::TAPS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TAPS-1:0] taps,
  output logic [TAPS-1:0] code
);
  logic prev0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev0 <= 1'b0;
      code  <= '0;
    end else begin
      prev0 <= taps[0];
      if (taps[0] && !prev0) code <= taps;
    end
  end
endmodule
