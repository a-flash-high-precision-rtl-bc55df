`timescale 1ps / 1fs
// thermo_encoder: thermometer-to-binary priority encoder of the fine TDC.
//
// Returns the index of the highest set bit of the sampled delay-line code, i.e. the
// number of carry multiplexers the hit had passed at the clock edge. Taking the
// highest one makes the result immune to bubbles below the front. An all-zero code
// gives 0. The priority encoder is the published choice; the bubble rule is this
// design's.
//
// Interface: therm[TAPS-1:0] -> bin[OUT_W-1:0]. Purely combinational.
module thermo_encoder #(
  parameter int unsigned TAPS  = tdc_pkg::TAPS,
  parameter int unsigned OUT_W = tdc_pkg::FINE_W
) (
  input  logic [TAPS-1:0]  therm,
  output logic [OUT_W-1:0] bin
);
  always_comb begin
    bin = '0;
    for (int i = 0; i < TAPS; i++) begin
      if (therm[i]) bin = OUT_W'(i);
    end
  end
endmodule
