`timescale 1ps / 1fs
// phase_register: the Phase Start (or Phase Stop) register of the phase state machine.
//
// Samples the 4-bit state-counter code Ph_out on the rising edge of the hit, which is
// its clock, in the same way the coarse START register samples the counter. The code
// is held until the next hit. Sampling Ph_out on the hit follows the published design;
// clocking the register by the hit itself is this design's choice.
//
// Interface: hit, ph_out[3:0] -> ph[3:0]. Timing: ph is valid just after the hit edge.
module phase_register (
  input  logic       rst_n,
  input  logic       hit,
  input  logic [3:0] ph_out,
  output logic [3:0] ph
);
  always_ff @(posedge hit or negedge rst_n) begin
    if (!rst_n) ph <= '0;
    else        ph <= ph_out;
  end
endmodule
