`timescale 1ps / 1fs
// phase_encoder: turns a sampled state-counter code into the 2-bit quarter Sel.
//
// Sel is 00 when the hit came between 0 and pi/2 after the clk0 rising edge, 01 between
// pi/2 and pi, 10 between pi and 3pi/2 and 11 between 3pi/2 and 2pi (the published
// coding). The codes of odd clock periods are the bitwise complements of those of
// even periods (see state_counter), so the code is inverted when Ph[3] is set and
// then looked up in a four-entry table; the table is derived, not published. A code
// outside the sequence (only possible before the counter has settled after reset)
// gives 00 and raises 'bad'.
//
// Interface: ph[3:0] -> sel[1:0], bad. Purely combinational.
module phase_encoder (
  input  logic [3:0] ph,
  output logic [1:0] sel,
  output logic       bad
);
  logic [3:0] even;

  always_comb begin
    even = ph[3] ? ~ph : ph;
    bad  = 1'b0;
    unique case (even)
      4'b0101: sel = 2'd0;
      4'b0100: sel = 2'd1;
      4'b0110: sel = 2'd2;
      4'b0010: sel = 2'd3;
      default: begin
        sel = 2'd0;
        bad = 1'b1;
      end
    endcase
  end
endmodule
