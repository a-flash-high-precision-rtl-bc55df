`timescale 1ps / 1fs
// fine_tdc: carry-chain fine interpolator for one hit (START or STOP).
//
// The hit drives four carry-chain delay lines. Line j is sampled by the phase clock
// j*90 degrees (clk0, clk90, clk180, clk270), so whichever quarter of the period the
// hit falls in, one line is sampled less than a quarter period later and only has to
// span a quarter period (454.5 ps at 550 MHz). The state machine's quarter 'sel' = q
// (hit between q*90 and (q+1)*90 degrees) chooses the line of the next phase clock,
// (q+1) mod 4, whose held thermometer code is priority-encoded into the fine code n:
// the number of taps between the hit and that clock edge. The time of the hit is then
// (phase edge) - n*tau. Four lines, phase clocks, selection by sel and the priority
// encoder are the published structure; which line a sel value picks is this design's
// reading.
//
// Interface: clk0..clk270, rst_n, hit, sel[1:0] -> n[FINE_W-1:0].
// Timing: n is valid one clock period after the hit at the latest and holds until
// the next hit.
module fine_tdc #(
  parameter int unsigned TAPS   = tdc_pkg::TAPS,
  parameter int unsigned FINE_W = tdc_pkg::FINE_W,
  parameter realtime     TAU_PS = tdc_pkg::TAU_PS
) (
  input  logic              clk0,
  input  logic              clk90,
  input  logic              clk180,
  input  logic              clk270,
  input  logic              rst_n,
  input  logic              hit,
  input  logic [1:0]        sel,
  output logic [FINE_W-1:0] n
);
  logic [3:0]            phase_clk;
  logic [TAPS-1:0]       taps [4];
  logic [TAPS-1:0]       code [4];
  logic [1:0]            line;

  assign phase_clk = {clk270, clk180, clk90, clk0};

  for (genvar j = 0; j < 4; j++) begin : g_line
    carry_chain_delay_line #(.TAPS(TAPS), .TAU_PS(TAU_PS)) u_line (
      .din(hit), .taps(taps[j])
    );
    tap_register #(.TAPS(TAPS)) u_reg (
      .clk(phase_clk[j]), .rst_n, .taps(taps[j]), .code(code[j])
    );
  end

  assign line = sel + 2'd1;

  thermo_encoder #(.TAPS(TAPS), .OUT_W(FINE_W)) u_enc (.therm(code[line]), .bin(n));
endmodule
