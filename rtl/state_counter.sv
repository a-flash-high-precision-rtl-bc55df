`timescale 1ps / 1fs
// state_counter: four-phase state counter of the phase state machine.
//
// A flop on clk0 with an inverter in its feedback toggles every clock period (lsb).
// lsb runs down a chain of four flops: the first on clk0 gives Ph_out[3], then flops on
// clk270, clk180 and clk90 give Ph_out[2], Ph_out[1], Ph_out[0]. Each step of the chain
// re-samples three quarters of a period later, so one bit of Ph_out changes every
// quarter period and the 4-bit code runs through eight codes per two clock periods:
//   quarter        0     1     2     3
//   even period  0101  0100  0110  0010
//   odd period   1010  1011  1001  1101
// (quarter q = time since the clk0 rising edge in units of a quarter period). Any
// sample of Ph_out therefore tells in which quarter of clk0 it was taken. The flop
// chain and its clocks follow the published block diagram; the table is derived from
// it, and the reset to zero is this design's choice. The sequence is reached on the
// fourth clk0 period after reset.
//
// Interface: clk0, clk90, clk180, clk270, rst_n -> ph_out[3:0].
module state_counter (
  input  logic       clk0,
  input  logic       clk90,
  input  logic       clk180,
  input  logic       clk270,
  input  logic       rst_n,
  output logic [3:0] ph_out
);
  logic lsb, ph3, ph2, ph1, ph0;

  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n) begin
      lsb       <= 1'b0;
      ph3 <= 1'b0;
    end else begin
      lsb       <= ~lsb;
      ph3 <= lsb;
    end
  end

  always_ff @(posedge clk270 or negedge rst_n) begin
    if (!rst_n) ph2 <= 1'b0;
    else        ph2 <= ph3;
  end

  always_ff @(posedge clk180 or negedge rst_n) begin
    if (!rst_n) ph1 <= 1'b0;
    else        ph1 <= ph2;
  end

  always_ff @(posedge clk90 or negedge rst_n) begin
    if (!rst_n) ph0 <= 1'b0;
    else        ph0 <= ph1;
  end

  assign ph_out = {ph3, ph2, ph1, ph0};
endmodule
