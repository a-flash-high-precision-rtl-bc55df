`timescale 1ps / 1fs
// carry_chain_delay_line: behavioural model of one tapped carry-chain delay line.
//
// In the FPGA the line is the dedicated carry chain: 64 carry multiplexers (MUXCY,
// four per slice) in sequence, each with its select tied to one so that the hit on
// the carry input ripples from one multiplexer to the next. Every multiplexer adds its
// propagation delay tau, the quantisation step of the fine TDC. The delay is a
// property of the silicon, so this file is a behavioural model, not synthesizable
// logic: each tap is the previous one delayed by TAU_PS. For an FPGA build replace it
// with a chain of the vendor's carry primitives kept in one column. The 64 taps follow
// the published design; tau is not published and 10 ps is assumed.
//
// Each stage is a transport delay, so pulses of any width travel down the line, and
// every stage re-evaluates at time zero, so the line settles to its input level within
// TAPS*TAU_PS of power-up.
//
// Interface: din (START or STOP) -> taps[TAPS-1:0]; taps[0] is din itself (the first
// flip-flop samples the undelayed hit), taps[i] = din delayed by i*TAU_PS.
module carry_chain_delay_line #(
  parameter int unsigned TAPS   = tdc_pkg::TAPS,
  parameter realtime     TAU_PS = tdc_pkg::TAU_PS
) (
  input  logic            din,
  output logic [TAPS-1:0] taps
);
  for (genvar i = 0; i < TAPS; i++) begin : g_mux
    logic q;  // output of carry multiplexer i
    if (i == 0) begin : g_in
      assign q = din;
    end else begin : g_dly
      always begin
        q <= #(TAU_PS) g_mux[i-1].q;
        @(g_mux[i-1].q);
      end
    end
    assign taps[i] = q;
  end
endmodule
