`timescale 1ps / 1fs
// tdc_pkg: sizes shared by the blocks of the multi-phase FPGA time-to-digital converter.
//
// The converter measures the time between a START and a STOP edge in three steps:
// a 32-bit coarse counter on the 550 MHz clock, a quarter-period phase measurement
// from four 90-degree shifted copies of that clock, and a 64-tap carry-chain delay
// line that interpolates inside the quarter period. The 32-bit counter, the 2-bit
// phase field, the 34-bit result, the 64 taps and the 6-bit fine codes are the
// published sizes; the tap delay of the behavioural delay-line model is this
// design's assumption (10 ps, enough for 64 taps to span a 454.5 ps quarter).
package tdc_pkg;
  localparam int unsigned COARSE_W = 32;              // coarse counter width
  localparam int unsigned TAPS     = 64;              // taps per carry-chain line
  localparam int unsigned FINE_W   = 6;               // n_a / n_b width
  localparam realtime     TAU_PS   = 10.0;            // modelled delay of one carry mux
endpackage
