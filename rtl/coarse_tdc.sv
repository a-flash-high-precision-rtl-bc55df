`timescale 1ps / 1fs
// coarse_tdc: coarse time measurement plus first phase interpolation.
//
// A 32-bit free-running counter on clk0 is sampled by the START register on the START
// edge and by the STOP register on the STOP edge; a 32-bit subtractor gives their
// difference, the interval in whole clock periods. The phase state machine adds the
// quarter of the period in which each hit fell, so Nc = {STOP count - START count,
// sel1 - sel0} counts the interval in quarter periods (454.5 ps at 550 MHz). The
// borrow of the 2-bit phase subtraction enters the 32-bit subtraction, so Nc is the
// true 34-bit difference (4*Cstop + sel1) - (4*Cstart + sel0); that chaining is this
// design's addition to the published structure. The START side is taken from clk0
// copies made when start_seen pulses (or straight from the START registers when
// start_seen and stop_seen pulse together, which means a short interval), so the
// next START may come one clock period after STOP without disturbing the pair
// being read out.
//
// Interface: clk0..clk270, rst_n, start, stop -> nc[33:0], sel0, sel1 (hit domain, for
// the fine TDCs), and one-cycle clk0 pulses start_seen / stop_seen when a capture has
// reached the clk0 domain.
// Timing: nc is valid while stop_seen is high (2 to 3 clk0 periods after STOP).
module coarse_tdc #(
  parameter int unsigned COARSE_W = tdc_pkg::COARSE_W
) (
  input  logic                  clk0,
  input  logic                  clk90,
  input  logic                  clk180,
  input  logic                  clk270,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  stop,
  output logic [COARSE_W+1:0]   nc,
  output logic [1:0]            sel0,
  output logic [1:0]            sel1,
  output logic                  start_seen,
  output logic                  stop_seen
);
  logic [COARSE_W-1:0] count, start_val, start_held, start_pair, stop_val, coarse_diff;
  logic [1:0]          nc_lo;
  logic                borrow;

  coarse_counter #(.W(COARSE_W)) u_counter (.clk0, .rst_n, .count);

  time_register #(.W(COARSE_W)) u_start_reg (
    .clk0, .rst_n, .hit(start), .count, .value(start_val), .held(start_held),
    .seen(start_seen)
  );
  time_register #(.W(COARSE_W)) u_stop_reg (
    .clk0, .rst_n, .hit(stop), .count, .value(stop_val), .held(),
    .seen(stop_seen)
  );

  phase_fsm u_fsm (
    .clk0, .clk90, .clk180, .clk270, .rst_n, .start, .stop, .start_seen,
    .sel0, .sel1, .nc_lo, .borrow
  );

  assign start_pair = start_seen ? start_val : start_held;

  // The final borrow would only flag STOP before START, which is not an interval.
  subtractor #(.W(COARSE_W)) u_sub (
    .a(stop_val), .b(start_pair), .bin(borrow), .diff(coarse_diff), .bout()
  );

  assign nc = {coarse_diff, nc_lo};
endmodule
