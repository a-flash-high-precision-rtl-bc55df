`timescale 1ps / 1fs
// tdc_tb_pkg: reference timing model shared by the TDC testbenches.
//
// The testbench clock source starts low and toggles every PERIOD_PS/2, so clk0 rises at
// (k + 0.5) * PERIOD_PS; clk90/180/270 rise a quarter, half and three quarters of a
// period later. From the absolute time of a hit these functions give, independently
// of the design, the clk0 period index, the quarter (0..3) in which it falls, the time
// of the next phase-clock edge and the fine code a 64-tap line of TAU_PS steps must
// read at that edge. pick_time moves a time away from clock and tap boundaries so
// that the expected values are not decided by simulation event order.
package tdc_tb_pkg;
  localparam realtime PERIOD_PS = 1818.0;   // 550 MHz
  localparam realtime QUARTER   = PERIOD_PS / 4.0;
  localparam realtime TAU_PS    = 10.0;
  localparam int      TAPS      = 64;

  function automatic longint period_index(realtime t);
    return longint'($floor((t - PERIOD_PS / 2.0) / PERIOD_PS));
  endfunction

  function automatic int quarter(realtime t);
    realtime frac = t - PERIOD_PS / 2.0 - real'(period_index(t)) * PERIOD_PS;
    return int'($floor(frac / QUARTER));
  endfunction

  function automatic realtime next_edge(realtime t);
    return PERIOD_PS / 2.0 + real'(period_index(t)) * PERIOD_PS
           + real'(quarter(t) + 1) * QUARTER;
  endfunction

  // Highest tap already reached at the next phase edge (tap i reached at t + i*TAU).
  function automatic int fine_code(realtime t);
    int n = int'($ceil((next_edge(t) - t) / TAU_PS)) - 1;
    return (n > TAPS - 1) ? TAPS - 1 : n;
  endfunction

  // True when t is safely away from every quarter edge and tap boundary.
  function automatic bit time_ok(realtime t);
    realtime d = next_edge(t) - t;
    realtime r = d / TAU_PS - $floor(d / TAU_PS);
    return (d > 1.0) && (d < QUARTER - 1.0) && (r > 0.05) && (r < 0.95);
  endfunction

  function automatic realtime pick_time(realtime t);
    while (!time_ok(t)) t = t + 0.37;
    return t;
  endfunction
endpackage
