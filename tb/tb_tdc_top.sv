`timescale 1ps / 1fs
// tb_tdc_top: end-to-end test of the whole converter at its default sizes.
//
// A clock source and the clock-manager model drive the four phases at 550 MHz
// (1818 ps). START/STOP pulse pairs are placed at chosen absolute times and queued;
// every valid result is matched with the oldest queued pair and checked, from the hit
// times alone:
//   nc = 4*(STOP period - START period) + (STOP quarter - START quarter)
//   na, nb = taps between each hit and the next phase-clock edge
//   |nc*T/4 + (na - nb)*tau - (t_stop - t_start)| < tau
//   valid 2 to 4 clk0 periods after STOP.
// Runs:
//   1. the interval swept in 50 ps steps over more than one clock period,
//   2. intervals of 1 us to 20 us in 1 us steps,
//   3. random intervals, a third of them shorter than the START pulse,
//   4. a STOP with no START before it (must give no result),
//   5. back-to-back pairs: each START 1.05 to 1.5 periods after the previous STOP,
//      before the previous result is out.
// Each mechanism (every START and STOP quarter, borrow between the phase and coarse
// fields, interval shorter than a period, overlap, ignored STOP, back-to-back, 20 us
// interval) is counted, and one that never happened is a failure.
module tb_tdc_top;
  import tdc_tb_pkg::*;
  logic clkin = 1'b0, clk0, clk90, clk180, clk270;
  logic rst_n = 1'b1, start = 1'b0, stop = 1'b0;
  logic [33:0] nc;
  logic [5:0]  na, nb;
  logic        valid;
  int checks = 0, failures = 0;

  localparam realtime WIDTH = 1.5 * PERIOD_PS;   // hit pulse width

  typedef struct {
    realtime ts;
    realtime te;
  } pair_t;
  pair_t   pending [$];
  realtime ts_prev = 0.0, te_prev = 0.0;
  int      n_valid = 0;

  int q0_hits [4] = '{0, 0, 0, 0};
  int q1_hits [4] = '{0, 0, 0, 0};
  int n_borrow = 0, n_short = 0, n_overlap = 0, n_ignored = 0, n_b2b = 0, n_20us = 0;
  realtime worst_err = 0.0;

  dcm_model #(.PERIOD_PS(PERIOD_PS)) u_dcm (.clkin, .clk0, .clk90, .clk180, .clk270);
  always #(PERIOD_PS / 2.0) clkin = ~clkin;

  tdc_top dut (.clk0, .clk90, .clk180, .clk270, .rst_n, .start, .stop,
               .nc, .na, .nb, .valid);

  // result checker
  always @(posedge clk0) begin
    if (valid) begin
      n_valid++;
      checks++;
      if (pending.size() == 0) begin
        failures++;
        $display("FAIL result at %0f with no pair pending", $realtime);
      end else begin
        automatic pair_t   p = pending.pop_front();
        automatic int      q0 = quarter(p.ts), q1 = quarter(p.te);
        automatic longint  exp_nc = 4 * (period_index(p.te) - period_index(p.ts)) + q1 - q0;
        automatic int      exp_na = fine_code(p.ts), exp_nb = fine_code(p.te);
        automatic realtime meas = real'(nc) * QUARTER + (real'(na) - real'(nb)) * TAU_PS;
        automatic realtime err = meas - (p.te - p.ts);
        if (err < 0.0) err = -err;
        if (err > worst_err) worst_err = err;
        checks += 3;
        if (nc != 34'(exp_nc) || na != 6'(exp_na) || nb != 6'(exp_nb)) begin
          failures++;
          $display("FAIL ts=%0f te=%0f: nc=%0d na=%0d nb=%0d expected %0d %0d %0d",
                   p.ts, p.te, nc, na, nb, exp_nc, exp_na, exp_nb);
        end
        if (err >= TAU_PS) begin
          failures++;
          $display("FAIL interval %0f measured %0f", p.te - p.ts, meas);
        end
        if ($realtime - p.te < 2.0 * PERIOD_PS || $realtime - p.te > 4.0 * PERIOD_PS) begin
          failures++;
          $display("FAIL valid latency %0f ps", $realtime - p.te);
        end
        q0_hits[q0]++;
        q1_hits[q1]++;
        if (q1 < q0) n_borrow++;
        if (exp_nc < 4) n_short++;
        if (p.te - p.ts < WIDTH) n_overlap++;
        if (p.te - p.ts >= 20_000_000.0) n_20us++;
      end
    end
  end

  // power-up reset: a real falling edge, so the asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Queue a START at ts and a STOP at te; returns at te. Callers keep ts after the
  // previous STOP and both hits 3 periods after the previous hit on the same input.
  task automatic pair(realtime ts, realtime te);
    pair_t p;
    p.ts = ts;
    p.te = te;
    pending.push_back(p);
    if (ts - te_prev < 1.6 * PERIOD_PS) n_b2b++;
    fork
      begin #(ts - $realtime); start = 1'b1; #(WIDTH); start = 1'b0; end
      begin #(te - $realtime); stop = 1'b1; #(WIDTH); stop = 1'b0; end
    join_none
    #(te - $realtime);
    ts_prev = ts;
    te_prev = te;
  endtask

  // Earliest legal START after a gap behind the previous STOP.
  function automatic realtime next_start(realtime gap);
    realtime t = te_prev + gap;
    if (t < ts_prev + 3.05 * PERIOD_PS) t = ts_prev + 3.05 * PERIOD_PS;
    if (t < $realtime + 1.0) t = $realtime + 1.0;
    return pick_time(t);
  endfunction

  function automatic realtime stop_after(realtime ts, realtime span);
    realtime t = ts + span;
    if (t < te_prev + 3.05 * PERIOD_PS) t = te_prev + 3.05 * PERIOD_PS;
    return pick_time(t);
  endfunction

  task automatic drain;
    #(5.0 * PERIOD_PS);
    checks++;
    if (pending.size() != 0) begin
      failures++;
      $display("FAIL %0d pairs without a result", pending.size());
      pending.delete();
    end
  endtask

  initial begin
    realtime ts;
    #(1.2 * PERIOD_PS);
    rst_n = 1'b1;
    #(8.0 * PERIOD_PS);
    te_prev = $realtime;
    ts_prev = $realtime;

    // 1. 50 ps steps over 1.85 ns (a full clock period and a bit); the START time
    //    drifts by 7 ps per step so that it visits every quarter
    for (int k = 1; k <= 37; k++) begin
      ts = next_start(3.1 * PERIOD_PS + 7.0 * real'(k));
      pair(ts, pick_time(ts + 50.0 * real'(k)));
    end
    drain();

    // 2. 1 us to 20 us in 1 us steps
    for (int k = 1; k <= 20; k++) begin
      ts = next_start(PERIOD_PS * (1.2 + real'($urandom_range(1000)) / 1000.0));
      pair(ts, stop_after(ts, 1_000_000.0 * real'(k)));
    end
    drain();

    // 3. random intervals, a third of them shorter than the START pulse
    for (int k = 0; k < 150; k++) begin
      automatic realtime span = (k % 3 == 0) ? 20.0 + real'($urandom_range(2500))
                                             : PERIOD_PS * real'($urandom_range(40_000)) / 1000.0;
      ts = next_start(PERIOD_PS * (2.0 + real'($urandom_range(2000)) / 1000.0));
      pair(ts, stop_after(ts, span));
    end
    drain();

    // 4. STOP without START: no result (the checker flags any result)
    begin
      automatic int      n_before = n_valid;
      automatic realtime t = pick_time($realtime + 4.0 * PERIOD_PS);
      #(t - $realtime);
      stop = 1'b1;
      #(WIDTH);
      stop = 1'b0;
      te_prev = t;
      #(6.0 * PERIOD_PS);
      checks++;
      if (n_valid != n_before) failures++;
      else n_ignored++;
    end

    // 5. back-to-back: each START 1.05 to 1.5 periods after the previous STOP
    for (int k = 0; k < 60; k++) begin
      ts = next_start(PERIOD_PS * (1.05 + real'($urandom_range(450)) / 1000.0));
      pair(ts, stop_after(ts, 30.0 + PERIOD_PS * real'($urandom_range(5000)) / 1000.0));
    end
    drain();

    for (int q = 0; q < 4; q++) begin
      checks += 2;
      if (q0_hits[q] == 0) begin failures++; $display("FAIL START quarter %0d never seen", q); end
      if (q1_hits[q] == 0) begin failures++; $display("FAIL STOP quarter %0d never seen", q); end
    end
    checks += 6;
    if (n_borrow == 0)  begin failures++; $display("FAIL no phase borrow"); end
    if (n_short == 0)   begin failures++; $display("FAIL no sub-period interval"); end
    if (n_overlap == 0) begin failures++; $display("FAIL no overlapping START/STOP"); end
    if (n_ignored == 0) begin failures++; $display("FAIL lone STOP not ignored"); end
    if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back measurement"); end
    if (n_20us == 0)    begin failures++; $display("FAIL no 20 us interval"); end
    $display("results=%0d borrow=%0d short=%0d overlap=%0d ignored=%0d back_to_back=%0d 20us=%0d worst_error=%0.2f ps",
             n_valid, n_borrow, n_short, n_overlap, n_ignored, n_b2b, n_20us, worst_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
