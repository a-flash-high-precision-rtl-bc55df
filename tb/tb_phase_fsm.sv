`timescale 1ps / 1fs
// tb_phase_fsm: START and STOP at random times; sel0/sel1 must be the quarter of the
// clk0 period each hit fell in, computed from the hit time, and nc_lo/borrow the
// 2-bit difference STOP quarter - START quarter with its borrow. The difference is
// checked three ways: with start_seen high (START taken directly), after start_seen
// has copied the START quarter, and after a new START has replaced the raw START
// quarter (the copy must still be used).
module tb_phase_fsm;
  import tdc_tb_pkg::*;
  logic clkin = 1'b0, clk0, clk90, clk180, clk270;
  logic rst_n = 1'b1, start = 1'b0, stop = 1'b0, start_seen = 1'b0;
  logic [1:0] sel0, sel1, nc_lo;
  logic borrow;
  int checks = 0, failures = 0;
  int seen_q0 [4] = '{0, 0, 0, 0};
  int borrows = 0;

  dcm_model #(.PERIOD_PS(PERIOD_PS)) u_dcm (.clkin, .clk0, .clk90, .clk180, .clk270);
  always #(PERIOD_PS / 2.0) clkin = ~clkin;

  phase_fsm dut (.clk0, .clk90, .clk180, .clk270, .rst_n, .start, .stop, .start_seen,
                 .sel0, .sel1, .nc_lo, .borrow);

  task automatic expect_diff(int q0, int q1, string what);
    checks++;
    if (nc_lo != 2'(q1 - q0) || borrow != (q1 < q0)) begin
      failures++;
      $display("FAIL %s: nc_lo=%0d borrow=%0d expected %0d - %0d", what, nc_lo, borrow, q1, q0);
    end
  endtask

  // power-up reset: a real falling edge, so the asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1.2 * PERIOD_PS);
    rst_n = 1'b1;
    #(8.0 * PERIOD_PS);
    for (int i = 0; i < 200; i++) begin
      automatic realtime ts = pick_time($realtime + PERIOD_PS * real'($urandom_range(1000)) / 1000.0);
      automatic realtime te, t2;
      automatic int q0, q1, q2;
      #(ts - $realtime);
      start = 1'b1;
      te = pick_time(ts + 5.0 + PERIOD_PS * real'($urandom_range(3000)) / 1000.0);
      #(te - $realtime);
      stop = 1'b1;
      #(2.0);
      q0 = quarter(ts);
      q1 = quarter(te);
      seen_q0[q0]++;
      if (q1 < q0) borrows++;
      checks++;
      if (sel0 != 2'(q0) || sel1 != 2'(q1)) begin
        failures++;
        $display("FAIL ts=%0f te=%0f: sel0=%0d sel1=%0d expected %0d %0d", ts, te, sel0, sel1, q0, q1);
      end
      // same-cycle case: the START quarter is used directly
      start_seen = 1'b1;
      #(1.0);
      expect_diff(q0, q1, "direct");
      @(posedge clk0);
      #(1.0);
      start_seen = 1'b0;
      #(1.0);
      expect_diff(q0, q1, "copy");
      #(1.5 * PERIOD_PS);
      start = 1'b0;
      stop = 1'b0;
      // a new START replaces sel0 but not the copy
      t2 = pick_time($realtime + 1.2 * PERIOD_PS + PERIOD_PS * real'($urandom_range(1000)) / 1000.0);
      #(t2 - $realtime);
      start = 1'b1;
      #(2.0);
      q2 = quarter(t2);
      checks++;
      if (sel0 != 2'(q2)) begin failures++; $display("FAIL new START sel0=%0d expected %0d", sel0, q2); end
      expect_diff(q0, q1, "after new START");
      #(1.5 * PERIOD_PS);
      start = 1'b0;
      #(1.5 * PERIOD_PS);
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (seen_q0[q] == 0) begin failures++; $display("FAIL quarter %0d never hit", q); end
    end
    checks++;
    if (borrows == 0) begin failures++; $display("FAIL no borrow case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
