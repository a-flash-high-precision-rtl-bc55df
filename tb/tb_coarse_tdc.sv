`timescale 1ps / 1fs
// tb_coarse_tdc: random START/STOP pairs; when stop_seen pulses, Nc must equal the
// interval in quarter periods, 4*(STOP period - START period) + (STOP quarter - START
// quarter), computed from the hit times. Both 'seen' pulses must arrive 1 to 3 clk0
// periods after their hit. In some pairs a new START follows the STOP by 1.1 to 1.5
// periods, before stop_seen: Nc must still be that of the pair.
module tb_coarse_tdc;
  import tdc_tb_pkg::*;
  logic clkin = 1'b0, clk0, clk90, clk180, clk270;
  logic rst_n = 1'b1, start = 1'b0, stop = 1'b0;
  logic [33:0] nc;
  logic [1:0] sel0, sel1;
  logic start_seen, stop_seen;
  int checks = 0, failures = 0;
  realtime t_start_seen, t_stop_seen;
  logic [33:0] nc_at_seen;
  int early_starts = 0;

  dcm_model #(.PERIOD_PS(PERIOD_PS)) u_dcm (.clkin, .clk0, .clk90, .clk180, .clk270);
  always #(PERIOD_PS / 2.0) clkin = ~clkin;

  coarse_tdc dut (.clk0, .clk90, .clk180, .clk270, .rst_n, .start, .stop,
                  .nc, .sel0, .sel1, .start_seen, .stop_seen);

  always @(posedge clk0) begin
    if (start_seen && t_start_seen == 0.0) t_start_seen = $realtime;
    if (stop_seen) begin t_stop_seen = $realtime; nc_at_seen = nc; end
  end

  // power-up reset: a real falling edge, so the asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #40_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1.2 * PERIOD_PS);
    rst_n = 1'b1;
    #(8.0 * PERIOD_PS);
    for (int i = 0; i < 120; i++) begin
      automatic realtime ts = pick_time($realtime + PERIOD_PS * real'($urandom_range(1000)) / 1000.0);
      realtime te, span;
      longint expected;
      span = (i % 10 == 0) ? PERIOD_PS * real'($urandom_range(2000, 200))
                           : PERIOD_PS * real'($urandom_range(6000)) / 1000.0;
      te = pick_time(ts + 5.0 + span);
      expected = 4 * (period_index(te) - period_index(ts)) + quarter(te) - quarter(ts);
      t_start_seen = 0.0;
      t_stop_seen = 0.0;
      #(ts - $realtime);
      start = 1'b1;
      fork
        begin #(1.5 * PERIOD_PS); start = 1'b0; end
        begin #(te - $realtime); stop = 1'b1; #(1.5 * PERIOD_PS); stop = 1'b0; end
        if (i % 2 == 1 && span >= 2.0 * PERIOD_PS) begin
          // next START right after STOP
          #(te - $realtime + PERIOD_PS * (1.1 + real'($urandom_range(400)) / 1000.0));
          start = 1'b1;
          early_starts++;
          #(1.5 * PERIOD_PS);
          start = 1'b0;
        end
      join
      #(3.0 * PERIOD_PS);
      checks++;
      if (nc_at_seen != 34'(expected)) begin
        failures++;
        $display("FAIL ts=%0f te=%0f nc=%0d expected %0d", ts, te, nc_at_seen, expected);
      end
      checks++;
      if (t_start_seen - ts < PERIOD_PS || t_start_seen - ts > 3.0 * PERIOD_PS ||
          t_stop_seen - te < PERIOD_PS || t_stop_seen - te > 3.0 * PERIOD_PS) begin
        failures++;
        $display("FAIL seen latency start %0f stop %0f", t_start_seen - ts, t_stop_seen - te);
      end
    end
    checks++;
    if (early_starts == 0) begin failures++; $display("FAIL no early START"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
