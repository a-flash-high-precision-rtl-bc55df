`timescale 1ps / 1fs
// tb_time_register: hits at random times between clock edges must capture the count of
// the clk0 period they fall in, 'seen' must pulse once, 2 to 3 clk0 periods later, and
// 'held' must carry the captured value from the end of that pulse on, through the next hit.
module tb_time_register;
  import tdc_tb_pkg::*;
  logic clkin = 1'b0, clk0, clk90, clk180, clk270;
  logic rst_n = 1'b1, hit = 1'b0;
  logic [31:0] count = '0, value, held;
  logic seen;
  int checks = 0, failures = 0;
  int seen_pulses = 0;
  realtime seen_time;

  dcm_model #(.PERIOD_PS(PERIOD_PS)) u_dcm (.clkin, .clk0, .clk90, .clk180, .clk270);
  always #(PERIOD_PS / 2.0) clkin = ~clkin;

  // reference counter: period index since a fixed offset
  always_ff @(posedge clk0) count <= count + 32'd1;

  time_register dut (.clk0, .rst_n, .hit, .count, .value, .held, .seen);

  always @(posedge clk0) if (seen) begin seen_pulses++; seen_time = $realtime; end

  // power-up reset: a real falling edge, so the asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(3.2 * PERIOD_PS);
    rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      automatic realtime t = pick_time($realtime + PERIOD_PS * (2.0 + 4.0 * real'($urandom_range(1000)) / 1000.0));
      longint  k;
      int      n_before;
      #(t - $realtime);
      k = period_index(t);
      n_before = seen_pulses;
      hit = 1'b1;
      #1;
      checks++;
      if (value != count) begin
        failures++;
        $display("FAIL value=%0d count=%0d", value, count);
      end
      #(PERIOD_PS * 3.0 - 1.0);
      checks++;
      if (seen_pulses != n_before + 1 || seen_time - t > 3.0 * PERIOD_PS || seen_time - t < 1.0 * PERIOD_PS) begin
        failures++;
        $display("FAIL seen pulses=%0d latency=%0f", seen_pulses - n_before, seen_time - t);
      end
      checks++;
      if (held != value) begin failures++; $display("FAIL held=%0d value=%0d", held, value); end
      hit = 1'b0;
      #(PERIOD_PS * 1.5);
      begin
        automatic logic [31:0] old = held;
        hit = 1'b1;                    // next hit: held keeps the previous value
        #(PERIOD_PS * 1.2);
        checks++;
        if (held != old || value == old) begin
          failures++;
          $display("FAIL held changed before seen");
        end
        #(PERIOD_PS * 2.5);
        hit = 1'b0;
        #(PERIOD_PS * 1.5);
      end
      checks++;
      if (seen_pulses != n_before + 2) begin
        failures++;
        $display("FAIL wrong number of seen pulses (period %0d)", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
