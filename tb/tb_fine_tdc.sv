`timescale 1ps / 1fs
// tb_fine_tdc: hits at random times with sel set to the hit's quarter; one period later
// n must be the number of taps between the hit and the next phase-clock edge minus one,
// ceil((edge - t_hit)/TAU) - 1, computed from the times.
module tb_fine_tdc;
  import tdc_tb_pkg::*;
  logic clkin = 1'b0, clk0, clk90, clk180, clk270;
  logic rst_n = 1'b1, hit = 1'b0;
  logic [1:0] sel = '0;
  logic [5:0] n;
  int checks = 0, failures = 0;
  int lines [4] = '{0, 0, 0, 0};

  dcm_model #(.PERIOD_PS(PERIOD_PS)) u_dcm (.clkin, .clk0, .clk90, .clk180, .clk270);
  always #(PERIOD_PS / 2.0) clkin = ~clkin;

  fine_tdc dut (.clk0, .clk90, .clk180, .clk270, .rst_n, .hit, .sel, .n);

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
    #(3.0 * PERIOD_PS);
    for (int i = 0; i < 200; i++) begin
      automatic realtime t = pick_time($realtime + PERIOD_PS * real'($urandom_range(1000)) / 1000.0);
      #(t - $realtime);
      hit = 1'b1;
      sel = 2'(quarter(t));
      lines[quarter(t)]++;
      #(1.5 * PERIOD_PS);
      checks++;
      if (n != 6'(fine_code(t))) begin
        failures++;
        $display("FAIL t=%0f quarter %0d: n=%0d expected %0d", t, quarter(t), n, fine_code(t));
      end
      hit = 1'b0;
      #(1.5 * PERIOD_PS);
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (lines[q] == 0) begin failures++; $display("FAIL line for quarter %0d unused", q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
