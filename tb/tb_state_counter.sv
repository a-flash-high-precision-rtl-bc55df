`timescale 1ps / 1fs
// tb_state_counter: samples Ph_out in the middle of every quarter period. Each sample
// must be the expected code of its quarter for the current period parity, one bit must
// change from quarter to quarter, and the parity must alternate every clk0 period.
module tb_state_counter;
  import tdc_tb_pkg::*;
  logic clkin = 1'b0, clk0, clk90, clk180, clk270;
  logic rst_n = 1'b1;
  logic [3:0] ph_out, last;
  int checks = 0, failures = 0;

  localparam logic [3:0] EVEN [4] = '{4'b0101, 4'b0100, 4'b0110, 4'b0010};

  dcm_model #(.PERIOD_PS(PERIOD_PS)) u_dcm (.clkin, .clk0, .clk90, .clk180, .clk270);
  always #(PERIOD_PS / 2.0) clkin = ~clkin;

  state_counter dut (.clk0, .clk90, .clk180, .clk270, .rst_n, .ph_out);

  // power-up reset: a real falling edge, so the asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit parity, first = 1'b1;
    #(1.2 * PERIOD_PS);
    rst_n = 1'b1;
    // let the chain fill, then move to the middle of quarter 0 of a period
    #(6.0 * PERIOD_PS);
    #(PERIOD_PS / 2.0 + real'(period_index($realtime) + 1) * PERIOD_PS + QUARTER / 2.0 - $realtime);
    for (int p = 0; p < 60; p++) begin
      for (int q = 0; q < 4; q++) begin
        automatic logic [3:0] exp_e = EVEN[q];
        checks++;
        if (quarter($realtime) != q) begin
          failures++;
          $display("FAIL testbench out of step");
        end
        if (q == 0) begin
          if (first) parity = (ph_out == ~exp_e);
          else       parity = ~parity;
          first = 1'b0;
        end
        checks++;
        if (ph_out != (parity ? ~exp_e : exp_e)) begin
          failures++;
          $display("FAIL period %0d quarter %0d: ph_out=%b expected %b", p, q, ph_out,
                   parity ? ~exp_e : exp_e);
        end
        if (!(p == 0 && q == 0)) begin
          checks++;
          if ($countones(ph_out ^ last) != 1) begin
            failures++;
            $display("FAIL %b -> %b is not a single-bit step", last, ph_out);
          end
        end
        last = ph_out;
        #(QUARTER);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
