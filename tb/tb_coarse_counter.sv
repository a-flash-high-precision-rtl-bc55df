`timescale 1ps / 1fs
// tb_coarse_counter: checks the free-running coarse counter.
// After reset the count must equal the number of clk0 rising edges seen, at full width
// (32 bits) and on a 4-bit copy that is run through several wraps.
module tb_coarse_counter;
  logic clk0 = 1'b0, rst_n = 1'b1;
  logic [31:0] count;
  logic [3:0]  count4;
  int checks = 0, failures = 0;
  int edges = 0;

  coarse_counter dut (.clk0, .rst_n, .count);
  coarse_counter #(.W(4)) dut4 (.clk0, .rst_n, .count(count4));

  always #909 clk0 = ~clk0;

  // power-up reset: a real falling edge, so the asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000;
    if (count !== 32'd0 || count4 !== 4'd0) failures++;
    checks++;
    @(negedge clk0) rst_n = 1'b1;
    repeat (100) begin
      @(posedge clk0); edges++;
      #1;
      checks++;
      if (count != 32'(edges)) begin
        failures++;
        $display("FAIL count=%0d expected %0d", count, edges);
      end
      checks++;
      if (count4 != 4'(edges % 16)) begin
        failures++;
        $display("FAIL count4=%0d expected %0d", count4, edges % 16);
      end
    end
    rst_n = 1'b0;
    #1;
    checks++;
    if (count != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
