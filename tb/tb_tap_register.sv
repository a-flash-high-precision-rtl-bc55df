`timescale 1ps / 1fs
// tb_tap_register: drives tap words around the register's clock. The word present at
// the first clock edge with tap 0 high must be held; later samples (a full line) must
// not replace it until tap 0 has been seen low and a new hit arrives.
module tb_tap_register;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [63:0] taps = '0, code;
  int checks = 0, failures = 0;

  tap_register dut (.clk, .rst_n, .taps, .code);
  always #909 clk = ~clk;

  // power-up reset: a real falling edge, so the asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000 rst_n = 1'b1;
    repeat (40) begin
      automatic int n = $urandom_range(64, 1);
      automatic logic [63:0] w = (n == 64) ? '1 : (64'd1 << n) - 64'd1;
      @(negedge clk);
      taps = w;
      @(posedge clk); #1;
      checks++;
      if (code != w) begin failures++; $display("FAIL held %h expected %h", code, w); end
      @(negedge clk) taps = '1;
      repeat (3) @(posedge clk);
      #1;
      checks++;
      if (code != w) begin failures++; $display("FAIL overwritten by later sample"); end
      @(negedge clk) taps = '0;
      repeat (2) @(posedge clk);
      #1;
      checks++;
      if (code != w) begin failures++; $display("FAIL overwritten on release"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
