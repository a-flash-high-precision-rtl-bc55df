`timescale 1ps / 1fs
// tb_thermo_encoder: checks the 64-tap priority encoder on clean thermometer codes of
// every length, on codes with bubbles below the front and on random words.
module tb_thermo_encoder;
  logic [63:0] therm;
  logic [5:0]  bin;
  int checks = 0, failures = 0;

  thermo_encoder dut (.therm, .bin);

  task automatic check(int expected);
    #1;
    checks++;
    if (bin != 6'(expected)) begin
      failures++;
      $display("FAIL %h -> %0d expected %0d", therm, bin, expected);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    therm = '0;
    check(0);
    for (int n = 1; n <= 64; n++) begin
      therm = (n == 64) ? '1 : (64'd1 << n) - 64'd1;
      check(n - 1);
    end
    // bubbles: clear random bits below the front
    for (int n = 2; n <= 64; n++) begin
      automatic logic [63:0] t = (n == 64) ? '1 : (64'd1 << n) - 64'd1;
      t[$urandom_range(n - 2, 0)] = 1'b0;
      therm = t;
      check(n - 1);
    end
    repeat (200) begin
      automatic logic [63:0] t = {$urandom, $urandom};
      automatic int hi = 0;
      automatic logic [63:0] s = t;
      while (s > 1) begin s = s >> 1; hi++; end
      therm = t;
      check(hi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
