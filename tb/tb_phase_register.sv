`timescale 1ps / 1fs
// tb_phase_register: the register must take its input on each rising hit edge and hold
// it while the input changes and on the falling edge.
module tb_phase_register;
  logic rst_n = 1'b1, hit = 1'b0;
  logic [3:0] ph_out = '0, ph;
  int checks = 0, failures = 0;

  phase_register dut (.rst_n, .hit, .ph_out, .ph);

  // power-up reset: a real falling edge, so the asynchronous resets act
  initial #1 rst_n = 1'b0;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    checks++;
    if (ph != 4'd0) failures++;
    rst_n = 1'b1;
    repeat (50) begin
      automatic logic [3:0] v = 4'($urandom);
      ph_out = v;
      #5 hit = 1'b1;
      #1 ph_out = ~v;
      #5;
      checks++;
      if (ph != v) begin failures++; $display("FAIL got %b expected %b", ph, v); end
      hit = 1'b0;
      #5;
      checks++;
      if (ph != v) begin failures++; $display("FAIL not held on falling edge"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
