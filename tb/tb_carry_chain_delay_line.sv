`timescale 1ps / 1fs
// tb_carry_chain_delay_line: after a rising edge on the input, tap i must rise
// i*TAU later; at random instants the number of high taps must be floor(dt/TAU)+1
// (capped at 64). The falling edge must propagate the same way.
module tb_carry_chain_delay_line;
  localparam realtime TAU = 10.0;
  logic din = 1'b0;
  logic [63:0] taps;
  int checks = 0, failures = 0;

  carry_chain_delay_line dut (.din, .taps);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    repeat (40) begin
      automatic realtime dt = 0.5 + real'($urandom_range(7000)) / 10.0 + 0.13;
      int      expected;
      if (dt / TAU - $floor(dt / TAU) < 0.05 || dt / TAU - $floor(dt / TAU) > 0.95) dt = dt + 0.3;
      expected = int'($floor(dt / TAU)) + 1;
      if (expected > 64) expected = 64;
      din = 1'b1;
      #(dt);
      checks++;
      if ($countones(taps) != expected || (expected < 64 && taps != (64'd1 << expected) - 64'd1)) begin
        failures++;
        $display("FAIL dt=%0f taps=%h expected %0d ones", dt, taps, expected);
      end
      #(700.0 - dt);
      checks++;
      if (taps != '1) begin failures++; $display("FAIL line not full"); end
      din = 1'b0;
      #(dt);
      checks++;
      if ($countones(taps) != 64 - expected) begin
        failures++;
        $display("FAIL falling dt=%0f taps=%h", dt, taps);
      end
      #(700.0 - dt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
