`timescale 1ps / 1fs
// tb_phase_encoder: exhaustive check of the state-code to quarter encoder.
// The expected quarter of each of the 16 codes comes from the 8-code sequence of the
// state counter (see state_counter); the other 8 codes must be flagged bad.
module tb_phase_encoder;
  logic [3:0] ph;
  logic [1:0] sel;
  logic       bad;
  int checks = 0, failures = 0;

  phase_encoder dut (.ph, .sel, .bad);

  // sequence of the state counter over two periods, quarter by quarter
  localparam logic [3:0] SEQ [8] = '{4'b0101, 4'b0100, 4'b0110, 4'b0010,
                                     4'b1010, 4'b1011, 4'b1001, 4'b1101};

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      automatic int q = -1;
      for (int i = 0; i < 8; i++) if (SEQ[i] == 4'(c)) q = i % 4;
      ph = 4'(c);
      #1;
      checks++;
      if (q >= 0 && (bad || sel != 2'(q))) begin
        failures++;
        $display("FAIL code %b: sel=%0d bad=%0d expected %0d", ph, sel, bad, q);
      end
      if (q < 0 && !bad) begin
        failures++;
        $display("FAIL code %b should be flagged", ph);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
