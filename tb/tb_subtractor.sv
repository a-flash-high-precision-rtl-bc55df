`timescale 1ps / 1fs
// tb_subtractor: random and corner-case checks of the modular subtractor with borrow,
// at the coarse width (32) and the phase width (2), against 64-bit integer arithmetic.
module tb_subtractor;
  logic [31:0] a, b, d;
  logic        bin, bout;
  logic [1:0]  a2, b2, d2;
  logic        bin2, bout2;
  int checks = 0, failures = 0;

  subtractor #(.W(32)) dut (.a, .b, .bin, .diff(d), .bout);
  subtractor #(.W(2))  dut2 (.a(a2), .b(b2), .bin(bin2), .diff(d2), .bout(bout2));

  task automatic check32(logic [31:0] x, logic [31:0] y, logic c);
    longint e;
    a = x; b = y; bin = c;
    #1;
    e = longint'(x) - longint'(y) - longint'(c);
    checks++;
    if (d != e[31:0] || bout != (e < 0)) begin
      failures++;
      $display("FAIL %0d - %0d - %0d: got %0d/%0d", x, y, c, d, bout);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check32(32'd10, 32'd3, 1'b0);
    check32(32'd10, 32'd3, 1'b1);
    check32(32'd3, 32'd10, 1'b0);          // counter wrap between the two samples
    check32(32'd0, 32'hFFFF_FFFF, 1'b0);
    check32(32'd5, 32'd5, 1'b1);
    repeat (500) check32($urandom, $urandom, 1'($urandom));
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++)
        for (int c = 0; c < 2; c++) begin
          int e;
          a2 = 2'(x); b2 = 2'(y); bin2 = 1'(c);
          #1;
          e = x - y - c;
          checks++;
          if (d2 != 2'(e) || bout2 != (e < 0)) begin
            failures++;
            $display("FAIL 2-bit %0d - %0d - %0d: got %0d/%0d", x, y, c, d2, bout2);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
