// tb_vedic_mul_2x2: exhaustive check of the 2x2 Vedic multiplier.
//
// All 16 operand pairs are applied; the 4-bit result must equal the integer
// product. Also checked bit by bit against the half-adder equations:
// s0 = a0b0, s1 = a1b0 ^ a0b1, and s3 = 1 only for 3 * 3.
module tb_vedic_mul_2x2;

  logic [1:0] a, b;
  logic [3:0] s;
  int         checks = 0, failures = 0;

  vedic_mul_2x2 dut (.a(a), .b(b), .s(s));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4; x++) begin
      for (int y = 0; y < 4; y++) begin
        a = 2'(x);
        b = 2'(y);
        #1;
        checks++;
        if (s !== 4'(x * y)) begin
          failures++;
          $display("FAIL %0d * %0d = %0d", x, y, s);
        end
        checks++;
        if (s[0] !== (a[0] & b[0]) || s[1] !== ((a[1] & b[0]) ^ (a[0] & b[1]))
            || s[3] !== (x == 3 && y == 3)) begin
          failures++;
          $display("FAIL bit equations for %0d * %0d: s=%b", x, y, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
