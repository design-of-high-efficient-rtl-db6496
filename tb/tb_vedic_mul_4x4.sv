// tb_vedic_mul_4x4: exhaustive check of the 4x4 Vedic multiplier.
//
// All 256 operand pairs are applied; the 8-bit result must equal the
// integer product. The run counts how often each of the two internal
// adder carries (ca1 out of the first adder, ca2 out of the second) was 1,
// and fails if either never was, since the two carries share one input of
// the last adder.
module tb_vedic_mul_4x4;

  logic [3:0] a, b;
  logic [7:0] s;
  int         checks = 0, failures = 0;
  int         n_ca1 = 0, n_ca2 = 0;

  vedic_mul_4x4 dut (.a(a), .b(b), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a = 4'(x);
        b = 4'(y);
        #1;
        checks++;
        if (s !== 8'(x * y)) begin
          failures++;
          $display("FAIL %0d * %0d = %0d", x, y, s);
        end
        // Carries of the partial-product sums, worked out from the operands.
        if ((x % 4) * (y / 4) + (x / 4) * (y % 4) >= 16) n_ca1++;
        else if ((((x % 4) * (y / 4) + (x / 4) * (y % 4)) % 16) + (((x % 4) * (y % 4)) / 4) >= 16)
          n_ca2++;
      end
    end
    $display("operand pairs with carry ca1: %0d, with carry ca2: %0d", n_ca1, n_ca2);
    checks++;
    if (n_ca1 == 0 || n_ca2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
