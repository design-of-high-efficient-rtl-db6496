// tb_vedic_mul_8x8: end-to-end test of the 8x8 Vedic multiplier at its
// default (and only) size.
//
// All 65,536 operand pairs are applied; the 16-bit result must equal the
// integer product. Alongside, the testbench works out from the operands
// alone which carries of the adder tree each pair sets, and counts them:
//   top ca1     carry out of the first 8-bit adder (q1 + q2 >= 256)
//   top ca2     carry out of the second 8-bit adder, the case in which it
//               joins ca1 on the same input of the last adder
//   sub ca1/ca2 the same two carries inside any of the four 4x4 multipliers
//   2x2 carry   a 2x2 multiplier producing its fourth bit (3 * 3)
// A mechanism that was never exercised counts as a failure. A short
// directed set with values computed by hand runs first.
module tb_vedic_mul_8x8;

  logic [7:0]  a, b;
  logic [15:0] s;
  int          checks = 0, failures = 0;
  int          n_top_ca1 = 0, n_top_ca2 = 0;
  int          n_sub_ca1 = 0, n_sub_ca2 = 0, n_2x2_carry = 0;

  vedic_mul_8x8 dut (.a(a), .b(b), .s(s));

  // Carries of the three-adder combination for operands split into halves
  // of H bits: ca1 = carry of lo*hi + hi*lo, ca2 = carry of adding the
  // upper half of lo*lo to that sum.
  function automatic void tree_carries(input int x, input int y, input int h,
                                       output bit ca1, output bit ca2);
    int m, xl, xh, yl, yh, sum1;
    m    = 1 << h;
    xl   = x % m;
    xh   = x / m;
    yl   = y % m;
    yh   = y / m;
    sum1 = xl * yh + xh * yl;
    ca1  = sum1 >= m * m;
    ca2  = (sum1 % (m * m)) + (xl * yl) / m >= m * m;
  endfunction

  task automatic apply(input int x, input int y, input int expected);
    a = 8'(x);
    b = 8'(y);
    #1;
    checks++;
    if (s !== 16'(expected)) begin
      failures++;
      if (failures < 20) $display("FAIL %0d * %0d = %0d, expected %0d", x, y, s, expected);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit c1, c2;

    // Directed values, products written out by hand.
    apply(0, 0, 0);
    apply(255, 255, 65025);
    apply(255, 1, 255);
    apply(16, 16, 256);
    apply(11, 15, 165);     // needs the second-adder carry of a 4x4 multiplier
    apply(240, 15, 3600);
    apply(170, 85, 14450);
    apply(200, 123, 24600);

    // Exhaustive sweep against the integer product.
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        apply(x, y, x * y);
        tree_carries(x, y, 4, c1, c2);
        n_top_ca1 += int'(c1);
        n_top_ca2 += int'(c2);
        for (int i = 0; i < 2; i++) begin
          for (int j = 0; j < 2; j++) begin
            tree_carries((x >> (4 * i)) % 16, (y >> (4 * j)) % 16, 2, c1, c2);
            n_sub_ca1 += int'(c1);
            n_sub_ca2 += int'(c2);
          end
        end
        if ((x % 4) == 3 && (y % 4) == 3) n_2x2_carry++;
      end
    end

    $display("top ca1 %0d, top ca2 %0d, 4x4 ca1 %0d, 4x4 ca2 %0d, 2x2 carry %0d",
             n_top_ca1, n_top_ca2, n_sub_ca1, n_sub_ca2, n_2x2_carry);
    checks++;
    if (n_top_ca1 == 0 || n_top_ca2 == 0 || n_sub_ca1 == 0 || n_sub_ca2 == 0 || n_2x2_carry == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
