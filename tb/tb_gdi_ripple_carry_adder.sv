// tb_gdi_ripple_carry_adder: exhaustive check of the ripple carry adder at
// both widths the multiplier uses, 4 and 8 bits.
//
// Every operand pair is applied to both adders (the 4-bit one sees the low
// nibbles); {cout, sum} must equal the integer sum. The run also counts
// the pair 1 + (2^WIDTH - 1), whose carry is generated at bit 0 and ripples
// through every bit to cout, and fails if it was never applied.
module tb_gdi_ripple_carry_adder;

  logic [3:0] a4, b4, s4;
  logic       c4;
  logic [7:0] a8, b8, s8;
  logic       c8;
  int         checks = 0, failures = 0;
  int         full_ripple4 = 0, full_ripple8 = 0;

  gdi_ripple_carry_adder #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .sum(s4), .cout(c4));
  gdi_ripple_carry_adder #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .sum(s8), .cout(c8));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x);
        b8 = 8'(y);
        a4 = 4'(x);
        b4 = 4'(y);
        #1;
        checks++;
        if ({c8, s8} !== 9'(x + y)) begin
          failures++;
          if (failures < 10) $display("FAIL w8 %0d + %0d = %0d", x, y, {c8, s8});
        end
        if (x == 1 && y == 255) full_ripple8++;
        if (x < 16 && y < 16) begin
          checks++;
          if ({c4, s4} !== 5'(x + y)) begin
            failures++;
            if (failures < 10) $display("FAIL w4 %0d + %0d = %0d", x, y, {c4, s4});
          end
          if (x == 1 && y == 15) full_ripple4++;
        end
      end
    end
    if (full_ripple4 == 0 || full_ripple8 == 0) failures++;
    $display("full-length carry ripple applied: 4-bit %0d, 8-bit %0d", full_ripple4, full_ripple8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
