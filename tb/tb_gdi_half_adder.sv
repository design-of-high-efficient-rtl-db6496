// tb_gdi_half_adder: exhaustive check of the GDI half adder.
//
// All four input pairs are applied; {carry, sum} must equal a + b.
module tb_gdi_half_adder;

  logic a, b, sum, carry;
  int   checks = 0, failures = 0;

  gdi_half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({carry, sum} !== 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%b b=%b carry=%b sum=%b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
