// tb_gdi_cell: exhaustive check of the GDI cell's logic function.
//
// All eight combinations of g, p, n are applied; the output must equal p
// while g is low (PMOS on) and n while g is high (NMOS on). The expected
// value is computed from that rule, independently of the cell's code.
// A watchdog ends the run with a failure if it has not finished in time.
module tb_gdi_cell;

  logic g, p, n, y;
  int   checks = 0, failures = 0;

  gdi_cell dut (.g(g), .p(p), .n(n), .y(y));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_y;
    for (int v = 0; v < 8; v++) begin
      {g, p, n} = 3'(v);
      #1;
      exp_y = (g & n) | (~g & p);
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL g=%b p=%b n=%b y=%b expected %b", g, p, n, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
