// gdi_gate: one GDI cell wired to compute one of six Boolean functions.
//
// The function is chosen at elaboration time by FUNC. Input a always drives
// the cell's gate G; b and c, or the constants 0 and 1, are tied to the
// PMOS terminal P and the NMOS terminal N as follows:
//
//   FUNC      N   P   G   y
//   GDI_OR    1   b   a   a + b
//   GDI_AND   b   0   a   a b
//   GDI_MUX   c   b   a   a'b + a c   (a selects c over b)
//   GDI_NOT   0   1   a   a'
//   GDI_F1    0   b   a   a'b
//   GDI_F2    b   1   a   a' + b
//
// These six wirings are the standard GDI function table. Inputs the chosen
// function does not use (c for all but GDI_MUX, b and c for GDI_NOT) are
// left unread; tie them to a constant where the gate is instantiated.
//
// Interface: a, b, c in; y out. Purely combinational: one cell, so one
// pass-transistor delay from any input to y.
module gdi_gate
  import gdi_pkg::*;
#(
  parameter gdi_func_e FUNC = GDI_AND
) (
  input  logic a,  // to G
  input  logic b,  // to P or N, depending on FUNC
  input  logic c,  // to N for GDI_MUX only
  output logic y
);

  logic p, n;

  always_comb begin
    unique case (FUNC)
      GDI_OR:  begin n = 1'b1; p = b;    end
      GDI_AND: begin n = b;    p = 1'b0; end
      GDI_MUX: begin n = c;    p = b;    end
      GDI_NOT: begin n = 1'b0; p = 1'b1; end
      GDI_F1:  begin n = 1'b0; p = b;    end
      GDI_F2:  begin n = b;    p = 1'b1; end
      default: begin n = 1'b0; p = 1'b0; end
    endcase
  end

  gdi_cell u_cell (
    .g(a),
    .p(p),
    .n(n),
    .y(y)
  );

endmodule
