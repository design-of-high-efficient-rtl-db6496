// gdi_half_adder: one-bit half adder from GDI cells.
//
// sum = a ^ b from a two-cell GDI XOR; carry = a b from a single GDI AND
// cell (N = b, P = 0, G = a). The 2x2 Vedic multiplier uses two of these.
//
// Which gates make up the half adder is this design's choice; only the
// half adder itself, and its use, come from the multiplier's structure.
//
// Interface: a, b in; sum, carry out. Combinational.
module gdi_half_adder
  import gdi_pkg::*;
(
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  gdi_xor                    u_sum   (.a(a), .b(b), .y(sum));
  gdi_gate #(.FUNC(GDI_AND)) u_carry (.a(a), .b(b), .c(1'b0), .y(carry));

endmodule
