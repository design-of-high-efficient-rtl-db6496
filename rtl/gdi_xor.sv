// gdi_xor: two-input exclusive OR from two GDI cells.
//
// The first cell is a GDI inverter giving b'. The second is a GDI
// multiplexer with G = a, P = b and N = b', so that it passes b when a is 0
// and b' when a is 1: y = a'b + a b' = a ^ b.
//
// The GDI function table has no XOR entry; this two-cell construction is a
// choice of this design, used by the half adder and the full adder.
//
// Interface: a, b in; y out. Combinational, two cells deep from b, one from a.
module gdi_xor
  import gdi_pkg::*;
(
  input  logic a,
  input  logic b,
  output logic y
);

  logic b_n;

  gdi_gate #(.FUNC(GDI_NOT)) u_inv (.a(b), .b(1'b0), .c(1'b0), .y(b_n));
  gdi_gate #(.FUNC(GDI_MUX)) u_mux (.a(a), .b(b),    .c(b_n),  .y(y));

endmodule
