// gdi_full_adder: one-bit full adder from GDI cells.
//
// The propagate signal t = a ^ b comes from a GDI XOR, and sum = t ^ cin
// from a second one. The carry is a single GDI multiplexer cell with G = t,
// P = a and N = cin: when a and b differ (t = 1) the carry-in is passed on,
// and when they are equal (t = 0) both equal the carry, so a is passed.
//
// The gate structure is this design's choice; the ripple carry adders of the
// multiplier are built from it.
//
// Interface: a, b, cin in; sum, cout out. Combinational; the carry path
// cin -> cout is one cell.
module gdi_full_adder
  import gdi_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic t;

  gdi_xor                    u_prop  (.a(a), .b(b),   .y(t));
  gdi_xor                    u_sum   (.a(t), .b(cin), .y(sum));
  gdi_gate #(.FUNC(GDI_MUX)) u_carry (.a(t), .b(a),   .c(cin), .y(cout));

endmodule
