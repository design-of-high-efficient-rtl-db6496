// vedic_mul_2x2: 2x2-bit unsigned Vedic (Urdhva Tiryakbhyam) multiplier.
//
// "Vertically and crosswise" for two bits: the vertical products a0b0 and
// a1b1 and the crosswise products a1b0 and a0b1 are formed at once by four
// GDI AND cells.
//   s0 = a0b0
//   s1 = sum of the half adder on the crosswise pair a0b1, a1b0
//   s2 = sum of a second half adder on a1b1 and the first half adder's carry
//   s3 = carry of the second half adder
// The structure (four partial products, two half adders, output order
// c2 s2 s1 s0) is the one of the 2x2 Vedic multiplier; the AND partial
// products being single GDI cells is this design's choice.
//
// Interface: a = a1a0, b = b1b0 in; s = {c2, s2, s1, s0} out, a * b.
// Combinational: the longest path is AND, half-adder carry, half-adder sum.
module vedic_mul_2x2
  import gdi_pkg::*;
(
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] s
);

  logic a0b0, a1b0, a0b1, a1b1;
  logic c1;  // carry of the first half adder

  gdi_gate #(.FUNC(GDI_AND)) u_pp00 (.a(a[0]), .b(b[0]), .c(1'b0), .y(a0b0));
  gdi_gate #(.FUNC(GDI_AND)) u_pp10 (.a(a[1]), .b(b[0]), .c(1'b0), .y(a1b0));
  gdi_gate #(.FUNC(GDI_AND)) u_pp01 (.a(a[0]), .b(b[1]), .c(1'b0), .y(a0b1));
  gdi_gate #(.FUNC(GDI_AND)) u_pp11 (.a(a[1]), .b(b[1]), .c(1'b0), .y(a1b1));

  assign s[0] = a0b0;

  gdi_half_adder u_ha1 (.a(a0b1), .b(a1b0), .sum(s[1]), .carry(c1));
  gdi_half_adder u_ha2 (.a(a1b1), .b(c1),   .sum(s[2]), .carry(s[3]));

endmodule
