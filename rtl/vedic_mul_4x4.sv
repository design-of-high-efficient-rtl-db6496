// vedic_mul_4x4: 4x4-bit unsigned Vedic multiplier from four 2x2 multipliers.
//
// Operands are split into bit pairs, A = AH:AL and B = BH:BL. Four 2x2
// Vedic multipliers form the vertical and crosswise products at once:
//   q0 = AL*BL, q1 = AL*BH, q2 = AH*BL, q3 = AH*BH   (4 bits each)
// so that A*B = q0 + (q1 + q2)*4 + q3*16. Three 4-bit ripple carry adders
// combine them:
//   RCA1: q1 + q2                        -> sum1, carry ca1
//   RCA2: sum1 + {00, q0[3:2]}            -> sum2, carry ca2
//   RCA3: q3 + {0, ca1|ca2, sum2[3:2]}    -> s[7:4], carry ca3
//   s[3:2] = sum2[1:0], s[1:0] = q0[1:0]
// Both ca1 and ca2 have weight 64 and feed the same input of RCA3. They are
// never both 1 (if q1 + q2 >= 16 then sum1 <= 2 and sum2 <= 5), so one GDI
// OR cell merges them without loss. ca3 is always 0 because the product
// fits in 8 bits; it is left unread on purpose.
//
// The four 2x2 multipliers, the three 4-bit ripple carry adders and their
// operands follow the 4x4 block diagram. The OR cell that merges ca2 into
// ca1's input of RCA3, and the bit positions of the inputs to RCA3, follow
// from the weights of the signals and are this design's reading.
//
// Interface: a = a3..a0, b = b3..b0 in; s = S7..S0 = a * b out.
// Combinational.
module vedic_mul_4x4
  import gdi_pkg::*;
(
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] s
);

  logic [3:0] q0, q1, q2, q3;
  logic [3:0] sum1, sum2;
  logic       ca1, ca2, ca3, ca12;

  vedic_mul_2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .s(q0));
  vedic_mul_2x2 u_m1 (.a(a[1:0]), .b(b[3:2]), .s(q1));
  vedic_mul_2x2 u_m2 (.a(a[3:2]), .b(b[1:0]), .s(q2));
  vedic_mul_2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .s(q3));

  gdi_ripple_carry_adder #(.WIDTH(4)) u_rca1 (
    .a(q1), .b(q2), .sum(sum1), .cout(ca1)
  );

  gdi_ripple_carry_adder #(.WIDTH(4)) u_rca2 (
    .a(sum1), .b({2'b00, q0[3:2]}), .sum(sum2), .cout(ca2)
  );

  gdi_gate #(.FUNC(GDI_OR)) u_carry_merge (.a(ca1), .b(ca2), .c(1'b0), .y(ca12));

  gdi_ripple_carry_adder #(.WIDTH(4)) u_rca3 (
    .a(q3), .b({1'b0, ca12, sum2[3:2]}), .sum(s[7:4]), .cout(ca3)
  );

  assign s[3:2] = sum2[1:0];
  assign s[1:0] = q0[1:0];

endmodule
