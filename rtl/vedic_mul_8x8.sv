// vedic_mul_8x8: 8x8-bit unsigned Vedic multiplier, the top of the design.
//
// The Urdhva Tiryakbhyam ("vertically and crosswise") method applied to
// nibbles. With A = AH:AL and B = BH:BL, four 4x4 Vedic multipliers form
// all four nibble products in parallel:
//   q0 = AL*BL, q1 = AL*BH, q2 = AH*BL, q3 = AH*BH   (8 bits each)
// and A*B = q0 + (q1 + q2)*16 + q3*256. Three 8-bit ripple carry adders
// sum them:
//   RCA1: q1 + q2                          -> sum1, carry ca1
//   RCA2: sum1 + {0000, q0[7:4]}            -> sum2, carry ca2
//   RCA3: q3 + {000, ca1|ca2, sum2[7:4]}    -> s[15:8], carry ca3
//   s[7:4] = sum2[3:0], s[3:0] = q0[3:0]
// ca1 and ca2 both weigh 4096 and are never 1 together (if q1 + q2 >= 256
// then sum1 <= 194 and sum2 <= 208), so one GDI OR cell merges them. ca3 is
// always 0 since the product fits in 16 bits; it is left unread on purpose.
// Every 4x4 multiplier is in turn four 2x2 multipliers and three 4-bit
// adders, so the whole multiplier is 64 GDI AND partial-product cells, 32
// half adders and a tree of ripple carry adders, all of GDI cells.
//
// The four 4x4 multipliers, the three 8-bit ripple carry adders and their
// operands follow the 8x8 block diagram; the OR merge of the two carries and
// the bit position of that merged carry are this design's reading of it.
//
// Interface: a = a7..a0, b = b7..b0 in; s = S15..S0 = a * b out, unsigned.
// Combinational, no clock: a new product follows every operand change after
// the settling time of the deepest path (2x2 multiplier, then three
// ripple-carry adders in series).
module vedic_mul_8x8
  import gdi_pkg::*;
(
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] s
);

  logic [7:0] q0, q1, q2, q3;
  logic [7:0] sum1, sum2;
  logic       ca1, ca2, ca3, ca12;

  vedic_mul_4x4 u_m0 (.a(a[3:0]), .b(b[3:0]), .s(q0));
  vedic_mul_4x4 u_m1 (.a(a[3:0]), .b(b[7:4]), .s(q1));
  vedic_mul_4x4 u_m2 (.a(a[7:4]), .b(b[3:0]), .s(q2));
  vedic_mul_4x4 u_m3 (.a(a[7:4]), .b(b[7:4]), .s(q3));

  gdi_ripple_carry_adder #(.WIDTH(8)) u_rca1 (
    .a(q1), .b(q2), .sum(sum1), .cout(ca1)
  );

  gdi_ripple_carry_adder #(.WIDTH(8)) u_rca2 (
    .a(sum1), .b({4'b0000, q0[7:4]}), .sum(sum2), .cout(ca2)
  );

  gdi_gate #(.FUNC(GDI_OR)) u_carry_merge (.a(ca1), .b(ca2), .c(1'b0), .y(ca12));

  gdi_ripple_carry_adder #(.WIDTH(8)) u_rca3 (
    .a(q3), .b({3'b000, ca12, sum2[7:4]}), .sum(s[15:8]), .cout(ca3)
  );

  assign s[7:4] = sum2[3:0];
  assign s[3:0] = q0[3:0];

endmodule
