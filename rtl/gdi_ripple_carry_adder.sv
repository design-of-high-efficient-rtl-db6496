// gdi_ripple_carry_adder: WIDTH-bit unsigned ripple carry adder of GDI cells.
//
// {cout, sum} = a + b. Bit 0 is a half adder, since the adders of the Vedic
// multiplier take no carry in; every higher bit is a full adder whose carry
// in is the carry out of the bit below, so the carry ripples from bit 0 to
// cout through WIDTH cells.
//
// The multiplier uses this adder at WIDTH = 4 (three in each 4x4 multiplier)
// and WIDTH = 8 (three in the 8x8 multiplier); those widths and the
// ripple-carry structure follow the multiplier's block diagrams. The absence
// of a carry-in port, the half adder at bit 0 and the gates of the adder
// cells are this design's choices.
//
// Interface: a, b (WIDTH bits) in; sum (WIDTH bits), cout out. Combinational.
module gdi_ripple_carry_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:1] carry;  // carry[i] is the carry into bit i

  gdi_half_adder u_bit0 (
    .a(a[0]),
    .b(b[0]),
    .sum(sum[0]),
    .carry(carry[1])
  );

  for (genvar i = 1; i < WIDTH; i++) begin : g_bit
    gdi_full_adder u_fa (
      .a(a[i]),
      .b(b[i]),
      .cin(carry[i]),
      .sum(sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
