// gdi_cell: logic model of the basic Gate Diffusion Input (GDI) cell.
//
// The cell is a CMOS inverter whose PMOS source is not tied to the supply
// but brought out as input P, and whose NMOS source is brought out as input
// N. The common gate is input G. When G is low the PMOS conducts and the
// output follows P; when G is high the NMOS conducts and the output follows
// N. Its logic function is therefore a 2:1 multiplexer, y = G ? N : P, and
// every gate of this library is one or more of these cells with P and N tied
// to signals or to the rails.
//
// Interface: g, p, n in; y out. Purely combinational, no timing of its own.
//
// The transistor structure and terminal names are those of the GDI cell.
// This model is two-valued: the reduced output swing of a pass transistor
// passing the "weak" level (PMOS passing 0, NMOS passing 1) is an electrical
// effect that is not represented here.
module gdi_cell (
  input  logic g,  // common gate of the PMOS and the NMOS
  input  logic p,  // source/drain terminal of the PMOS
  input  logic n,  // source/drain terminal of the NMOS
  output logic y   // common drain
);

  always_comb begin
    if (g) y = n;  // NMOS on, PMOS off
    else   y = p;  // PMOS on, NMOS off
  end

endmodule
