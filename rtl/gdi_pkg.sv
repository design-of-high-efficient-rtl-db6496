// gdi_pkg: shared types for the Gate Diffusion Input (GDI) cell library.
//
// A GDI cell is one PMOS and one NMOS transistor with a common gate input G;
// the PMOS source/drain is driven from input P, the NMOS source/drain from
// input N, and the joined drains form the output. Which Boolean function the
// cell computes depends only on what is tied to P and N. gdi_func_e names the
// six wirings of the cell used by this library (OR, AND, MUX, NOT, F1 = A'B,
// F2 = A'+B); gdi_gate selects the wiring from this enum.
package gdi_pkg;

  typedef enum logic [2:0] {
    GDI_OR  = 3'd0,  // N=1, P=B, G=A : A + B
    GDI_AND = 3'd1,  // N=B, P=0, G=A : A B
    GDI_MUX = 3'd2,  // N=C, P=B, G=A : A'B + AC
    GDI_NOT = 3'd3,  // N=0, P=1, G=A : A'
    GDI_F1  = 3'd4,  // N=0, P=B, G=A : A'B
    GDI_F2  = 3'd5   // N=B, P=1, G=A : A' + B
  } gdi_func_e;

endpackage
