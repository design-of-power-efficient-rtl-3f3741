// gdi_cell: basic gate-diffusion-input (GDI) cell.
//
// Electrically the cell is one PMOS and one NMOS transistor sharing the gate
// input G, like a CMOS inverter, but the PMOS source is a signal input P and
// the NMOS source is a signal input N instead of the supply rails. When G is
// low the PMOS conducts and Q follows P; when G is high the NMOS conducts and
// Q follows N, so the cell is a 2:1 multiplexer:  Q = ~G & P | G & N.
// Tying P and N to constants or to other signals gives OR, AND, MUX, XOR and
// NOT with only two transistors:
//   OR : G=A P=B N=1      AND: G=A P=0 N=B      MUX: G=A P=B N=C
//   XOR: G=A P=B N=~B     NOT: G=A P=1 N=0
// The equation and these configurations are those of the original cell. The
// model is purely logical: the threshold-voltage loss of a real GDI cell when
// it passes a weak level is not represented.
//
// Interface: g, p, n in; q out. Timing: purely combinational.
module gdi_cell (
  input  logic g,  // common gate
  input  logic p,  // PMOS diffusion input, passed when g = 0
  input  logic n,  // NMOS diffusion input, passed when g = 1
  output logic q
);

  always_comb q = g ? n : p;

endmodule
