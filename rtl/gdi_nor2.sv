// gdi_nor2: two-input NOR gate in GDI logic (four transistors).
//
// The first GDI cell is wired as an OR gate (G=a, P=b, N=1), giving a|b; a
// GDI inverter then restores the level and produces ~(a|b). The comparator
// uses it to form A<B from the A>B and A=B flags. Structure as in the
// original circuit.
//
// Interface: a, b in; y = ~(a | b) out. Timing: purely combinational.
module gdi_nor2 (
  input  logic a,
  input  logic b,
  output logic y
);

  logic a_or_b;

  gdi_cell u_or  (.g(a), .p(b), .n(1'b1), .q(a_or_b));
  gdi_inv  u_inv (.a(a_or_b), .y(y));

endmodule
