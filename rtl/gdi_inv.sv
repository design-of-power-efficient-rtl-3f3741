// gdi_inv: inverter built from one GDI cell.
//
// The GDI cell with P tied to 1 and N tied to 0 is exactly a static CMOS
// inverter (two transistors). The comparator uses it to complement the A
// operand bits, to turn the final carry into the A>B flag, and as the output
// stage of the GDI NOR gates.
//
// Interface: a in, y = ~a out. Timing: purely combinational.
module gdi_inv (
  input  logic a,
  output logic y
);

  gdi_cell u_cell (.g(a), .p(1'b1), .n(1'b0), .q(y));

endmodule
