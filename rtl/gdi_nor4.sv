// gdi_nor4: four-input NOR gate in GDI logic (eight transistors).
//
// Two GDI cells wired as OR gates form a|b and c|d, a third OR cell joins the
// two partial results into a|b|c|d, and a GDI inverter produces the NOR. The
// comparator uses it on the four sum bits to detect A=B. The tree follows
// the original circuit; which partial OR drives the gate of the joining cell
// (here c|d) is a choice of this model and does not change the function.
//
// Interface: a, b, c, d in; y = ~(a | b | c | d) out. Timing: combinational.
module gdi_nor4 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic y
);

  logic a_or_b;
  logic c_or_d;
  logic any;

  gdi_cell u_or_ab  (.g(a),      .p(b),      .n(1'b1), .q(a_or_b));
  gdi_cell u_or_cd  (.g(c),      .p(d),      .n(1'b1), .q(c_or_d));
  gdi_cell u_or_all (.g(c_or_d), .p(a_or_b), .n(1'b1), .q(any));
  gdi_inv  u_inv    (.a(any), .y(y));

endmodule
