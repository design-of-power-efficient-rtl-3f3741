// fa_gdi: ten-transistor full adder in gate-diffusion-input (GDI) logic.
//
// Five GDI cells (see gdi_cell, Q = ~G&P | G&N), two transistors each:
//   1. inverter on a                         -> a_n
//   2. cell G=b, P=a, N=a_n                  -> x  = a ^ b
//   3. inverter on x                         -> xn = ~(a ^ b)
//   4. cell G=cin, P=x, N=xn                 -> sum  = cin ? ~(a^b) : a^b
//   5. cell G=xn, P=cin, N=b                 -> cout = (a==b) ? b : cin
// Cell 5 uses the fact that when a and b agree the carry equals either of
// them, and when they differ it equals the carry in. This wiring is the
// original ten-transistor circuit as read from its schematic; it was checked
// against the full-adder truth table (sum = a^b^cin, cout = majority).
// This is the adder of the comparator's default (GDI) configuration.
//
// Interface: a, b, cin in; sum, cout out. Timing: purely combinational.
module fa_gdi (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic a_n;
  logic x;
  logic xn;

  gdi_inv  u_inv_a (.a(a), .y(a_n));
  gdi_cell u_xor   (.g(b),   .p(a),   .n(a_n), .q(x));
  gdi_inv  u_inv_x (.a(x), .y(xn));
  gdi_cell u_sum   (.g(cin), .p(x),   .n(xn),  .q(sum));
  gdi_cell u_cout  (.g(xn),  .p(cin), .n(b),   .q(cout));

endmodule
