// fa_mal: mirror full adder (28 transistors).
//
// The first stage is an inverting carry gate whose pull-up and pull-down
// networks are mirror images of each other rather than duals:
//   cout_n = ~(a & b | cin & (a | b)).
// The second stage reuses that inverted carry to build the inverted sum,
//   sum_n = ~(a & b & cin | (a | b | cin) & cout_n),
// which holds because the sum is 1 exactly when all three inputs are 1, or
// when at least one is 1 and the carry is 0. Two output inverters restore
// sum and cout. Structure and the sum factorisation follow the original
// circuit.
//
// Interface: a, b, cin in; sum, cout out. Timing: purely combinational; the
// sum depends on the internal carry node, so it settles after the carry.
module fa_mal (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic cout_n;
  logic sum_n;

  always_comb cout_n = ~((a & b) | (cin & (a | b)));
  always_comb sum_n  = ~((a & b & cin) | ((a | b | cin) & cout_n));

  // output inverters
  always_comb begin
    cout = ~cout_n;
    sum  = ~sum_n;
  end

endmodule
