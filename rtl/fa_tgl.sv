// fa_tgl: full adder in transmission-gate logic (20 transistors).
//
// A transmission gate is an NMOS and a PMOS in parallel with complementary
// gate signals: a switch that passes both levels fully. The adder is built
// as multiplexers of such switches:
//   - inverters give a_n and c_n (4 transistors);
//   - a b-steered stage of transistors and transmission gates forms
//     x = a ^ b and xn = ~(a ^ b) (8 transistors);
//   - two transmission gates selected by x / xn pass c_n or cin to sum:
//     sum  = x ? c_n : cin (4 transistors);
//   - two transmission gates selected by x / xn pass cin or a to cout:
//     cout = x ? cin : a   (4 transistors).
// When a and b differ the carry out is the carry in; when they agree it is
// a (= b). The division into these stages follows the original circuit;
// the choice of a rather than b as the carry source when a == b is this
// model's.
//
// Interface: a, b, cin in; sum, cout out. Timing: purely combinational.
module fa_tgl (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic a_n;
  logic c_n;
  logic x;
  logic xn;

  always_comb begin
    a_n = ~a;
    c_n = ~cin;
  end

  // XOR / XNOR stage steered by b
  always_comb begin
    x  = b ? a_n : a;
    xn = b ? a   : a_n;
  end

  // transmission-gate multiplexers, each gate pair driven by x and xn
  always_comb begin
    sum  = (x & ~xn) ? c_n : cin;
    cout = (x & ~xn) ? cin : a;
  end

endmodule
