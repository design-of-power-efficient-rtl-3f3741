// fa_mgl: full adder in majority-gate logic (static CMOS, 32 transistors).
//
// Three inverters (6 transistors) provide a_n, b_n, c_n. The carry is one
// complex static CMOS gate (10 transistors) driven by the complemented
// inputs: its pull-down network conducts when a majority of a_n, b_n, c_n is
// high, so its output is the majority of the true inputs,
//   cout = ~(a_n & b_n | c_n & (a_n | b_n)) = MAJ(a, b, cin).
// The sum is a second complex gate (16 transistors) whose pull-down network
// conducts on the even-parity minterms,
//   ~sum = a_n&b_n&c_n | a_n&b&cin | a&b_n&cin | a&b&c_n,
// so its output is the odd-parity sum. The partition into inverters, a
// majority gate and a sum gate follows the original circuit; the carry
// expression is written here from the majority relation.
//
// Interface: a, b, cin in; sum, cout out. Timing: purely combinational.
module fa_mgl (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic a_n;
  logic b_n;
  logic c_n;

  // input inverters
  always_comb begin
    a_n = ~a;
    b_n = ~b;
    c_n = ~cin;
  end

  // majority gate driven by complemented inputs
  always_comb cout = ~((a_n & b_n) | (c_n & (a_n | b_n)));

  // sum gate: pull-down on the even-parity minterms
  always_comb sum = ~((a_n & b_n & c_n) | (a_n & b & cin) |
                      (a & b_n & cin)   | (a & b & c_n));

endmodule
