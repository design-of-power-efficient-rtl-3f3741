// fa_cpl: full adder in complementary pass-transistor logic (CPL).
//
// CPL carries every signal in both polarities and steers them through NMOS
// pass-transistor pairs; each pair is a 2:1 multiplexer whose select is one
// input and its complement. Output inverters restore the degraded levels and
// give the final polarity.
//   Sum:  a first rank steered by b turns (a, a_n) into the dual-rail pair
//         x = a^b and xn = ~(a^b); a second rank steered by cin selects
//         between them, giving the two pre-inverter nodes ~sum and sum.
//   Carry: two networks steered by b and then cin pass a_n, a or a constant
//         and give the pre-inverter nodes ~cout and cout:
//         ~cout = cin ? (b ? 0 : a_n) : (b ? a_n : 1)
//          cout = cin ? (b ? 1 : a  ) : (b ? a   : 0)
// After the inverters the cell offers both rails of both outputs, as a CPL
// gate does. The dual-rail organisation follows the original circuit; the
// exact assignment of signals to each pass pair is this model's reading.
//
// Interface: a, b, cin in; sum, sum_n, cout, cout_n out.
// Timing: purely combinational.
module fa_cpl (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic sum_n,
  output logic cout,
  output logic cout_n
);

  logic a_n;
  logic c_n;
  logic x;          // a ^ b
  logic xn;         // ~(a ^ b)
  logic sum_node_n; // node that drives the sum inverter
  logic sum_node;   // node that drives the sum_n inverter
  logic cy_node_n;  // node that drives the cout inverter
  logic cy_node;    // node that drives the cout_n inverter

  always_comb begin
    a_n = ~a;
    c_n = ~cin;
  end

  // first rank, steered by b
  always_comb begin
    x  = b ? a_n : a;
    xn = b ? a   : a_n;
  end

  // second rank, steered by cin / c_n
  always_comb begin
    sum_node_n = c_n ? xn : x;
    sum_node   = c_n ? x  : xn;
  end

  // carry networks
  always_comb begin
    cy_node_n = cin ? (b ? 1'b0 : a_n) : (b ? a_n : 1'b1);
    cy_node   = cin ? (b ? 1'b1 : a)   : (b ? a   : 1'b0);
  end

  // output inverters
  always_comb begin
    sum    = ~sum_node_n;
    sum_n  = ~sum_node;
    cout   = ~cy_node_n;
    cout_n = ~cy_node;
  end

endmodule
