// mag_comp4: 4-bit unsigned magnitude comparator based on 2's-complement
// addition.
//
// Instead of comparing the operands bit by bit from the MSB down, the
// comparator computes B - A = B + ~A + 1 with a four-stage ripple-carry
// adder and reads the relation off the result:
//   - the carry out of the last stage is 1 exactly when B >= A, so its
//     inverse is the A>B flag;
//   - the four sum bits are all zero exactly when A = B, so their NOR is the
//     A=B flag;
//   - A<B is the NOR of the other two flags.
// Each A bit passes through an inverter into its adder stage, and the '+1'
// of the 2's complement is the first stage's carry in, tied to 1. Exactly
// one of the three outputs is high for every input pair.
//
// FA_STYLE selects the full-adder circuit style (mc_pkg::fa_style_e). The
// default, FA_GDI, is the design's main configuration: the ten-transistor
// GDI adder, GDI inverters, a GDI 4-input NOR and a GDI 2-input NOR, 62
// transistors in all. The other styles use the same comparator structure
// with static CMOS inverters and NOR gates, written here as plain operators.
// The architecture, the carry-in of 1 and the output gates follow the
// original design; the port names and the style parameter are this
// design's choices. Operands are unsigned; there is no clock or reset.
//
// Interface: a[3:0], b[3:0] in; a_gt_b, a_eq_b, a_lt_b out.
// Timing: purely combinational; the critical path is the carry ripple
// through four adders followed by the output inverter and 2-input NOR.
module mag_comp4
  import mc_pkg::*;
#(
  parameter fa_style_e FA_STYLE = FA_GDI
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic       a_gt_b,
  output logic       a_eq_b,
  output logic       a_lt_b
);

  localparam int unsigned W = 4;  // operand width; the output NOR is 4-input

  logic [W-1:0] a_n;    // complemented A
  logic [W-1:0] s;      // sum bits of B + ~A + 1
  logic [W:0]   c;      // carry chain, c[0] = carry in

  assign c[0] = 1'b1;          // the '+1' of the 2's complement of A

  for (genvar i = 0; i < W; i++) begin : g_stage
    if (FA_STYLE == FA_GDI) begin : g_inv_gdi
      gdi_inv u_inv (.a(a[i]), .y(a_n[i]));
    end else begin : g_inv_cmos
      assign a_n[i] = ~a[i];
    end

    full_adder #(.FA_STYLE(FA_STYLE)) u_fa (
      .a   (b[i]),
      .b   (a_n[i]),
      .cin (c[i]),
      .sum (s[i]),
      .cout(c[i+1])
    );
  end

  if (FA_STYLE == FA_GDI) begin : g_out_gdi
    gdi_inv  u_gt (.a(c[W]), .y(a_gt_b));
    gdi_nor4 u_eq (.a(s[3]), .b(s[2]), .c(s[1]), .d(s[0]), .y(a_eq_b));
    gdi_nor2 u_lt (.a(a_gt_b), .b(a_eq_b), .y(a_lt_b));
  end else begin : g_out_cmos
    assign a_gt_b = ~c[W];
    assign a_eq_b = ~|s;
    assign a_lt_b = ~(a_gt_b | a_eq_b);
  end

endmodule
