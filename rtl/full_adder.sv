// full_adder: one full-adder stage of the comparator, in a selectable style.
//
// FA_STYLE picks which circuit style is instantiated (see mc_pkg). All five
// compute sum = a ^ b ^ cin and cout = MAJ(a, b, cin); they differ only in
// internal structure. Selecting the style with a parameter lets the same
// comparator netlist be built five ways, as the design was evaluated. The
// complementary outputs of the pass-transistor style are not needed by the
// comparator and are left open.
//
// Interface: a, b, cin in; sum, cout out. Timing: purely combinational.
module full_adder
  import mc_pkg::*;
#(
  parameter fa_style_e FA_STYLE = FA_GDI
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  generate
    case (FA_STYLE)
      FA_MGL: begin : g_mgl
        fa_mgl u_fa (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
      end
      FA_MAL: begin : g_mal
        fa_mal u_fa (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
      end
      FA_CPL: begin : g_cpl
        logic sum_n_unused;
        logic cout_n_unused;
        fa_cpl u_fa (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout),
                     .sum_n(sum_n_unused), .cout_n(cout_n_unused));
      end
      FA_TGL: begin : g_tgl
        fa_tgl u_fa (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
      end
      default: begin : g_gdi
        fa_gdi u_fa (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
      end
    endcase
  endgenerate

endmodule
