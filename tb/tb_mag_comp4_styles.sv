// tb_mag_comp4_styles: runs the comparator in each of its five full-adder
// styles side by side (majority gate, mirror, complementary pass
// transistor, transmission gate, GDI) and checks every one of them on all
// 256 operand pairs against integer comparison. The styles differ only in
// circuit structure, so all five must produce identical flags.
module tb_mag_comp4_styles;
  import mc_pkg::*;

  localparam int NSTYLES = 5;

  logic [3:0] a;
  logic [3:0] b;
  logic [2:0] flags [NSTYLES];  // {gt, eq, lt} per style
  int         checks   = 0;
  int         failures = 0;

  mag_comp4 #(.FA_STYLE(FA_MGL)) u_mgl (.a(a), .b(b), .a_gt_b(flags[0][2]), .a_eq_b(flags[0][1]), .a_lt_b(flags[0][0]));
  mag_comp4 #(.FA_STYLE(FA_MAL)) u_mal (.a(a), .b(b), .a_gt_b(flags[1][2]), .a_eq_b(flags[1][1]), .a_lt_b(flags[1][0]));
  mag_comp4 #(.FA_STYLE(FA_CPL)) u_cpl (.a(a), .b(b), .a_gt_b(flags[2][2]), .a_eq_b(flags[2][1]), .a_lt_b(flags[2][0]));
  mag_comp4 #(.FA_STYLE(FA_TGL)) u_tgl (.a(a), .b(b), .a_gt_b(flags[3][2]), .a_eq_b(flags[3][1]), .a_lt_b(flags[3][0]));
  mag_comp4 #(.FA_STYLE(FA_GDI)) u_gdi (.a(a), .b(b), .a_gt_b(flags[4][2]), .a_eq_b(flags[4][1]), .a_lt_b(flags[4][0]));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] expected;
    for (int ia = 0; ia < 16; ia++) begin
      for (int ib = 0; ib < 16; ib++) begin
        a = 4'(ia);
        b = 4'(ib);
        #1;
        expected = {ia > ib, ia == ib, ia < ib};
        for (int s = 0; s < NSTYLES; s++) begin
          checks++;
          if (flags[s] !== expected) begin
            failures++;
            $display("FAIL style %s A=%0d B=%0d: flags %b expected %b",
                     fa_style_e'(s), ia, ib, flags[s], expected);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
