// tb_mag_comp4: end-to-end testbench for the 4-bit magnitude comparator in
// its default (GDI) configuration.
//
// Applies all 256 pairs (A, B) of 4-bit operands, each for 1 ns, and checks
// the three flags against the relation of the two operands computed with
// integer comparison in the testbench. It also checks that exactly one flag
// is high for every pair. The comparator decides through three mechanisms of
// its subtract-and-inspect scheme: a carry out of B + ~A + 1 (A <= B), an
// all-zero difference (A = B) and a missing carry (A > B). The testbench
// counts how often each relation was produced and counts a failure for any
// that never occurred. The comparator is instantiated with no parameter
// override, so this is also the run at the design's full size.
module tb_mag_comp4;

  logic [3:0] a;
  logic [3:0] b;
  logic       a_gt_b;
  logic       a_eq_b;
  logic       a_lt_b;
  int         checks   = 0;
  int         failures = 0;
  int         n_gt     = 0;  // no carry, nonzero difference
  int         n_eq     = 0;  // all-zero difference
  int         n_lt     = 0;  // carry with nonzero difference

  mag_comp4 dut (.a(a), .b(b), .a_gt_b(a_gt_b), .a_eq_b(a_eq_b), .a_lt_b(a_lt_b));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 16; ia++) begin
      for (int ib = 0; ib < 16; ib++) begin
        a = 4'(ia);
        b = 4'(ib);
        #1;
        checks++;
        if ({a_gt_b, a_eq_b, a_lt_b} !== {ia > ib, ia == ib, ia < ib}) begin
          failures++;
          $display("FAIL A=%0d B=%0d: gt=%b eq=%b lt=%b", ia, ib, a_gt_b, a_eq_b, a_lt_b);
        end
        checks++;
        if (!$onehot({a_gt_b, a_eq_b, a_lt_b})) begin
          failures++;
          $display("FAIL A=%0d B=%0d: flags not one-hot", ia, ib);
        end
        n_gt += int'(a_gt_b);
        n_eq += int'(a_eq_b);
        n_lt += int'(a_lt_b);
      end
    end
    $display("relations seen: A>B %0d, A=B %0d, A<B %0d", n_gt, n_eq, n_lt);
    checks++;
    if (n_gt == 0 || n_eq == 0 || n_lt == 0) begin
      failures++;
      $display("FAIL a relation never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
