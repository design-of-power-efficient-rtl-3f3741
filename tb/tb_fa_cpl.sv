// tb_fa_cpl: self-checking testbench for the complementary pass-transistor
// full adder (fa_cpl).
//
// Applies all eight input combinations and compares both rails of both
// outputs with a + b + cin computed in the testbench: sum and cout must
// equal the arithmetic result, sum_n and cout_n must be their complements.
// Each vector is applied for 1 ns; a watchdog ends the run if it hangs.
module tb_fa_cpl;

  logic a;
  logic b;
  logic cin;
  logic sum;
  logic sum_n;
  logic cout;
  logic cout_n;
  int   checks   = 0;
  int   failures = 0;

  fa_cpl dut (.a(a), .b(b), .cin(cin), .sum(sum), .sum_n(sum_n),
              .cout(cout), .cout_n(cout_n));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] expected;
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      expected = 2'(a) + 2'(b) + 2'(cin);
      checks++;
      if ({cout, sum} !== expected) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b: got cout=%b sum=%b, expected %b",
                 a, b, cin, cout, sum, expected);
      end
      checks++;
      if ({cout_n, sum_n} !== ~expected) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b: got cout_n=%b sum_n=%b, expected %b",
                 a, b, cin, cout_n, sum_n, ~expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
