// tb_fa_gdi: self-checking testbench for the ten-transistor GDI full adder (fa_gdi).
//
// Applies all eight input combinations and compares sum and cout with the
// arithmetic result of a + b + cin computed in the testbench. Each input
// vector is applied for 1 ns; a watchdog ends the run if it hangs.
module tb_fa_gdi;

  logic a;
  logic b;
  logic cin;
  logic sum;
  logic cout;
  int   checks   = 0;
  int   failures = 0;

  fa_gdi dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

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
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
