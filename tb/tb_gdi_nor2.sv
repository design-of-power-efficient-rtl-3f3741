// tb_gdi_nor2: self-checking testbench for the 2-input GDI NOR gate.
// Applies all four input combinations and checks y against ~(a | b).
module tb_gdi_nor2;

  logic a;
  logic b;
  logic y;
  int   checks   = 0;
  int   failures = 0;

  gdi_nor2 dut (.a(a), .b(b), .y(y));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (y !== (v == 0)) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
