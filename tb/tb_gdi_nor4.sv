// tb_gdi_nor4: self-checking testbench for the 4-input GDI NOR gate.
// Applies all sixteen input combinations and checks y, which must be 1 only
// when all four inputs are 0.
module tb_gdi_nor4;

  logic a;
  logic b;
  logic c;
  logic d;
  logic y;
  int   checks   = 0;
  int   failures = 0;

  gdi_nor4 dut (.a(a), .b(b), .c(c), .d(d), .y(y));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      checks++;
      if (y !== (v == 0)) begin
        failures++;
        $display("FAIL abcd=%b y=%b", 4'(v), y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
