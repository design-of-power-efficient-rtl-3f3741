// tb_gdi_inv: self-checking testbench for the GDI inverter.
// Checks y = ~a for both input values, several times in alternation.
module tb_gdi_inv;

  logic a;
  logic y;
  int   checks   = 0;
  int   failures = 0;

  gdi_inv dut (.a(a), .y(y));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 6; v++) begin
      a = v[0];
      #1;
      checks++;
      if (y !== !a) begin
        failures++;
        $display("FAIL a=%b y=%b", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
