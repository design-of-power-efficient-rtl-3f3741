// tb_gdi_cell: self-checking testbench for the GDI cell.
//
// First checks all eight (g, p, n) combinations against the cell equation
// q = ~g&p | g&n. Then wires the cell in each of its standard configurations
// (OR, AND, MUX, XOR, NOT) and checks each against the plain Boolean
// function it should produce, for every value of its free inputs.
module tb_gdi_cell;

  logic g;
  logic p;
  logic n;
  logic q;
  int   checks   = 0;
  int   failures = 0;

  gdi_cell dut (.g(g), .p(p), .n(n), .q(q));

  task automatic check(input logic expected, input string what);
    #1;
    checks++;
    if (q !== expected) begin
      failures++;
      $display("FAIL %s: g=%b p=%b n=%b q=%b expected %b", what, g, p, n, q, expected);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic x;
    logic y;
    logic z;
    for (int v = 0; v < 8; v++) begin
      {g, p, n} = 3'(v);
      check((!g && p) || (g && n), "equation");
    end
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      g = x; p = y;    n = 1'b1; check(x | y, "OR");
      g = x; p = 1'b0; n = y;    check(x & y, "AND");
      g = x; p = y;    n = z;    check(x ? z : y, "MUX");
      g = x; p = y;    n = ~y;   check(x ^ y, "XOR");
      g = x; p = 1'b1; n = 1'b0; check(~x, "NOT");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
