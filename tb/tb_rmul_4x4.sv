// tb_rmul_4x4 - exhaustive self-checking test of the 4 x 4 reversible
// multiplier.
//
// All 256 operand pairs: the product must equal x * y, and the garbage
// port must be 28 bits whose grid part repeats the operands. Also checks
// the published cost figures of this multiplier from the shared count
// formulas: 28 gates, 28 garbage outputs, 28 constant inputs.
module tb_rmul_4x4;
  logic [3:0]  x, y;
  logic [7:0]  prod;
  logic [27:0] garbage;
  int checks = 0, failures = 0;

  rmul_4x4 dut (.x(x), .y(y), .prod(prod), .garbage(garbage));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d y=%0d prod=%0d", what, x, y, prod);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check($bits(garbage) == 28, "28 garbage outputs");
    check(rmul_pkg::total_gates(4) == 28, "28 gates");
    check(rmul_pkg::total_garbage(4) == 28, "28 garbage by formula");
    check(rmul_pkg::total_constants(4) == 28, "28 constant inputs");
    for (int v = 0; v < 256; v++) begin
      {x, y} = 8'(v);
      #1;
      check(prod == 8'(int'(x) * int'(y)), "product");
      check(garbage[7:0] == {y, x}, "grid garbage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
