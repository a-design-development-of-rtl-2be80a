// tb_rev_multiplier_top - end-to-end test of the whole design at its
// default parameters (4 x 4 and 8 x 8 multipliers).
//
// Runs every operand pair through both multipliers at the same time (the
// 4 x 4 pair repeats every 256 steps) and checks each product against
// x * y and the grid part of each garbage port against the operands. It
// also counts how often the behaviours that matter in the adder networks
// occurred and fails if one never did: a carry out into the top product
// bit, a carry rippling through a whole adder chain (product of two
// all-ones operands), and a zero operand.
module tb_rev_multiplier_top;
  localparam int unsigned N = rmul_pkg::DEFAULT_N;

  logic [3:0]     x4, y4;
  logic [7:0]     prod4;
  logic [27:0]    garbage4;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] prod;
  logic [rmul_pkg::total_garbage(N)-1:0] garbage;
  int checks = 0, failures = 0;
  int top_carry4 = 0, top_carry = 0, full_ripple = 0, zero_operand = 0;

  rev_multiplier_top dut (
    .x4(x4), .y4(y4), .prod4(prod4), .garbage4(garbage4),
    .x(x), .y(y), .prod(prod), .garbage(garbage)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%h y=%h prod=%h x4=%h y4=%h prod4=%h",
                                  what, x, y, prod, x4, y4, prod4);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      {x, y}   = (2 * N)'(v);
      {x4, y4} = 8'(v);
      #1;
      check(32'(prod) == 32'(x) * 32'(y), "N x N product");
      check(garbage[2*N-1:0] == {y, x}, "N x N grid garbage");
      check(prod4 == 8'(int'(x4) * int'(y4)), "4 x 4 product");
      check(garbage4[7:0] == {y4, x4}, "4 x 4 grid garbage");
      if (prod[2*N-1]) top_carry++;
      if (prod4[7]) top_carry4++;
      if (x == '1 && y == '1) full_ripple++;
      if (x == '0 || y == '0) zero_operand++;
    end
    $display("top-bit carry (N x N): %0d, top-bit carry (4 x 4): %0d, full ripple: %0d, zero operand: %0d",
             top_carry, top_carry4, full_ripple, zero_operand);
    check(top_carry > 0, "top-bit carry N x N happened");
    check(top_carry4 > 0, "top-bit carry 4 x 4 happened");
    check(full_ripple > 0, "full ripple happened");
    check(zero_operand > 0, "zero operand happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
