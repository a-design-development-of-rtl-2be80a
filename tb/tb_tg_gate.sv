// tb_tg_gate - exhaustive self-checking test of the Toffoli gate.
//
// Applies all 8 input combinations and checks each output against a
// truth table written out here, that the 8 output codes are all different
// (the gate is reversible), and that a second Toffoli gate fed with the
// outputs gives the inputs back (the gate is its own inverse).
module tb_tg_gate;
  logic a, b, c, p, q, r, a2, b2, c2;
  int   checks = 0, failures = 0;
  logic [7:0] seen;

  // R column of the Toffoli truth table, indexed by {a,b,c}
  localparam logic [7:0] R_TABLE = 8'b0110_1010;  // bit v = (a&b)^c for {a,b,c} = v

  tg_gate dut  (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  tg_gate back (.a(p), .b(q), .c(r), .p(a2), .q(b2), .r(c2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (a=%0b b=%0b c=%0b -> p=%0b q=%0b r=%0b)", what, a, b, c, p, q, r);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check(p == a, "P = A");
      check(q == b, "Q = B");
      check(r == R_TABLE[v], "R truth table");
      check({a2, b2, c2} == 3'(v), "self-inverse");
      seen[{p, q, r}] = 1'b1;
    end
    check(seen == 8'hFF, "bijection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
