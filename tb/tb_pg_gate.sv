// tb_pg_gate - exhaustive self-checking test of the Peres gate.
//
// For all 8 inputs: P = A, Q = A.B xor C and R = A xor B, written out as
// truth-table constants here; the 8 output codes must all differ
// (reversibility); and with C = 0 the pair {Q, R} must equal the half-adder
// result A + B.
module tb_pg_gate;
  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  logic [7:0] seen;

  // indexed by {a,b,c}
  localparam logic [7:0] Q_TABLE = 8'b0110_1010;  // bit v = (a&b)^c
  localparam logic [7:0] R_TABLE = 8'b0011_1100;  // bit v = a^b

  pg_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
      check(q == Q_TABLE[v], "Q truth table");
      check(r == R_TABLE[v], "R truth table");
      if (!c) check(2'({q, r}) == 2'(a) + 2'(b), "half adder");
      seen[{p, q, r}] = 1'b1;
    end
    check(seen == 8'hFF, "bijection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
