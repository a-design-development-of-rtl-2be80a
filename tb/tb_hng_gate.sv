// tb_hng_gate - exhaustive self-checking test of the HNG gate.
//
// For all 16 inputs: P = A, Q = B, and R, S against truth-table constants
// written out here; the 16 output codes must all differ (reversibility);
// and with D = 0 the pair {S, R} must equal the full-adder result A + B + C.
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int   checks = 0, failures = 0;
  logic [15:0] seen;

  // bit v of each table is the output for {a,b,c,d} = v
  localparam logic [15:0] R_TABLE = 16'b1100_0011_0011_1100;  // a^b^c
  localparam logic [15:0] S_TABLE = 16'b0101_0110_0110_1010;  // ((a^b)&c)^(a&b)^d

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (abcd=%0b%0b%0b%0b -> pqrs=%0b%0b%0b%0b)", what, a, b, c, d, p, q, r, s);
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
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      check(p == a, "P = A");
      check(q == b, "Q = B");
      check(r == R_TABLE[v], "R truth table");
      check(s == S_TABLE[v], "S truth table");
      if (!d) check(2'({s, r}) == 2'(a) + 2'(b) + 2'(c), "full adder");
      seen[{p, q, r, s}] = 1'b1;
    end
    check(seen == 16'hFFFF, "bijection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
