// tb_final_product_4x4 - exhaustive self-checking test of the 4 x 4
// PG/HNG adder network.
//
// Every one of the 65,536 patterns of the 16 partial-product inputs is
// applied (not only those a real multiplier produces); the 8-bit output
// must equal the weighted sum of the inputs, sum of pp[j][i] * 2^(i+j),
// which never exceeds 225. The garbage outputs must be the pass-through
// copies, which fixes their count at 20.
module tb_final_product_4x4;
  logic [3:0][3:0] pp;
  logic [7:0]      prod;
  logic [19:0]     garbage;
  int checks = 0, failures = 0;

  final_product_4x4 dut (.pp(pp), .prod(prod), .garbage(garbage));

  function automatic int unsigned weighted_sum(input logic [3:0][3:0] v);
    int unsigned s = 0;
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 4; i++)
        if (v[j][i]) s += 1 << (i + j);
    return s;
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      pp = 16'(v);
      #1;
      checks++;
      if (32'(prod) != weighted_sum(pp)) begin
        failures++;
        if (failures < 10) $display("FAIL pp=%h prod=%0d expected %0d", pp, prod, weighted_sum(pp));
      end
    end
    // pass-through garbage: PG A inputs and HNG A/B inputs of the upper
    // chains are partial products, so spot-check with a single bit set.
    pp = '0; pp[1][3] = 1'b1;  // x3y1 enters the top-right PG as A
    #1;
    checks++;
    if (garbage[5] !== 1'b1) begin
      failures++;
      $display("FAIL garbage pass-through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
