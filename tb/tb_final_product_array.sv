// tb_final_product_array - self-checking test of the N x N PG/HNG adder
// network.
//
// The default-size (8 x 8) network gets 200,000 random 64-bit patterns of
// partial products plus the all-zero and all-one patterns; 3 x 3 and 4 x 4
// networks get every pattern (512 and 65,536). The output must equal the
// weighted sum of the inputs, sum of pp[j][i] * 2^(i+j), and the garbage
// port must have N + 2N(N-2) bits.
module tb_final_product_array;
  localparam int unsigned N = rmul_pkg::DEFAULT_N;

  logic [N-1:0][N-1:0] pp;
  logic [2*N-1:0]      prod;
  logic [rmul_pkg::adder_garbage(N)-1:0] g;
  logic [2:0][2:0]     pp3;
  logic [5:0]          prod3;
  logic [rmul_pkg::adder_garbage(3)-1:0] g3;
  logic [3:0][3:0]     pp4;
  logic [7:0]          prod4;
  logic [rmul_pkg::adder_garbage(4)-1:0] g4;
  int checks = 0, failures = 0;

  final_product_array dut (.pp(pp), .prod(prod), .garbage(g));
  final_product_array #(.N(3)) dut3 (.pp(pp3), .prod(prod3), .garbage(g3));
  final_product_array #(.N(4)) dut4 (.pp(pp4), .prod(prod4), .garbage(g4));

  function automatic longint unsigned wsum(input logic [63:0] v, input int n);
    longint unsigned s = 0;
    for (int j = 0; j < n; j++)
      for (int i = 0; i < n; i++)
        if (v[j * n + i]) s += 64'd1 << (i + j);
    return s;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check($bits(g) == N + 2 * N * (N - 2), "garbage width");
    check($bits(g4) == 20, "garbage width 4x4");
    pp = '0; #1; check(prod == 0, "all zero");
    pp = '1; #1; check(64'(prod) == wsum('1, N), "all one");
    for (int t = 0; t < 200000; t++) begin
      pp = {$urandom, $urandom};
      #1;
      check(64'(prod) == wsum(64'(pp), N), $sformatf("random pp=%h prod=%h", pp, prod));
    end
    for (int v = 0; v < 512; v++) begin
      pp3 = 9'(v);
      #1;
      check(64'(prod3) == wsum(64'(pp3), 3), $sformatf("3x3 pp=%h", pp3));
    end
    for (int v = 0; v < 65536; v++) begin
      pp4 = 16'(v);
      #1;
      check(64'(prod4) == wsum(64'(pp4), 4), $sformatf("4x4 pp=%h", pp4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
