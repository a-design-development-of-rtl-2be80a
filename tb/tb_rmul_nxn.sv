// tb_rmul_nxn - self-checking test of the N x N reversible multiplier.
//
// At the default size (8 x 8): the four operand pairs of the published
// simulation table with their products worked out by hand, then all 65,536
// operand pairs against x * y. A 5 x 5 instance covers an odd width over all
// 1,024 pairs. Also checks the garbage port width against the cost formula
// (120 bits at 8 x 8).
module tb_rmul_nxn;
  localparam int unsigned N = rmul_pkg::DEFAULT_N;

  logic [N-1:0]   x, y;
  logic [2*N-1:0] prod;
  logic [rmul_pkg::total_garbage(N)-1:0] garbage;
  logic [4:0]     x5, y5;
  logic [9:0]     prod5;
  logic [rmul_pkg::total_garbage(5)-1:0] garbage5;
  int checks = 0, failures = 0;

  rmul_nxn dut (.x(x), .y(y), .prod(prod), .garbage(garbage));
  rmul_nxn #(.N(5)) dut5 (.x(x5), .y(y5), .prod(prod5), .garbage(garbage5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%h y=%h prod=%h", what, x, y, prod);
    end
  endtask

  task automatic table_case(input logic [7:0] a, input logic [7:0] b, input logic [15:0] p);
    x = a; y = b;
    #1;
    check(prod == p, "table vector");
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check($bits(garbage) == 120, "120 garbage outputs at 8x8");
    table_case(8'b1111_1111, 8'b1111_1111, 16'd65025);
    table_case(8'b1110_0001, 8'b1100_1000, 16'd45000);
    table_case(8'b1100_0011, 8'b1001_0001, 16'd28275);
    table_case(8'b0000_1111, 8'b0000_1111, 16'd225);
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      {x, y} = (2 * N)'(v);
      #1;
      check(32'(prod) == 32'(x) * 32'(y), "product");
    end
    for (int v = 0; v < 1024; v++) begin
      {x5, y5} = 10'(v);
      #1;
      check(32'(prod5) == 32'(x5) * 32'(y5), "product 5x5");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
