// tb_pp_tg_array - self-checking test of the Toffoli partial-product grid.
//
// Runs the grid at its default size (8 x 8) over all 65,536 operand pairs
// and a 3 x 3 grid over all 64 pairs. Every partial product must be
// x[i] & y[j], and the garbage outputs must be plain copies of x (bottom
// row) and y (last column), which also confirms the 2N garbage count.
module tb_pp_tg_array;
  localparam int unsigned N  = rmul_pkg::DEFAULT_N;
  localparam int unsigned NS = 3;

  logic [N-1:0]          x, y, gx, gy;
  logic [N-1:0][N-1:0]   pp;
  logic [NS-1:0]         xs, ys, gxs, gys;
  logic [NS-1:0][NS-1:0] pps;
  int checks = 0, failures = 0;

  pp_tg_array dut (.x(x), .y(y), .pp(pp), .garbage_x(gx), .garbage_y(gy));
  pp_tg_array #(.N(NS)) dut_s (.x(xs), .y(ys), .pp(pps), .garbage_x(gxs), .garbage_y(gys));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%h y=%h", what, x, y);
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
    check($bits(gx) + $bits(gy) == rmul_pkg::pp_garbage(N), "garbage count");
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      {x, y} = (2 * N)'(v);
      #1;
      begin
        bit ok = 1'b1;
        for (int j = 0; j < N; j++)
          for (int i = 0; i < N; i++)
            if (pp[j][i] !== (x[i] & y[j])) ok = 1'b0;
        check(ok, "partial products");
      end
      check(gx == x && gy == y, "garbage copies");
    end
    for (int v = 0; v < (1 << (2 * NS)); v++) begin
      {xs, ys} = (2 * NS)'(v);
      #1;
      begin
        bit ok = 1'b1;
        for (int j = 0; j < NS; j++)
          for (int i = 0; i < NS; i++)
            if (pps[j][i] !== (xs[i] & ys[j])) ok = 1'b0;
        check(ok, "partial products 3x3");
      end
      check(gxs == xs && gys == ys, "garbage copies 3x3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
