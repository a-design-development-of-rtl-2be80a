// rmul_4x4 - complete 4 x 4 reversible multiplier.
//
// A 4 x 4 Toffoli-gate grid (pp_tg_array) forms the 16 partial products
// x[i] & y[j]; the 12-gate PG/HNG network (final_product_4x4) adds them into
// the 8-bit unsigned product. Cost: 28 gates (16 TG, 4 PG, 8 HNG), 28
// constant-0 inputs and 28 garbage outputs (8 from the grid, 20 from the
// adders), the figures the published comparison gives for this design.
// Purely combinational: prod is valid one combinational delay after x, y.
//
// Ports: x, y operands; prod = x * y; garbage = {adder garbage, grid y
// copies, grid x copies}.
module rmul_4x4 (
  input  logic [3:0]  x,
  input  logic [3:0]  y,
  output logic [7:0]  prod,
  output logic [27:0] garbage
);
  logic [3:0][3:0] pp;
  logic [3:0]      g_x, g_y;
  logic [19:0]     g_add;

  pp_tg_array #(.N(4)) u_pp (
    .x        (x),
    .y        (y),
    .pp       (pp),
    .garbage_x(g_x),
    .garbage_y(g_y)
  );

  final_product_4x4 u_fp (
    .pp     (pp),
    .prod   (prod),
    .garbage(g_add)
  );

  assign garbage = {g_add, g_y, g_x};
endmodule
