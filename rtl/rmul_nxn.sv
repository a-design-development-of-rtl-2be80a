// rmul_nxn - N x N reversible multiplier (default N = 8).
//
// Two stages, as in the general architecture: an N x N Toffoli-gate grid
// (pp_tg_array) forms the N*N partial products, and a PG/HNG adder network
// (final_product_array) adds them into the 2N-bit unsigned product
// prod = x * y. The operands are unsigned. Purely combinational.
//
// Cost at N = 8: 64 TG + 8 PG + 48 HNG = 120 gates, 120 constant-0 inputs
// and 16 + 8 + 96 = 120 garbage outputs (see rmul_pkg for the formulas).
//
// Ports: x, y operands; prod product; garbage = {adder garbage, grid y
// copies, grid x copies}, rmul_pkg::total_garbage(N) bits.
module rmul_nxn #(
  parameter int unsigned N = rmul_pkg::DEFAULT_N
) (
  input  logic [N-1:0]                            x,
  input  logic [N-1:0]                            y,
  output logic [2*N-1:0]                          prod,
  output logic [rmul_pkg::total_garbage(N)-1:0]   garbage
);
  logic [N-1:0][N-1:0]                          pp;
  logic [N-1:0]                                 g_x, g_y;
  logic [rmul_pkg::adder_garbage(N)-1:0]        g_add;

  pp_tg_array #(.N(N)) u_pp (
    .x        (x),
    .y        (y),
    .pp       (pp),
    .garbage_x(g_x),
    .garbage_y(g_y)
  );

  final_product_array #(.N(N)) u_fp (
    .pp     (pp),
    .prod   (prod),
    .garbage(g_add)
  );

  assign garbage = {g_add, g_y, g_x};
endmodule
