// pp_tg_array - partial-product generator built from an N x N grid of
// Toffoli gates.
//
// Gate (row j, column i) receives B = x[i] and A = y[j], with its constant
// input C = 0, and produces the partial product pp[j][i] = x[i] & y[j] on R.
// The copies of its inputs are reused instead of being thrown away: Q (= x[i])
// feeds the gate below in the same column, and P (= y[j]) feeds the next gate
// in the same row, towards the more significant x bits. Only the x copies
// leaving the bottom row and the y copies leaving the last column are unused,
// giving 2N garbage outputs and N*N constant inputs (8 and 16 at N = 4).
// This grid and its wiring follow the published 4 x 4 arrangement, widened
// to N. Purely combinational.
//
// Ports: x, y        operands (bit 0 = least significant)
//        pp[j][i]    x[i] & y[j]
//        garbage_x   x copies leaving row N-1
//        garbage_y   y copies leaving column N-1
module pp_tg_array #(
  parameter int unsigned N = rmul_pkg::DEFAULT_N
) (
  input  logic [N-1:0]         x,
  input  logic [N-1:0]         y,
  output logic [N-1:0][N-1:0]  pp,
  output logic [N-1:0]         garbage_x,
  output logic [N-1:0]         garbage_y
);
  // x_bus[j][i]: x[i] entering row j (row N is the bottom exit).
  // y_bus[j][i]: y[j] entering column i (column N is the row exit).
  logic [N:0][N-1:0] x_bus;
  logic [N-1:0][N:0] y_bus;

  assign x_bus[0] = x;

  for (genvar j = 0; j < N; j++) begin : g_row
    assign y_bus[j][0] = y[j];
    for (genvar i = 0; i < N; i++) begin : g_col
      tg_gate u_tg (
        .a (y_bus[j][i]),
        .b (x_bus[j][i]),
        .c (1'b0),
        .p (y_bus[j][i+1]),
        .q (x_bus[j+1][i]),
        .r (pp[j][i])
      );
    end
    assign garbage_y[j] = y_bus[j][N];
  end

  assign garbage_x = x_bus[N];
endmodule
