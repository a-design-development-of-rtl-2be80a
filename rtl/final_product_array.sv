// final_product_array - N x N adder network that sums the N*N partial
// products into the 2N-bit product, using Peres gates (PG) as half adders
// and Haghparast-Navi gates (HNG) as full adders.
//
// It is a carry-ripple array: partial-product row 0 is the first running
// sum; each further row j is added to the running sum shifted right by one
// column with a ripple-carry chain whose least significant cell is a PG
// half adder and whose other cells are HNG full adders (in row 1 the most
// significant cell is also a PG, since the running sum is only N bits wide
// there). The lowest sum bit of each chain is product bit j; after row N-1
// the running sum gives the top N product bits.
//
// Cost: N PG and N*(N-2) HNG gates, one constant-0 input each, and
// N + 2*N*(N-2) garbage outputs. At N = 4 this is the same 4 PG + 8 HNG
// count as the published 4 x 4 network (which groups the rows differently,
// see final_product_4x4); at N = 8 it is 8 PG + 48 HNG. The published
// description gives only the gate kinds and counts for N > 4, not a wiring;
// the array arrangement is this design's choice. Purely combinational.
//
// Ports: pp[j][i] = x[i] & y[j]; prod[2N-1:0] the product; garbage the
// unused pass-through outputs (PG: A; HNG: A and B), in row order.
module final_product_array #(
  parameter int unsigned N = rmul_pkg::DEFAULT_N
) (
  input  logic [N-1:0][N-1:0]                     pp,
  output logic [2*N-1:0]                          prod,
  output logic [rmul_pkg::adder_garbage(N)-1:0]   garbage
);
  localparam int unsigned ROW1_GARBAGE = 2 * N - 2;  // 2 PG + (N-2) HNG
  localparam int unsigned ROWJ_GARBAGE = 2 * N - 1;  // 1 PG + (N-1) HNG

  // acc[j]: running sum after row j, N+1 bits (bit k = column j+k).
  // cy[j][k]: carry into cell k (k >= 1) of the chain of row j.
  logic [N-1:0][N:0] acc;
  logic [N-1:1][N:1] cy;

  initial begin
    assert (N >= 2) else $fatal(1, "final_product_array: N must be at least 2");
  end

  assign acc[0] = {1'b0, pp[0]};

  for (genvar j = 1; j < N; j++) begin : g_row
    localparam int unsigned GB = (j == 1) ? 0 : ROW1_GARBAGE + (j - 2) * ROWJ_GARBAGE;

    // least significant cell: half adder of running-sum bit 1 and pp[j][0]
    pg_gate u_ha0 (
      .a(acc[j-1][1]), .b(pp[j][0]), .c(1'b0),
      .p(garbage[GB]), .q(cy[j][1]), .r(acc[j][0])
    );

    for (genvar k = 1; k < N; k++) begin : g_cell
      if (j == 1 && k == N - 1) begin : g_ha_top
        // row 1: the running sum has no bit in this column
        pg_gate u_ha (
          .a(pp[j][k]), .b(cy[j][k]), .c(1'b0),
          .p(garbage[GB + 2 * k - 1]), .q(cy[j][k+1]), .r(acc[j][k])
        );
      end else begin : g_fa
        hng_gate u_fa (
          .a(acc[j-1][k+1]), .b(pp[j][k]), .c(cy[j][k]), .d(1'b0),
          .p(garbage[GB + 2 * k - 1]), .q(garbage[GB + 2 * k]),
          .r(acc[j][k]), .s(cy[j][k+1])
        );
      end
    end

    assign acc[j][N] = cy[j][N];
    assign prod[j]   = acc[j][0];
  end

  assign prod[0]            = pp[0][0];
  assign prod[2*N-1:N]      = acc[N-1][N:1];
endmodule
