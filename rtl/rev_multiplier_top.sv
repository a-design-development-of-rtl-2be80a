// rev_multiplier_top - the reversible multiplier family side by side.
//
// Holds the two multipliers of the design: the 4 x 4 multiplier whose adder
// network is wired exactly after the published 4 x 4 circuit (rmul_4x4), and
// the N x N multiplier with the same TG / PG / HNG gate kinds at N = 8 by
// default (rmul_nxn). Each has its own operand, product and garbage ports,
// and both are purely combinational: there is no clock and no reset, and a
// product is valid one combinational delay after its operands change.
//
// Ports:
//   x4, y4 / prod4 / garbage4   4 x 4 multiplier, 28 garbage outputs
//   x, y   / prod  / garbage    N x N multiplier, rmul_pkg::total_garbage(N)
module rev_multiplier_top #(
  parameter int unsigned N = rmul_pkg::DEFAULT_N
) (
  input  logic [3:0]                              x4,
  input  logic [3:0]                              y4,
  output logic [7:0]                              prod4,
  output logic [27:0]                             garbage4,
  input  logic [N-1:0]                            x,
  input  logic [N-1:0]                            y,
  output logic [2*N-1:0]                          prod,
  output logic [rmul_pkg::total_garbage(N)-1:0]   garbage
);
  rmul_4x4 u_mul4 (
    .x      (x4),
    .y      (y4),
    .prod   (prod4),
    .garbage(garbage4)
  );

  rmul_nxn #(.N(N)) u_muln (
    .x      (x),
    .y      (y),
    .prod   (prod),
    .garbage(garbage)
  );
endmodule
