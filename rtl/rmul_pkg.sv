// rmul_pkg - shared constants and cost formulas of the reversible multiplier.
//
// The multiplier is built only from three reversible gates: the Toffoli gate
// (TG) for partial products, the Peres gate (PG) as half adder and the
// Haghparast-Navi gate (HNG) as full adder. Every gate instance takes one
// constant-0 input and leaves the outputs that no later gate reads as
// "garbage". The functions below give the gate, garbage-output and
// constant-input counts of an N x N multiplier of this structure, so that
// modules can size their garbage ports and testbenches can check the cost
// figures (28 gates, 28 garbage outputs, 28 constant inputs at 4 x 4).
//
// Counting (this design's array adder network, identical in cost to the
// published 4 x 4 network):
//   TG  : N*N gates, garbage = the N x-outputs of the bottom row plus the
//         N y-outputs of the last column, i.e. 2N.
//   PG  : N half adders, one garbage output each (the pass-through A).
//   HNG : N*(N-2) full adders, two garbage outputs each (A and B).
package rmul_pkg;

  // Default operand width of the N x N multiplier (the simulated 8 x 8 case).
  localparam int unsigned DEFAULT_N = 8;

  function automatic int unsigned tg_gates(input int unsigned n);
    return n * n;
  endfunction

  function automatic int unsigned pg_gates(input int unsigned n);
    return n;
  endfunction

  function automatic int unsigned hng_gates(input int unsigned n);
    return n * (n - 2);
  endfunction

  function automatic int unsigned total_gates(input int unsigned n);
    return tg_gates(n) + pg_gates(n) + hng_gates(n);
  endfunction

  // Garbage outputs of the partial-product (TG) array alone.
  function automatic int unsigned pp_garbage(input int unsigned n);
    return 2 * n;
  endfunction

  // Garbage outputs of the half/full adder network alone.
  function automatic int unsigned adder_garbage(input int unsigned n);
    return pg_gates(n) + 2 * hng_gates(n);
  endfunction

  function automatic int unsigned total_garbage(input int unsigned n);
    return pp_garbage(n) + adder_garbage(n);
  endfunction

  // One constant-0 input per gate (C of TG and PG, D of HNG).
  function automatic int unsigned total_constants(input int unsigned n);
    return total_gates(n);
  endfunction

endpackage
