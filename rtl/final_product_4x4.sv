// final_product_4x4 - adder network that sums the 16 partial products of a
// 4 x 4 multiplier into the 8-bit product, using 4 Peres gates as half
// adders and 8 HNG gates as full adders (12 gates, 20 garbage outputs,
// 12 constant inputs).
//
// Structure (two rows of ripple-carry chains):
//   upper right chain  adds partial-product rows 0 and 1 over columns 1..4:
//                      PG, HNG, HNG, PG; its column-1 sum is P1.
//   upper left chain   adds rows 2 and 3 over columns 3..5: PG, HNG, HNG;
//                      its carry out stays in column 6.
//   lower chain        adds the two upper results, the lone row-2 bit x0y2
//                      of column 2 and the lone row-3 bit x3y3 of column 6:
//                      PG (P2), HNG (P3), HNG (P4), HNG (P5), HNG (P6, P7).
// P0 is x0y0 itself. The gate mix, the two-row arrangement, the operands
// x3y2/x2y3 and x2y2/x1y3 of the upper left HNGs and the x3y3 input of the
// final HNG follow the published 4 x 4 network; the exact wiring of the
// remaining links is this design's reading of it.
//
// Ports: pp[j][i] = x[i] & y[j]; prod[7:0] the product; garbage[19:0] the
// unused pass-through outputs (PG: A; HNG: A and B), numbered in gate order
// upper right chain, upper left chain, lower chain. Purely combinational.
module final_product_4x4 (
  input  logic [3:0][3:0] pp,
  output logic [7:0]      prod,
  output logic [19:0]     garbage
);
  // upper right chain: rows 0 + 1
  logic s2, s3, s4, c2, c3, c4, c5;
  // upper left chain: rows 2 + 3
  logic t3, t4, t5, d4, d5, d6;
  // lower chain carries
  logic e3, e4, e5, e6;

  assign prod[0] = pp[0][0];

  pg_gate  u_r1 (.a(pp[0][1]), .b(pp[1][0]), .c(1'b0),
                 .p(garbage[0]), .q(c2), .r(prod[1]));
  hng_gate u_r2 (.a(pp[0][2]), .b(pp[1][1]), .c(c2), .d(1'b0),
                 .p(garbage[1]), .q(garbage[2]), .r(s2), .s(c3));
  hng_gate u_r3 (.a(pp[0][3]), .b(pp[1][2]), .c(c3), .d(1'b0),
                 .p(garbage[3]), .q(garbage[4]), .r(s3), .s(c4));
  pg_gate  u_r4 (.a(pp[1][3]), .b(c4), .c(1'b0),
                 .p(garbage[5]), .q(c5), .r(s4));

  pg_gate  u_l3 (.a(pp[2][1]), .b(pp[3][0]), .c(1'b0),
                 .p(garbage[6]), .q(d4), .r(t3));
  hng_gate u_l4 (.a(pp[2][2]), .b(pp[3][1]), .c(d4), .d(1'b0),
                 .p(garbage[7]), .q(garbage[8]), .r(t4), .s(d5));
  hng_gate u_l5 (.a(pp[2][3]), .b(pp[3][2]), .c(d5), .d(1'b0),
                 .p(garbage[9]), .q(garbage[10]), .r(t5), .s(d6));

  pg_gate  u_b2 (.a(s2), .b(pp[2][0]), .c(1'b0),
                 .p(garbage[11]), .q(e3), .r(prod[2]));
  hng_gate u_b3 (.a(s3), .b(t3), .c(e3), .d(1'b0),
                 .p(garbage[12]), .q(garbage[13]), .r(prod[3]), .s(e4));
  hng_gate u_b4 (.a(s4), .b(t4), .c(e4), .d(1'b0),
                 .p(garbage[14]), .q(garbage[15]), .r(prod[4]), .s(e5));
  hng_gate u_b5 (.a(c5), .b(t5), .c(e5), .d(1'b0),
                 .p(garbage[16]), .q(garbage[17]), .r(prod[5]), .s(e6));
  hng_gate u_b6 (.a(pp[3][3]), .b(d6), .c(e6), .d(1'b0),
                 .p(garbage[18]), .q(garbage[19]), .r(prod[6]), .s(prod[7]));
endmodule
