// hng_gate - 4-input, 4-output Haghparast-Navi gate (HNG), used as a
// reversible full adder.
//
// Mapping: P = A, Q = B, R = A ^ B ^ C, S = ((A ^ B) & C) ^ (A & B) ^ D.
// With C = carry in and D tied to 0, R is the full-adder sum and S the carry
// out; P and Q are garbage. The mapping is a bijection on 4 bits. Purely
// combinational.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = b;
  assign r = a ^ b ^ c;
  assign s = ((a ^ b) & c) ^ (a & b) ^ d;
endmodule
