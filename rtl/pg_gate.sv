// pg_gate - 3-input, 3-output Peres gate (PG), used as a reversible half adder.
//
// Mapping: P = A, Q = (A & B) ^ C, R = A ^ B. With C tied to 0, Q is the
// carry A & B and R the sum A ^ B of a half adder; P is the garbage output.
// The mapping is a bijection on 3 bits (A and A ^ B recover A and B, after
// which Q recovers C). Output naming follows the half-adder equations of the
// source description (Q = carry, R = sum); the classic Peres gate lists the
// same two functions in the opposite order. Purely combinational.
module pg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (a & b) ^ c;
  assign r = a ^ b;
endmodule
