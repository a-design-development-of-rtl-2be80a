// tg_gate - 3-input, 3-output Toffoli gate (TG).
//
// Mapping: P = A, Q = B, R = (A & B) ^ C. The mapping is its own inverse, so
// no information is lost. In the partial-product array C is tied to 0, which
// makes R the partial product A & B while P and Q carry A and B on to the
// neighbouring gates. Purely combinational; no clock.
module tg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
