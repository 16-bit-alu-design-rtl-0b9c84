// toffoli_gate: 3x3 Toffoli (controlled-controlled-NOT) gate.
// Maps (A, B, C) to (P = A, Q = B, R = (A & B) ^ C): the target C is inverted
// when both controls are 1. With C tied to 0 the R output is A AND B. The gate
// is its own inverse; its quantum cost is 5 (two V, one V+ and two CNOT).
// Interface: a, b, c (in); p, q, r (out). Purely combinational, no clock.
module toffoli_gate (
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
