// peres_gate: 3x3 Peres gate.
// Maps (A, B, C) to (P = A, Q = A ^ B, R = (A & B) ^ C). It equals a Toffoli
// gate followed by a CNOT controlled by A on the B line, but costs only 4 in
// quantum primitives. With C tied to 0 it is a reversible half adder
// (Q = sum, R = carry).
// Interface: a, b, c (in); p, q, r (out). Purely combinational, no clock.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
