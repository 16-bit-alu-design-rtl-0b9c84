// feynman_gate: 2x2 Feynman (controlled-NOT) gate.
// Maps (A, B) to (P = A, Q = A ^ B): A is the control, B is inverted when A is 1.
// The gate is its own inverse and has quantum cost 1. With B tied to 0 it makes a
// copy of A (reversible fan-out); with B tied to 1 it gives the complement of A.
// Interface: a, b (in); p, q (out). Purely combinational, no clock.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
