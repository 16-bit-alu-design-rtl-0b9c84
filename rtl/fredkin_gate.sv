// fredkin_gate: 3x3 Fredkin (controlled-swap) gate.
// Maps (A, B, C) to (P = A, Q = ~A&B | A&C, R = A&B | ~A&C): when the control A
// is 1 the lines B and C are swapped, otherwise they pass straight through.
// Read at the Q output it is a 2:1 multiplexer, Q = A ? C : B, and R carries the
// other input. The control is passed on unchanged at P, so one select line can
// run through a chain of Fredkin gates without fan-out. Quantum cost 5.
// Interface: a (control), b, c (in); p, q, r (out). Purely combinational.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) | (a & c);
  assign r = (a & b) | (~a & c);
endmodule
