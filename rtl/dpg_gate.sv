// dpg_gate: 4x4 Double Peres Gate (DPG).
// Maps (A, B, C, D) to
//   P = A, Q = A ^ B, R = A ^ B ^ C, S = ((A ^ B) & C) ^ ((A & B) ^ D).
// It is built, as its name says, from two cascaded Peres gates: the first takes
// (A, B, D) and gives A ^ B and (A & B) ^ D; the second takes (A ^ B, C,
// (A & B) ^ D) and adds C into both. With D tied to 0, R is the sum and S the
// carry of a full adder on A, B, C. The document gives its quantum cost as 6.
// Interface: a, b, c, d (in); p, q, r, s (out). Purely combinational.
module dpg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic ab_x;   // A ^ B, out of the first Peres gate
  logic ab_d;   // (A & B) ^ D, out of the first Peres gate

  peres_gate u_first (
    .a(a), .b(b), .c(d),
    .p(p), .q(ab_x), .r(ab_d)
  );

  peres_gate u_second (
    .a(ab_x), .b(c), .c(ab_d),
    .p(q), .q(r), .r(s)
  );
endmodule
