// rev_logic_cell: one bit of the reversible logic unit.
// Selects one of four logic functions of A and B with (S0, S1):
//   S0 S1 = 0 0 -> A XOR B,  0 1 -> A AND B,  1 0 -> A OR B,  1 1 -> NOT A.
// Gates, each signal used exactly once:
//   Toffoli (A, B, 0)          -> A, B, A&B
//   Feynman (A, B)             -> A, A^B
//   Feynman (A^B, 0)           -> two copies of A^B
//   Feynman (A&B, A^B)         -> A&B, A|B        (A|B = A^B^AB)
//   NOT (A)                    -> ~A
//   Fredkin (S1, A^B, A&B)     -> S1, m0 = S1 ? A&B : A^B, garbage
//   Fredkin (S1, A|B, ~A)      -> S1 (passed on), m1 = S1 ? ~A : A|B, garbage
//   Fredkin (S0, m0, m1)       -> S0 (passed on), S0 ? m1 : m0, garbage
// The function table and the gate types are the document's; which operand NOT
// applies to (A) and this arrangement of gates are this design's own.
// Interface: a, b, s0_i, s1_i (in); y, s0_o, s1_o (selects handed on),
// garbage[2:0] (unused reversible outputs). Combinational.
module rev_logic_cell (
  input  logic       a,
  input  logic       b,
  input  logic       s0_i,
  input  logic       s1_i,
  output logic       y,
  output logic       s0_o,
  output logic       s1_o,
  output logic [2:0] garbage
);
  logic a1, b1, a2;
  logic and_ab, and_ab1;
  logic xor_ab, xor_m, xor_c;
  logic or_ab, not_a;
  logic s1_t;
  logic m0, m1;

  toffoli_gate u_and (
    .a(a), .b(b), .c(1'b0),
    .p(a1), .q(b1), .r(and_ab)
  );

  feynman_gate u_xor (
    .a(a1), .b(b1),
    .p(a2), .q(xor_ab)
  );

  feynman_gate u_xor_copy (
    .a(xor_ab), .b(1'b0),
    .p(xor_m), .q(xor_c)
  );

  feynman_gate u_or (
    .a(and_ab), .b(xor_c),
    .p(and_ab1), .q(or_ab)
  );

  not_gate u_not (
    .a(a2), .p(not_a)
  );

  fredkin_gate u_mux0 (
    .a(s1_i), .b(xor_m), .c(and_ab1),
    .p(s1_t), .q(m0), .r(garbage[0])
  );

  fredkin_gate u_mux1 (
    .a(s1_t), .b(or_ab), .c(not_a),
    .p(s1_o), .q(m1), .r(garbage[1])
  );

  fredkin_gate u_mux2 (
    .a(s0_i), .b(m0), .c(m1),
    .p(s0_o), .q(y), .r(garbage[2])
  );
endmodule
