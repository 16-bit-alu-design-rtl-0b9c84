// rev_arith_cell: one bit of the reversible arithmetic unit.
// The cell computes A + Y + carry-in, where Y is chosen by the selects
// (S0, S1) as in the arithmetic half of the function table:
//   S0 S1 = 0 0 -> Y = B        (A + B,  A + B + 1)
//   S0 S1 = 0 1 -> Y = ~B       (A + ~B, A - B)
//   S0 S1 = 1 0 -> Y = 0        (A,      A + 1)
//   S0 S1 = 1 1 -> Y = 1        (A - 1,  A)
// so Y = S0 ? S1 : (B ^ S1). The cell is made only of reversible gates and
// uses every signal exactly once:
//   1. Feynman (S1, B)           -> S1, B ^ S1
//   2. Fredkin (S0, B^S1, S1)    -> S0 (passed on), Y, garbage
//   3. DPG (A, Y, Cin, D = 0)    -> garbage A, garbage A ^ Y, sum, carry-out
// The document gives the function table and says the units use Feynman,
// Fredkin and DPG gates; this gate arrangement is this design's own.
// Interface: a, b, s0_i, s1_i, cin (in); sum, cout, s0_o (S0 handed on to the
// logic cell), garbage[2:0] (unused reversible outputs). Combinational.
module rev_arith_cell (
  input  logic       a,
  input  logic       b,
  input  logic       s0_i,
  input  logic       s1_i,
  input  logic       cin,
  output logic       sum,
  output logic       cout,
  output logic       s0_o,
  output logic [2:0] garbage
);
  logic s1_t;   // S1 passed through the Feynman gate
  logic bx;     // B ^ S1
  logic y;      // second adder operand

  feynman_gate u_inv (
    .a(s1_i), .b(b),
    .p(s1_t), .q(bx)
  );

  fredkin_gate u_ysel (
    .a(s0_i), .b(bx), .c(s1_t),
    .p(s0_o), .q(y), .r(garbage[0])
  );

  dpg_gate u_fa (
    .a(a), .b(y), .c(cin), .d(1'b0),
    .p(garbage[1]), .q(garbage[2]), .r(sum), .s(cout)
  );
endmodule
