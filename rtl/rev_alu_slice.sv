// rev_alu_slice: one bit of the 16-bit reversible ALU.
// The slice holds an arithmetic cell (Y generation plus DPG full adder) and a
// logic cell (XOR/AND/OR/NOT), and a Fredkin gate driven by S that picks the
// arithmetic sum (S = 0) or the logic result (S = 1), as in the function table:
//   S S0 S1 Cin : 0000 A+B   0001 A+B+1  0010 A+~B  0011 A-B
//                 0100 A     0101 A+1    0110 A-1   0111 A
//                 100x XOR   101x AND    110x OR    111x NOT A
// A, B and S1 are each needed by both cells, so Feynman gates with a 0 input
// copy them (reversible fan-out). The select lines S, S0 and S1 leave the slice
// again at s_o, s0_o and s1_o through the pass-through outputs of the gates, so
// the ALU threads them from slice to slice like the carry instead of fanning
// them out. All other unused gate outputs are gathered on garbage.
// Gate budget (see rev_alu_pkg): 7 Feynman, 5 Fredkin, 1 Toffoli, 1 DPG,
// 1 NOT; quantum cost 43; 6 constant inputs; 7 garbage outputs.
// The function table is the document's; this gate arrangement is this
// design's own. Cout is the adder's carry; it is meaningful only when S = 0.
// Combinational, no clock.
module rev_alu_slice
  import rev_alu_pkg::*;
(
  input  logic                     a,
  input  logic                     b,
  input  logic                     s_i,
  input  logic                     s0_i,
  input  logic                     s1_i,
  input  logic                     cin,
  output logic                     f,
  output logic                     cout,
  output logic                     s_o,
  output logic                     s0_o,
  output logic                     s1_o,
  output logic [SLICE_GARBAGE-1:0] garbage
);
  logic a_ar, a_lg;     // copies of A for the two cells
  logic b_ar, b_lg;     // copies of B
  logic s1_ar, s1_lg;   // copies of S1
  logic s0_t;           // S0 handed from the arithmetic to the logic cell
  logic sum, lg;

  feynman_gate u_copy_a  (.a(a),    .b(1'b0), .p(a_ar),  .q(a_lg));
  feynman_gate u_copy_b  (.a(b),    .b(1'b0), .p(b_ar),  .q(b_lg));
  feynman_gate u_copy_s1 (.a(s1_i), .b(1'b0), .p(s1_ar), .q(s1_lg));

  rev_arith_cell u_arith (
    .a(a_ar), .b(b_ar), .s0_i(s0_i), .s1_i(s1_ar), .cin(cin),
    .sum(sum), .cout(cout), .s0_o(s0_t), .garbage(garbage[2:0])
  );

  rev_logic_cell u_logic (
    .a(a_lg), .b(b_lg), .s0_i(s0_t), .s1_i(s1_lg),
    .y(lg), .s0_o(s0_o), .s1_o(s1_o), .garbage(garbage[5:3])
  );

  fredkin_gate u_out (
    .a(s_i), .b(sum), .c(lg),
    .p(s_o), .q(f), .r(garbage[6])
  );
endmodule
