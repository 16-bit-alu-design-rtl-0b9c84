// rev_alu16: 16-bit ALU built only from reversible gates.
// WIDTH bit slices (rev_alu_slice) form a ripple-carry chain: slice i gets the
// carry out of slice i-1, slice 0 gets cin, and cout is the carry out of the
// last slice. The mode and function selects S, S0, S1 enter slice 0 and are
// handed from slice to slice through the pass-through outputs of the gates,
// so no line is fanned out anywhere in the array. Operations (function table):
//   S=0 arithmetic, by S0 S1 Cin:
//     000 A+B  001 A+B+1  010 A+~B  011 A-B  100 A  101 A+1  110 A-1  111 A
//   S=1 logic, by S0 S1 (Cin ignored): 00 XOR  01 AND  10 OR  11 NOT A
// Ports are A, B, F (WIDTH each), S, S0, S1, Cin and Cout: 53 pins at 16 bits.
// Cout is the adder carry and is meaningful only in arithmetic mode; it is 1
// on an unsigned carry (or, for A-B and A-1, when no borrow occurs). The
// garbage outputs of the gates and the selects leaving the last slice are
// kept internal: a reversible realization needs them, the user does not.
// Purely combinational; the result settles after the carry ripples through
// WIDTH full adders.
// Function table, width and the gate types follow the document; the slice
// organisation, the select threading and the Cout behaviour in logic mode
// are this design's own.
module rev_alu16
  import rev_alu_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             s,
  input  logic             s0,
  input  logic             s1,
  input  logic             cin,
  output logic [WIDTH-1:0] f,
  output logic             cout
);
  logic [WIDTH:0] carry;
  logic [WIDTH:0] s_chain, s0_chain, s1_chain;
  logic [WIDTH-1:0][SLICE_GARBAGE-1:0] garbage;  // reversible garbage, unused

  assign carry[0]    = cin;
  assign s_chain[0]  = s;
  assign s0_chain[0] = s0;
  assign s1_chain[0] = s1;

  for (genvar i = 0; i < WIDTH; i++) begin : g_slice
    rev_alu_slice u_slice (
      .a(a[i]), .b(b[i]),
      .s_i(s_chain[i]), .s0_i(s0_chain[i]), .s1_i(s1_chain[i]),
      .cin(carry[i]),
      .f(f[i]), .cout(carry[i+1]),
      .s_o(s_chain[i+1]), .s0_o(s0_chain[i+1]), .s1_o(s1_chain[i+1]),
      .garbage(garbage[i])
    );
  end

  assign cout = carry[WIDTH];
endmodule
