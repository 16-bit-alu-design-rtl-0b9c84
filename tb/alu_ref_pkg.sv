// alu_ref_pkg: reference model of the ALU function table for the testbenches.
// alu_ref() returns the expected result and carry for a w-bit ALU (w <= 63),
// written row by row from the table's meaning (A+B, A-B, A-1, ...) rather than
// from the adder-plus-operand-select structure the RTL uses. The carry of the
// subtracting rows is the usual "no borrow" flag. In logic mode the carry is
// not part of the table and is returned as 0 with care_cout = 0.
package alu_ref_pkg;
  typedef struct packed {
    logic [62:0] f;
    logic        cout;
    logic        care_cout;
  } alu_result_t;

  typedef enum logic [3:0] {
    OP_ADD      = 4'b0000, OP_ADD_INC = 4'b0001, OP_ADD_NOTB = 4'b0010,
    OP_SUB      = 4'b0011, OP_PASS_A  = 4'b0100, OP_INC      = 4'b0101,
    OP_DEC      = 4'b0110, OP_PASS_A2 = 4'b0111, OP_XOR      = 4'b1000,
    OP_AND      = 4'b1010, OP_OR      = 4'b1100, OP_NOT      = 4'b1110
  } alu_op_t;

  // Index 0..11 of a table row, for coverage counting: {s,s0,s1,cin} for the
  // arithmetic rows, 8 + {s0,s1} for the logic rows.
  function automatic int row_index(input bit s, s0, s1, cin);
    return s ? 8 + 2 * int'(s0) + int'(s1)
             : 4 * int'(s0) + 2 * int'(s1) + int'(cin);
  endfunction

  function automatic alu_result_t alu_ref(input logic [62:0] a, b, input int w,
                                          input bit s, s0, s1, cin);
    logic [63:0] mask, am, bm, t;
    alu_result_t res;
    mask = (64'd1 << w) - 64'd1;
    am   = {1'b0, a} & mask;
    bm   = {1'b0, b} & mask;
    res.care_cout = !s;
    res.cout      = 1'b0;
    if (!s) begin
      unique case ({s0, s1, cin})
        3'b000: begin t = am + bm;                 res.cout = t[w]; end
        3'b001: begin t = am + bm + 64'd1;         res.cout = t[w]; end
        3'b010: begin t = am + (~bm & mask);       res.cout = t[w]; end
        3'b011: begin t = am - bm;                 res.cout = (am >= bm); end
        3'b100: begin t = am;                      res.cout = 1'b0; end
        3'b101: begin t = am + 64'd1;              res.cout = (am == mask); end
        3'b110: begin t = am - 64'd1;              res.cout = (am != 0); end
        default: begin t = am;                     res.cout = 1'b1; end
      endcase
    end else begin
      unique case ({s0, s1})
        2'b00:   t = am ^ bm;
        2'b01:   t = am & bm;
        2'b10:   t = am | bm;
        default: t = ~am;
      endcase
    end
    res.f = 63'(t & mask);
    return res;
  endfunction
endpackage
