// tb_rev_arith_cell: exhaustive check of one arithmetic bit cell.
// For all 32 combinations of A, B, S0, S1 and Cin the sum and carry are
// compared with a one-bit slice of the function table: the operand Y is
// B, ~B, 0 or 1 for (S0,S1) = 00, 01, 10, 11 and {cout,sum} = A + Y + Cin.
// Also checks that S0 leaves the cell unchanged.
// Reversibility: with the constant inputs fixed, no two input patterns may
// give the same pattern on all outputs, garbage included.
module tb_rev_arith_cell;
  logic a, b, s0, s1, cin, sum, cout, s0_o;
  logic [2:0] garbage;
  int checks = 0, failures = 0;
  bit [63:0] seen_out;   // output patterns met so far
  int y, total;

  rev_arith_cell dut (.a(a), .b(b), .s0_i(s0), .s1_i(s1), .cin(cin),
                      .sum(sum), .cout(cout), .s0_o(s0_o), .garbage(garbage));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b s0=%0b s1=%0b cin=%0b -> sum=%0b cout=%0b",
               what, a, b, s0, s1, cin, sum, cout);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen_out = '0;
    for (int v = 0; v < 32; v++) begin
      {a, b, s0, s1, cin} = v[4:0];
      #1;
      check(!seen_out[{sum, cout, s0_o, garbage}], "no two inputs give the same outputs");
      seen_out[{sum, cout, s0_o, garbage}] = 1'b1;
      case ({s0, s1})
        2'b00:   y = int'(b);
        2'b01:   y = 1 - int'(b);
        2'b10:   y = 0;
        default: y = 1;
      endcase
      total = int'(a) + y + int'(cin);
      check(sum == total[0], "sum");
      check(cout == total[1], "carry");
      check(s0_o == s0, "S0 passed on");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
