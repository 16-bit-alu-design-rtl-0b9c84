// tb_rev_logic_cell: exhaustive check of one logic bit cell.
// For all 16 combinations of A, B, S0, S1 the result is compared with XOR,
// AND, OR or NOT A as the function table selects, and S0, S1 must leave the
// cell unchanged.
// Reversibility: with the constant inputs fixed, no two input patterns may
// give the same pattern on all outputs, garbage included.
module tb_rev_logic_cell;
  logic a, b, s0, s1, y, s0_o, s1_o;
  logic [2:0] garbage;
  int checks = 0, failures = 0;
  bit [63:0] seen_out;   // output patterns met so far
  bit exp_y;

  rev_logic_cell dut (.a(a), .b(b), .s0_i(s0), .s1_i(s1), .y(y),
                      .s0_o(s0_o), .s1_o(s1_o), .garbage(garbage));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b s0=%0b s1=%0b -> y=%0b", what, a, b, s0, s1, y);
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
    for (int v = 0; v < 16; v++) begin
      {a, b, s0, s1} = v[3:0];
      #1;
      check(!seen_out[{y, s0_o, s1_o, garbage}], "no two inputs give the same outputs");
      seen_out[{y, s0_o, s1_o, garbage}] = 1'b1;
      case ({s0, s1})
        2'b00:   exp_y = (a != b);
        2'b01:   exp_y = a && b;
        2'b10:   exp_y = a || b;
        default: exp_y = !a;
      endcase
      check(y == exp_y, "logic result");
      check(s0_o == s0 && s1_o == s1, "selects passed on");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
