// tb_peres_gate: exhaustive check of the 3x3 Peres gate.
// Compares (P, Q, R) with (A, A xor B, AB xor C) from a truth table written
// out by hand, checks that the mapping is one-to-one and its half-adder use.
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen;
  // Expected {P,Q,R} for input {A,B,C} = 0..7.
  localparam bit [2:0] EXPECT [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                      3'b110, 3'b111, 3'b101, 3'b100};

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b c=%0b -> %0b%0b%0b", what, a, b, c, p, q, r);
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
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = v[2:0];
      #1;
      check({p, q, r} == EXPECT[v], "truth table");
      check(!seen[{p, q, r}], "one-to-one");
      seen[{p, q, r}] = 1'b1;
      if (!c) check(2'(int'(a) + int'(b)) == {r, q}, "half adder with C=0");
    end
    check(seen == 8'hFF, "all outputs reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
