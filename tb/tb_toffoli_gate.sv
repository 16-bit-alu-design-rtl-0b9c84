// tb_toffoli_gate: exhaustive check of the 3x3 Toffoli gate.
// Compares (P, Q, R) with (A, B, AB xor C) for all eight inputs, checks that the
// mapping is one-to-one and that a second gate restores the inputs.
module tb_toffoli_gate;
  logic a, b, c, p, q, r, p2, q2, r2;
  int checks = 0, failures = 0;
  bit [7:0] seen;
  bit exp_r;

  toffoli_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  toffoli_gate inv (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

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
      exp_r = (v == 6 || v == 7) ? !c : c;   // target flips only when A=B=1
      check(p == a, "P=A");
      check(q == b, "Q=B");
      check(r == exp_r, "R=AB^C");
      check(!seen[{p, q, r}], "one-to-one");
      seen[{p, q, r}] = 1'b1;
      check({p2, q2, r2} == {a, b, c}, "self-inverse");
    end
    check(seen == 8'hFF, "all outputs reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
