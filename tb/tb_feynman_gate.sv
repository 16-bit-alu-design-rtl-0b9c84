// tb_feynman_gate: exhaustive check of the 2x2 Feynman gate.
// For all four inputs it compares (P, Q) with (A, A xor B), checks that the
// mapping is one-to-one, that a second gate fed with the outputs restores the
// inputs (the gate is its own inverse), and the copy (B=0) and complement
// (B=1) uses.
module tb_feynman_gate;
  logic a, b, p, q, p2, q2;
  int checks = 0, failures = 0;
  bit [3:0] seen;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));
  feynman_gate inv (.a(p), .b(q), .p(p2), .q(q2));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b p=%0b q=%0b", what, a, b, p, q);
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
    for (int v = 0; v < 4; v++) begin
      {a, b} = v[1:0];
      #1;
      check(p == a, "P=A");
      check(q == ((a && !b) || (!a && b)), "Q=A^B");
      check(!seen[{p, q}], "one-to-one");
      seen[{p, q}] = 1'b1;
      check({p2, q2} == {a, b}, "self-inverse");
      if (!b) check(q == a, "copy with B=0");
      else    check(q == !a, "complement with B=1");
    end
    check(seen == 4'hF, "all outputs reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
