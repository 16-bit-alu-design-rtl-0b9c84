// tb_fredkin_gate: exhaustive check of the 3x3 Fredkin gate.
// Checks that B and C pass straight through when A=0 and are swapped when A=1,
// that the number of ones is preserved (conservative logic), that the mapping
// is one-to-one and that a second gate restores the inputs.
module tb_fredkin_gate;
  logic a, b, c, p, q, r, p2, q2, r2;
  int checks = 0, failures = 0;
  bit [7:0] seen;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  fredkin_gate inv (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

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
      check(p == a, "P=A");
      if (a) check({q, r} == {c, b}, "swap when A=1");
      else   check({q, r} == {b, c}, "pass when A=0");
      check($countones({p, q, r}) == $countones({a, b, c}), "ones preserved");
      check(!seen[{p, q, r}], "one-to-one");
      seen[{p, q, r}] = 1'b1;
      check({p2, q2, r2} == {a, b, c}, "self-inverse");
    end
    check(seen == 8'hFF, "all outputs reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
