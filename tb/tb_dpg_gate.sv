// tb_dpg_gate: exhaustive check of the 4x4 Double Peres gate.
// For all sixteen inputs it compares P, Q, R with A, A xor B, A xor B xor C
// and S with its defining formula, checks that the mapping is one-to-one, and
// with D=0 checks that (S, R) is the two-bit sum A + B + C (full adder).
module tb_dpg_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit [15:0] seen;
  int ones;
  bit exp_s;

  dpg_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s abcd=%0b%0b%0b%0b -> pqrs=%0b%0b%0b%0b",
               what, a, b, c, d, p, q, r, s);
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
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = v[3:0];
      #1;
      ones  = int'(a) + int'(b) + int'(c);
      exp_s = (((a != b) && c) != (a && b)) != d;
      check(p == a, "P=A");
      check(q == (a != b), "Q=A^B");
      check(r == ones[0], "R=A^B^C");
      check(s == exp_s, "S formula");
      check(!seen[{p, q, r, s}], "one-to-one");
      seen[{p, q, r, s}] = 1'b1;
      if (!d) check({s, r} == 2'(ones), "full adder with D=0");
    end
    check(seen == 16'hFFFF, "all outputs reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
