// tb_rev_alu_slice: exhaustive check of one ALU bit slice.
// Drives all 64 combinations of A, B, S, S0, S1, Cin and compares F (and Cout
// in arithmetic mode) with the one-bit reference of the function table, and
// checks that S, S0 and S1 leave the slice unchanged for the next slice.
// Reversibility: with the constant inputs fixed, no two input patterns may
// give the same pattern on all outputs, garbage included.
module tb_rev_alu_slice;
  import alu_ref_pkg::*;
  import rev_alu_pkg::*;
  logic a, b, s, s0, s1, cin, f, cout, s_o, s0_o, s1_o;
  logic [SLICE_GARBAGE-1:0] garbage;
  int checks = 0, failures = 0;
  bit [4095:0] seen_out;   // output patterns met so far
  alu_result_t exp;

  rev_alu_slice dut (.a(a), .b(b), .s_i(s), .s0_i(s0), .s1_i(s1), .cin(cin),
                     .f(f), .cout(cout), .s_o(s_o), .s0_o(s0_o), .s1_o(s1_o),
                     .garbage(garbage));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b s=%0b s0=%0b s1=%0b cin=%0b -> f=%0b cout=%0b",
               what, a, b, s, s0, s1, cin, f, cout);
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
    for (int v = 0; v < 64; v++) begin
      {a, b, s, s0, s1, cin} = v[5:0];
      #1;
      check(!seen_out[{f, cout, s_o, s0_o, s1_o, garbage}], "no two inputs give the same outputs");
      seen_out[{f, cout, s_o, s0_o, s1_o, garbage}] = 1'b1;
      exp = alu_ref(63'(a), 63'(b), 1, s, s0, s1, cin);
      check(f == exp.f[0], "result");
      if (exp.care_cout) check(cout == exp.cout, "carry");
      check({s_o, s0_o, s1_o} == {s, s0, s1}, "selects passed on");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
