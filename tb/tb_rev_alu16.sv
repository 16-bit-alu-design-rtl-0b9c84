// tb_rev_alu16: end-to-end test of the 16-bit reversible ALU at its default
// width (no parameter override).
// Every row of the function table is exercised with directed corner operands
// (0, 1, all ones, sign boundaries) and 2000 random operand pairs; F and, in
// arithmetic mode, Cout are compared with the row-by-row reference model.
// Logic rows are run with both Cin values to show that Cin is ignored there.
// Coverage counters record how often each table row ran, how often the carry
// came out as 1 and as 0, a carry that rippled through all 16 slices, and a
// borrow (A - B with A < B); a mechanism that never occurred counts as a failure.
module tb_rev_alu16;
  import alu_ref_pkg::*;
  localparam int W = 16;
  localparam int N_RANDOM = 2000;

  logic [W-1:0] a, b, f;
  logic s, s0, s1, cin, cout;
  int checks = 0, failures = 0;
  int row_hits [12];
  int carry_one = 0, carry_zero = 0, full_ripple = 0, borrow = 0;
  alu_result_t exp;

  rev_alu16 dut (.a(a), .b(b), .s(s), .s0(s0), .s1(s1), .cin(cin),
                 .f(f), .cout(cout));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, tb_, input logic [3:0] sel);
    a = ta;
    b = tb_;
    {s, s0, s1, cin} = sel;
    #1;
    exp = alu_ref(63'(ta), 63'(tb_), W, sel[3], sel[2], sel[1], sel[0]);
    checks++;
    if (f != exp.f[W-1:0]) begin
      failures++;
      $display("FAIL f: sel=%b a=%h b=%h f=%h expected %h", sel, ta, tb_, f, exp.f[W-1:0]);
    end
    if (exp.care_cout) begin
      checks++;
      if (cout != exp.cout) begin
        failures++;
        $display("FAIL cout: sel=%b a=%h b=%h cout=%b expected %b", sel, ta, tb_, cout, exp.cout);
      end
      if (cout) carry_one++; else carry_zero++;
      // A carry that entered slice 0 and left slice W-1 with every sum bit 0.
      if (cout && f == '0 && ({s0, s1} == 2'b00 || {s0, s1} == 2'b10 || cin)) full_ripple++;
      if ({s0, s1, cin} == 3'b011 && ta < tb_) borrow++;
    end
    row_hits[row_index(sel[3], sel[2], sel[1], sel[0])]++;
  endtask

  localparam logic [W-1:0] CORNERS [6] = '{16'h0000, 16'h0001, 16'hFFFF,
                                          16'h7FFF, 16'h8000, 16'hA5A5};

  initial begin
    for (int i = 0; i < 12; i++) row_hits[i] = 0;
    // Directed corners for every select code.
    for (int sel = 0; sel < 16; sel++)
      foreach (CORNERS[i])
        foreach (CORNERS[j])
          apply(CORNERS[i], CORNERS[j], 4'(sel));
    // Named cases from the table.
    apply(16'hFFFF, 16'h0001, OP_ADD);      // carry ripples through all slices
    apply(16'h1234, 16'h1234, OP_SUB);      // A - A = 0, no borrow
    apply(16'h0003, 16'h0005, OP_SUB);      // borrow
    apply(16'h0000, 16'h0000, OP_DEC);      // 0 - 1 wraps
    apply(16'hFFFF, 16'h0000, OP_INC);      // all ones + 1 wraps
    apply(16'hF0F0, 16'hFF00, OP_XOR);
    apply(16'hF0F0, 16'hFF00, OP_AND);
    apply(16'hF0F0, 16'hFF00, OP_OR);
    apply(16'hF0F0, 16'hFF00, OP_NOT);
    // Random operands over all select codes.
    for (int n = 0; n < N_RANDOM; n++)
      apply(W'($urandom), W'($urandom), 4'($urandom_range(0, 15)));

    for (int i = 0; i < 12; i++) begin
      checks++;
      if (row_hits[i] == 0) begin
        failures++;
        $display("FAIL table row %0d never exercised", i);
      end
    end
    checks += 4;
    if (carry_one == 0)   begin failures++; $display("FAIL carry out never 1"); end
    if (carry_zero == 0)  begin failures++; $display("FAIL carry out never 0"); end
    if (full_ripple == 0) begin failures++; $display("FAIL no full-width carry ripple"); end
    if (borrow == 0)      begin failures++; $display("FAIL no borrow in A-B"); end
    $display("coverage: carry=1 %0d, carry=0 %0d, full ripple %0d, borrow %0d",
             carry_one, carry_zero, full_ripple, borrow);
    for (int i = 0; i < 12; i++) $display("table row %0d: %0d operations", i, row_hits[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
