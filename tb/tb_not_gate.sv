// tb_not_gate: exhaustive check of the 1x1 reversible NOT gate.
// Drives both input values and compares P with the complement of A.
module tb_not_gate;
  logic a, p;
  int checks = 0, failures = 0;

  not_gate dut (.a(a), .p(p));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      a = v[0];
      #1;
      checks++;
      if (p !== (v == 0)) begin
        failures++;
        $display("FAIL a=%0b p=%0b", a, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
