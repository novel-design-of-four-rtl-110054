// tb_rev_not_gate: self-checking test of the reversible NOT gate. Both
// input values are applied and P is compared with the complement; applying
// the gate twice must give the input back. A watchdog ends a run that hangs.
module tb_rev_not_gate;

  logic a, p, p2;
  int   checks   = 0;
  int   failures = 0;

  rev_not_gate dut  (.a(a), .p(p));
  rev_not_gate dut2 (.a(p), .p(p2));

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    a = 1'b0; #1;
    checks++; if (p !== 1'b1) begin failures++; $display("FAIL not(0) = %0b", p); end
    checks++; if (p2 !== a)   begin failures++; $display("FAIL not(not(0)) = %0b", p2); end
    a = 1'b1; #1;
    checks++; if (p !== 1'b0) begin failures++; $display("FAIL not(1) = %0b", p); end
    checks++; if (p2 !== a)   begin failures++; $display("FAIL not(not(1)) = %0b", p2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_rev_not_gate
