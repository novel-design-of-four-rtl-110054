// tb_feynman_gate: exhaustive self-checking test of the Feynman (CNOT)
// gate. Compares P, Q with the truth table for all four inputs, checks that
// applying the gate twice restores the inputs, and that with B = 0 both
// outputs copy A. A watchdog ends a run that hangs.
module tb_feynman_gate;

  logic a, b, p, q, p2, q2;
  int   checks   = 0;
  int   failures = 0;

  feynman_gate dut  (.a(a), .b(b), .p(p), .q(q));
  feynman_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));   // inverse = itself

  // expected {P,Q} for input {A,B} = 0..3
  localparam logic [1:0] EXPECTED [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b -> p=%0b q=%0b", what, a, b, p, q);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      check({p, q} == EXPECTED[v], "truth table");
      check({p2, q2} == {a, b}, "self-inverse");
      if (b == 1'b0) check(p == a && q == a, "copy mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_feynman_gate
