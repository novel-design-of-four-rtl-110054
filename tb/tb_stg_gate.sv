// tb_stg_gate: exhaustive self-checking test of the STG reversible gate.
//
// Drives all 8 input patterns and compares P, Q, R with the gate's truth
// table, written out below as constants (not derived from the equations).
// Also checks that the mapping is one-to-one (reversibility) and that with
// C = 0 output R is the AND of A and B. A watchdog ends the run with a
// failure if it does not finish within a fixed time.
module tb_stg_gate;

  logic a, b, c, p, q, r;
  int   checks   = 0;
  int   failures = 0;

  stg_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  // expected {P,Q,R} for input {A,B,C} = 0..7
  localparam logic [2:0] EXPECTED [8] = '{
    3'b000, 3'b001, 3'b110, 3'b111, 3'b100, 3'b101, 3'b011, 3'b010
  };

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b -> p=%0b q=%0b r=%0b", what, a, b, c, p, q, r);
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
    bit seen [8];
    for (int v = 0; v < 8; v++) seen[v] = 1'b0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check({p, q, r} == EXPECTED[v], "truth table");
      check(!seen[{p, q, r}], "one-to-one");
      seen[{p, q, r}] = 1'b1;
      if (c == 1'b0) check(r == (a & b), "AND mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_stg_gate
