// tb_stag_gate: exhaustive self-checking test of the STAG reversible gate.
//
// Drives all 16 input patterns and compares P, Q, R, S with the gate's
// truth table, written out below as constants. Also checks that the mapping
// is one-to-one and that with D = 0 the gate is a full adder: {S, P} equals
// the integer sum A + B + C. A watchdog ends a run that hangs.
module tb_stag_gate;

  logic a, b, c, d, p, q, r, s;
  int   checks   = 0;
  int   failures = 0;

  stag_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  // expected {P,Q,R,S} for input {A,B,C,D} = 0..15
  localparam logic [3:0] EXPECTED [16] = '{
    4'b0000, 4'b0001, 4'b1000, 4'b1001,
    4'b1110, 4'b1111, 4'b0111, 4'b0110,
    4'b1010, 4'b1011, 4'b0011, 4'b0010,
    4'b0101, 4'b0100, 4'b1101, 4'b1100
  };

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: abcd=%0b%0b%0b%0b -> pqrs=%0b%0b%0b%0b",
               what, a, b, c, d, p, q, r, s);
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
    bit seen [16];
    for (int v = 0; v < 16; v++) seen[v] = 1'b0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      check({p, q, r, s} == EXPECTED[v], "truth table");
      check(!seen[{p, q, r, s}], "one-to-one");
      seen[{p, q, r, s}] = 1'b1;
      if (d == 1'b0)
        check(2'({s, p}) == 2'(int'(a) + int'(b) + int'(c)), "full adder mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_stag_gate
