// tb_rev_comparator4: end-to-end self-checking test of the four-bit
// reversible comparator, at its default (and only) size.
//
// 1. The three reference cases: A=0000/B=1111 -> F1F2F3=100,
//    A=1111/B=1111 -> 010, A=1111/B=0000 -> 001.
// 2. All 256 operand pairs: F1/F2/F3 against integer <, ==, >, and exactly
//    one of them high. The 16 garbage outputs are compared with values
//    worked out from the arithmetic of the ripple chain (sum = A + ~B,
//    per-stage carries) rather than from the RTL.
// 3. Reversibility: the 19 outputs (3 flags + 16 garbage) must differ for
//    every one of the 256 inputs, i.e. the inputs are recoverable.
// 4. Mechanism counts: less, equal and greater each occur, the carry out of
//    the chain is produced, and a carry generated in bit 0 ripples through
//    all four STAG stages at least once. A mechanism never seen is a
//    failure.
// The design is combinational; each vector is held for one time unit. A
// watchdog ends a run that does not finish in a fixed time.
module tb_rev_comparator4;
  import rev_cmp_pkg::*;

  logic [COMPARE_W-1:0] a, b;
  logic                 f1, f2, f3;
  logic [N_GARBAGE-1:0] garbage;

  int checks   = 0;
  int failures = 0;
  int n_less = 0, n_equal = 0, n_greater = 0, n_full_ripple = 0;

  rev_comparator4 dut (
    .a(a), .b(b), .f1(f1), .f2(f2), .f3(f3), .garbage(garbage)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20)
        $display("FAIL %s: A=%4b B=%4b -> F1F2F3=%0b%0b%0b G=%16b",
                 what, a, b, f1, f2, f3, garbage);
    end
  endtask

  // Garbage outputs expected from the arithmetic of A + ~B.
  function automatic logic [N_GARBAGE-1:0] expected_garbage(
      input logic [3:0] ai, input logic [3:0] bi);
    logic [N_GARBAGE-1:0] g;
    logic [3:0] bn   = ~bi;
    logic [3:0] sumv = ai + bn;         // modulo 16
    logic s0 = sumv[0], s1 = sumv[1], s2 = sumv[2], s3 = sumv[3];
    logic eq = (ai == bi), gt = (ai > bi);
    for (int i = 0; i < 4; i++) begin
      g[2*i]   = bn[i];                 // STAG Q = B input
      g[2*i+1] = ai[i] ^ bn[i];         // STAG R = A xor B input
    end
    g[8]  = s0 ^ s1;  g[9]  = s1;       // first-level AND gates: P, Q
    g[10] = s2 ^ s3;  g[11] = s3;
    g[12] = (s0 & s1) ^ (s2 & s3);      // second-level AND gate
    g[13] = s2 & s3;
    g[14] = (!eq) ^ (!gt);              // final AND gate on inverted flags
    g[15] = !gt;
    return g;
  endfunction

  task automatic apply(input logic [3:0] ai, input logic [3:0] bi);
    a = ai;
    b = bi;
    #1;
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    bit seen [logic [18:0]];

    // 1. reference cases
    apply(4'b0000, 4'b1111); check({f1, f2, f3} == 3'b100, "reference A<B");
    apply(4'b1111, 4'b1111); check({f1, f2, f3} == 3'b010, "reference A=B");
    apply(4'b1111, 4'b0000); check({f1, f2, f3} == 3'b001, "reference A>B");

    // 2.-4. exhaustive sweep
    for (int ai = 0; ai < 16; ai++) begin
      for (int bi = 0; bi < 16; bi++) begin
        automatic logic [3:0] av = 4'(ai), bv = 4'(bi);
        automatic logic [3:0] bn = ~bv;
        apply(av, bv);
        check(f1 == (ai < bi),  "F1 (A<B)");
        check(f2 == (ai == bi), "F2 (A=B)");
        check(f3 == (ai > bi),  "F3 (A>B)");
        check($onehot({f1, f2, f3}), "one-hot flags");
        check(garbage == expected_garbage(av, bv), "garbage outputs");
        check(!seen.exists({f1, f2, f3, garbage}), "outputs one-to-one");
        seen[{f1, f2, f3, garbage}] = 1'b1;
        if (f1) n_less++;
        if (f2) n_equal++;
        if (f3) n_greater++;
        // carry generated in stage 0, propagated by stages 1..3
        if (av[0] && !bv[0] && ((av[3:1] ^ bn[3:1]) == 3'b111)) n_full_ripple++;
      end
    end

    check(seen.num() == 256, "256 distinct output patterns");
    check(n_less == 120 && n_equal == 16 && n_greater == 120, "flag totals");
    $display("mechanisms: less=%0d equal=%0d greater=%0d full_ripple=%0d",
             n_less, n_equal, n_greater, n_full_ripple);
    check(n_less > 0,        "less-than never occurred");
    check(n_equal > 0,       "equality never occurred");
    check(n_greater > 0,     "greater-than (carry out) never occurred");
    check(n_full_ripple > 0, "carry never rippled through all stages");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_rev_comparator4
