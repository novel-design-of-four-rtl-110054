// rev_comparator4: four-bit magnitude comparator made only of reversible
// gates (4 STAG, 4 STG, 2 Feynman and 6 NOT gates, 11 constant-0 inputs,
// 16 garbage outputs).
//
// Outputs: f1 = (A < B), f2 = (A = B), f3 = (A > B); exactly one is high.
// garbage[15:0] are the unused gate outputs G0..G15. The circuit is purely
// combinational: outputs settle one gate-chain delay after the inputs, with
// no clock and no latency in cycles.
//
// How it works. Four STAG gates used as full adders (u1..u4) form a ripple
// chain that adds A to the one's complement of B with carry-in 0:
//   sum = A + ~B = A - B - 1 (mod 16),   carry-out = 1  <=>  A > B.
// The carry-out of u4 is therefore F(A>B). The four sum bits are all ones
// exactly when A = B (bit i of the sum is then Ai xnor Bi, the E_i term of
// the comparator equations, with no carry rippling), so a tree of three STG
// gates used as AND gates (u5, u6 -> u7) gives F(A=B). Two Feynman gates
// used as copiers (u9, u10) duplicate the equality and greater-than flags,
// since fan-out is not allowed; one copy of each drives an output, the
// other is inverted and ANDed by the last STG gate (u8), which yields
// F(A<B) = not(A=B) and not(A>B).
//
// Relation to the published architecture. The gate types, their count,
// the constant inputs, the garbage outputs, the ripple chain u1..u4, the
// AND tree u5/u6/u7, the copy gates u9/u10 and the final AND u8 follow it.
// As drawn, that architecture also inverts the four sum bits in front of
// u5 and u6 and takes F1 from the AND tree; that network flags A - B = 1
// (mod 16) rather than A < B (e.g. it reports A=0, B=1 as equal), although
// it matches the three test vectors it was shown with. This design drops
// those four inverters and takes F2 from the AND tree and F1 from u8, which
// makes the outputs meet the stated comparator equations for all 256 input
// pairs while keeping 10 reversible gates, 16 garbage outputs and 11
// constant inputs.
module rev_comparator4
  import rev_cmp_pkg::*;
(
  input  logic [COMPARE_W-1:0] a,        // operand A = A3 A2 A1 A0
  input  logic [COMPARE_W-1:0] b,        // operand B = B3 B2 B1 B0
  output logic                 f1,       // A < B
  output logic                 f2,       // A = B
  output logic                 f3,       // A > B
  output logic [N_GARBAGE-1:0] garbage   // G0..G15, unused gate outputs
);

  localparam logic CONST0 = 1'b0;        // constant-0 input of a gate

  // ---- subtracting ripple chain: sum = A + ~B, carry-out = A > B ----------
  logic [COMPARE_W-1:0] b_n;             // one's complement of B
  logic [COMPARE_W-1:0] sum;             // STAG P outputs
  logic [COMPARE_W:0]   carry;           // carry[i] enters stage i

  assign carry[0] = CONST0;

  for (genvar i = 0; i < COMPARE_W; i++) begin : g_stage
    rev_not_gate u_not_b (
      .a (b[i]),
      .p (b_n[i])
    );

    // u1..u4: STAG gate as full adder (D = 0); Q and R are garbage
    stag_gate u_stag (
      .a (a[i]),
      .b (b_n[i]),
      .c (carry[i]),
      .d (CONST0),
      .p (sum[i]),
      .q (garbage[2*i]),
      .r (garbage[2*i+1]),
      .s (carry[i+1])
    );
  end

  // ---- equality: AND of the four sum bits through STG gates (C = 0) ------
  logic eq_lo, eq_hi, eq_all;

  stg_gate u5 (
    .a (sum[0]), .b (sum[1]), .c (CONST0),
    .p (garbage[8]), .q (garbage[9]), .r (eq_lo)
  );

  stg_gate u6 (
    .a (sum[2]), .b (sum[3]), .c (CONST0),
    .p (garbage[10]), .q (garbage[11]), .r (eq_hi)
  );

  stg_gate u7 (
    .a (eq_lo), .b (eq_hi), .c (CONST0),
    .p (garbage[12]), .q (garbage[13]), .r (eq_all)
  );

  // ---- copy the two flags (Feynman gates with B = 0) ---------------------
  logic eq_copy, gt_copy;

  feynman_gate u9 (
    .a (eq_all), .b (CONST0),
    .p (f2), .q (eq_copy)
  );

  feynman_gate u10 (
    .a (carry[COMPARE_W]), .b (CONST0),
    .p (gt_copy), .q (f3)
  );

  // ---- less-than = not equal and not greater ----------------------------
  logic eq_copy_n, gt_copy_n;

  rev_not_gate u_not_eq (.a (eq_copy), .p (eq_copy_n));
  rev_not_gate u_not_gt (.a (gt_copy), .p (gt_copy_n));

  stg_gate u8 (
    .a (eq_copy_n), .b (gt_copy_n), .c (CONST0),
    .p (garbage[14]), .q (garbage[15]), .r (f1)
  );

endmodule : rev_comparator4
