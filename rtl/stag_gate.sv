// stag_gate: four-input, four-output reversible STAG gate.
//
// Function (one-to-one on the 16 input patterns):
//   P = A xor B xor C
//   Q = B
//   R = A xor B
//   S = ((A xor B) and C) xor (A and B) xor D
// The inputs can be recovered from the outputs: B = Q, A = R xor Q,
// C = P xor R and D = S xor the majority of A, B, C. With D tied to 0 the
// gate is a full adder: P is the sum and S the carry-out of A + B + C,
// while Q and R are garbage. Purely combinational, zero latency.
// The equations are read from the gate's published 16-row truth table
// (the D term of S is visible only there; the gate symbol shows D = 0).
module stag_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  logic a_x_b;

  always_comb begin
    a_x_b = a ^ b;
    p     = a_x_b ^ c;
    q     = b;
    r     = a_x_b;
    s     = (a_x_b & c) ^ (a & b) ^ d;
  end

endmodule : stag_gate
