// stg_gate: three-input, three-output reversible STG gate.
//
// Function (one-to-one on the 8 input patterns):
//   P = A xor B
//   Q = B
//   R = (A and B) xor C
// The inputs can be recovered from the outputs: B = Q, A = P xor Q and
// C = R xor (A and B). Tying C to 0 turns the gate into a two-input AND
// gate on output R, with P and Q left as garbage; that is how the
// comparator uses it. Purely combinational, no clock, zero latency.
// The equations follow the gate's published truth table; the port names
// A, B, C / P, Q, R are the gate's own.
module stg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a ^ b;
    q = b;
    r = (a & b) ^ c;
  end

endmodule : stg_gate
