// feynman_gate: two-input, two-output reversible Feynman (controlled-NOT)
// gate.
//
// Function: P = A, Q = A xor B. The gate is its own inverse. Because
// reversible circuits allow no fan-out, the gate with B tied to 0 serves as
// the copying gate: both outputs then carry A. Purely combinational, zero
// latency. Follows the gate's published equations and truth table.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule : feynman_gate
