// rev_not_gate: one-input, one-output reversible NOT gate, P = not A.
//
// The inverter is the only conventional gate that is already reversible
// (it is a bijection on one bit). The comparator uses six of them: four
// form the one's complement of operand B for the subtracting STAG chain
// and two invert the equality and greater-than flags ahead of the final
// STG AND gate. Purely combinational, zero latency.
module rev_not_gate (
  input  logic a,
  output logic p
);

  always_comb p = ~a;

endmodule : rev_not_gate
