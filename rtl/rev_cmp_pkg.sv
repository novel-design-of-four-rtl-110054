// rev_cmp_pkg: shared constants of the four-bit reversible comparator.
//
// The comparator is a purely combinational network of reversible gates
// (STG, STAG, Feynman and NOT). This package holds the operand width and
// the number of garbage outputs, which the comparator and its testbench
// share. The network's costs are 10 reversible gates (4 STAG, 4 STG,
// 2 Feynman; NOT gates are not counted, as is usual for this metric),
// 16 garbage outputs and 11 constant-0 inputs, the figures the published
// architecture claims. COMPARE_W is fixed at 4: the architecture is drawn
// for four bits only and is not a generic N-bit generator.
package rev_cmp_pkg;

  localparam int unsigned COMPARE_W = 4;   // operand width A[3:0], B[3:0]
  localparam int unsigned N_GARBAGE = 16;  // garbage outputs G0..G15

endpackage : rev_cmp_pkg
