// rn_cell: result cell Rn of the gate-level Modified Guild Cell.
//
// s = sel ? b : a. After the last division row the partial remainder may
// be negative; then one more addition of the divisor is needed. One Rn
// cell per result bit chooses between the uncorrected remainder bit (a)
// and the corrected one (b, from the SUM_G adder), with sel = the sign of
// the remainder. The multiplexer is the document's; the select polarity is
// this design's choice.
//
// Interface: single bits. Timing: purely combinational.
module rn_cell (
  input  logic a,
  input  logic b,
  input  logic sel,
  output logic s
);
  always_comb s = sel ? b : a;
endmodule
