// sn_cell: node Sn that sets the operation of the next division row.
//
// s = a ^ b ^ ci. Fed with the three inputs of the top adder position of an
// SMch row, it yields the sign bit of the new partial remainder. In
// non-restoring division a negative remainder (s = 1) means the next row
// must add the divisor and a non-negative one (s = 0) that it must
// subtract, so s drives the select of the next SMch row directly. The XOR
// is the document's; where its inputs come from is this design's reading.
//
// Interface: single bits. Timing: purely combinational.
module sn_cell (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s
);
  always_comb s = a ^ b ^ ci;
endmodule
