// mgc_muladd: Modified Guild Cell built as a multiplier and an adder
// (second variant).
//
// s = (a + b*c) mod D. Unit U1 (MUL) forms b*c mod D, unit U2 (SUM) adds a
// to it modulo D. Splitting the 3k-input cell into two 2k-input units is
// what makes this variant cheaper than one whole 3k-input table. The
// structure (which inputs go to which unit) follows the document's cell
// diagram; the units themselves are mul_mod and sum_mod.
//
// Interface: a, b, c in, s out, all k = ceil(log2 D) bits.
// Timing: purely combinational, two units deep.
module mgc_muladd
  import gf_pkg::*;
#(
  parameter int unsigned D = 7
) (
  input  logic [digit_bits(D)-1:0] a,
  input  logic [digit_bits(D)-1:0] b,
  input  logic [digit_bits(D)-1:0] c,
  output logic [digit_bits(D)-1:0] s
);
  logic [digit_bits(D)-1:0] prod;

  mul_mod #(.D(D)) u1_mul (.a(b), .b(c), .s(prod));
  sum_mod #(.D(D)) u2_sum (.a(a), .b(prod), .s(s));
endmodule
