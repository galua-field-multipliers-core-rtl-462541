// mgc_whole: Modified Guild Cell as one whole element (first variant).
//
// Computes s = (a + b*c) mod D on digits of GF(D), each k = ceil(log2 D)
// bits wide, as a single 3k-input combinational function with no inner
// structure: the cell is a black box defined only by its truth table, and
// synthesis is free to map that table onto LUTs however it likes. The
// function (a product of b and c modulo D added to a) is the document's;
// writing it as one arithmetic expression is this design's choice.
//
// Interface: a, b, c in, s out, all k bits, valid values 0..D-1.
// Timing: purely combinational, no clock.
module mgc_whole
  import gf_pkg::*;
#(
  parameter int unsigned D = 7
) (
  input  logic [digit_bits(D)-1:0] a,
  input  logic [digit_bits(D)-1:0] b,
  input  logic [digit_bits(D)-1:0] c,
  output logic [digit_bits(D)-1:0] s
);
  localparam int unsigned K = digit_bits(D);

  // a + b*c < 2^(2K+1), so 2K+1 bits hold it without overflow.
  logic [2*K:0] full;

  always_comb begin
    full = (2*K+1)'(a) + (2*K+1)'(b) * (2*K+1)'(c);
    s    = K'(full % (2*K+1)'(D));
  end
endmodule
