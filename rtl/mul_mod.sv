// mul_mod: digit multiplier modulo D (unit MUL of the second MGC variant).
//
// s = (a * b) mod D for digits of GF(D), k = ceil(log2 D) bits each. The
// unit is a 2k-input, k-output function; it is written as one arithmetic
// expression and left to synthesis to map.
//
// Interface: a, b in, s out, all k bits, valid values 0..D-1.
// Timing: purely combinational.
module mul_mod
  import gf_pkg::*;
#(
  parameter int unsigned D = 7
) (
  input  logic [digit_bits(D)-1:0] a,
  input  logic [digit_bits(D)-1:0] b,
  output logic [digit_bits(D)-1:0] s
);
  localparam int unsigned K = digit_bits(D);

  logic [2*K-1:0] prod;

  always_comb begin
    prod = (2*K)'(a) * (2*K)'(b);
    s    = K'(prod % (2*K)'(D));
  end
endmodule
