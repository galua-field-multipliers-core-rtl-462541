// sum_mod: digit adder modulo D (unit SUM of the second MGC variant).
//
// s = (a + b) mod D for digits of GF(D), k = ceil(log2 D) bits each. For
// valid digits the sum is below 2D, so one conditional subtraction of D
// does the reduction.
//
// Interface: a, b in, s out, all k bits, valid values 0..D-1.
// Timing: purely combinational.
module sum_mod
  import gf_pkg::*;
#(
  parameter int unsigned D = 7
) (
  input  logic [digit_bits(D)-1:0] a,
  input  logic [digit_bits(D)-1:0] b,
  output logic [digit_bits(D)-1:0] s
);
  localparam int unsigned K = digit_bits(D);

  logic [K:0] sum;

  always_comb begin
    sum = (K+1)'(a) + (K+1)'(b);
    if (sum >= (K+1)'(D)) s = K'(sum - (K+1)'(D));
    else                  s = K'(sum);
  end
endmodule
