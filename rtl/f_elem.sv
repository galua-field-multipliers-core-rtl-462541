// f_elem: element F of the multiplier matrix.
//
// b = (-a) mod D = (D - a) mod D. The input is the highest product
// coefficient that is still to be cancelled; the output is the factor by
// which the monic modulus polynomial is multiplied and added so that this
// coefficient becomes zero. Port names a (in) and b (out) follow the
// document's schematic of the GF(7^3) multiplier.
//
// Interface: a in, b out, k = ceil(log2 D) bits, valid values 0..D-1.
// Timing: purely combinational.
module f_elem
  import gf_pkg::*;
#(
  parameter int unsigned D = 7
) (
  input  logic [digit_bits(D)-1:0] a,
  output logic [digit_bits(D)-1:0] b
);
  localparam int unsigned K = digit_bits(D);

  always_comb begin
    if (a == '0) b = '0;
    else         b = K'((K+1)'(D) - (K+1)'(a));
  end
endmodule
