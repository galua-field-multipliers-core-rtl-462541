// gf_mgc: one Modified Guild Cell of the chosen construction variant.
//
// s = (a + b*c) mod D. The parameter VARIANT picks the inner structure:
// MGC_WHOLE (one truth table, mgc_whole), MGC_MULADD (multiplier plus
// adder, mgc_muladd) or MGC_GATES (bit-cell array, mgc_gates). All three
// compute the same function; they differ only in how they map onto logic.
//
// Interface: a, b, c in, s out, k = ceil(log2 D) bits.
// Timing: purely combinational.
module gf_mgc
  import gf_pkg::*;
#(
  parameter int unsigned  D       = 7,
  parameter mgc_variant_e VARIANT = MGC_MULADD
) (
  input  logic [digit_bits(D)-1:0] a,
  input  logic [digit_bits(D)-1:0] b,
  input  logic [digit_bits(D)-1:0] c,
  output logic [digit_bits(D)-1:0] s
);
  if (VARIANT == MGC_WHOLE) begin : g_whole
    mgc_whole  #(.D(D)) u_cell (.a(a), .b(b), .c(c), .s(s));
  end else if (VARIANT == MGC_MULADD) begin : g_muladd
    mgc_muladd #(.D(D)) u_cell (.a(a), .b(b), .c(c), .s(s));
  end else begin : g_gates
    mgc_gates  #(.D(D)) u_cell (.a(a), .b(b), .c(c), .s(s));
  end
endmodule
