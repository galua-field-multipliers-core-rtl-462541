// gf_mul_core: GF(D^M) multiplier core in all three MGC constructions.
//
// Multiplies two elements of GF(D^M) in polynomial basis modulo the monic
// polynomial x^M + p(x). The same matrix of Modified Guild Cells is built
// three times side by side on shared operands, once per cell construction:
//   r_whole  - each MGC one whole 3k-input function (first variant),
//   r_muladd - each MGC a MUL mod D plus a SUM mod D (second variant),
//   r_gates  - each MGC an array of SMn/SMch/Sn/Rn/SUM_G bit cells
//              (third variant).
// All three outputs carry the same product; the constructions differ in
// logic cost, which is what the three variants are compared on. Putting
// all three in one top is this design's choice; the default field
// GF(7^3) is the document's worked example.
//
// Interface: a, b, p in, three results out, each M*k bits with
// k = ceil(log2 D); digit i (coefficient of x^i) at bits [i*k +: k].
// Timing: purely combinational.
module gf_mul_core
  import gf_pkg::*;
#(
  parameter int unsigned D = 7,
  parameter int unsigned M = 3
) (
  input  logic [M*digit_bits(D)-1:0] a,
  input  logic [M*digit_bits(D)-1:0] b,
  input  logic [M*digit_bits(D)-1:0] p,
  output logic [M*digit_bits(D)-1:0] r_whole,
  output logic [M*digit_bits(D)-1:0] r_muladd,
  output logic [M*digit_bits(D)-1:0] r_gates
);
  gf_multiplier #(.D(D), .M(M), .VARIANT(MGC_WHOLE)) u_whole (
    .a(a), .b(b), .p(p), .r(r_whole)
  );

  gf_multiplier #(.D(D), .M(M), .VARIANT(MGC_MULADD)) u_muladd (
    .a(a), .b(b), .p(p), .r(r_muladd)
  );

  gf_multiplier #(.D(D), .M(M), .VARIANT(MGC_GATES)) u_gates (
    .a(a), .b(b), .p(p), .r(r_gates)
  );
endmodule
