// gf_multiplier: matrix multiplier for GF(D^M) in polynomial basis.
//
// A field element is M digits over GF(D), digit i being the coefficient of
// x^i, packed at bits [i*k +: k] with k = ceil(log2 D). The field is
// defined by a monic modulus x^M + p(x); input p carries its M lower
// coefficients (the leading coefficient is always 1 and is not an input).
// Output r = a(x) * b(x) mod (x^M + p(x)).
//
// The whole multiplier is a matrix of Modified Guild Cells (MGC, each
// s = (a + b*c) mod D) and F elements (f = (-g) mod D):
//
//  * Product part, M rows of M MGCs. The 2M-1 coefficients c_0..c_{2M-2}
//    of a(x)*b(x) start at zero; row j adds a_i * b_j into column i+j for
//    every i. Columns a row does not touch pass straight through.
//  * Reduction part, M-1 rows, highest degree first. For t = 2M-2 down to
//    M an F element turns the (by now final) coefficient c_t into
//    f = (-c_t) mod D, and a row of M MGCs adds f * p_i into column
//    t-M+i. That adds f * x^(t-M) * (x^M + p(x)), which cancels c_t and
//    leaves the product unchanged modulo the modulus.
//
// Cell count: M^2 + M(M-1) MGCs and M-1 F elements (15 and 2 for
// GF(7^3), as in the document's schematic of that multiplier). The matrix
// form, the MGC and F functions and the F count are the document's; the
// exact row order of the accumulation is this design's choice. The modulus
// need not be irreducible for the arithmetic to be right, but only an
// irreducible one makes the result a field product. Cancelled top columns
// are left unused on purpose.
//
// Interface: a, b, p in, r out, each M*k bits. VARIANT selects the MGC
// construction (see gf_mgc). Timing: purely combinational, about
// 2M-1 MGCs plus M-1 F elements on the longest path.
//
// A Verilator build reports UNOPTFLAT ("circular combinational logic") on the
// arrays pr and rd: each array is one variable to it, and row j+1 is
// computed from row j of the same array. There is no real loop; every
// element is driven once from elements of the row before it, and a
// synthesis loop check finds none. The warning only costs simulation
// speed.
module gf_multiplier
  import gf_pkg::*;
#(
  parameter int unsigned  D       = 7,
  parameter int unsigned  M       = 3,
  parameter mgc_variant_e VARIANT = MGC_MULADD
) (
  input  logic [M*digit_bits(D)-1:0] a,
  input  logic [M*digit_bits(D)-1:0] b,
  input  logic [M*digit_bits(D)-1:0] p,
  output logic [M*digit_bits(D)-1:0] r
);
  localparam int unsigned K = digit_bits(D);
  localparam int unsigned C = 2*M - 1;       // product coefficients

  typedef logic [K-1:0] digit_t;

  digit_t ad [M], bd [M], pd [M];

  for (genvar i = 0; i < M; i++) begin : g_unpack
    assign ad[i] = a[i*K +: K];
    assign bd[i] = b[i*K +: K];
    assign pd[i] = p[i*K +: K];
  end

  // ------------------------- product part ----------------------------
  digit_t pr [M+1][C];   // pr[j]: coefficients before row j

  for (genvar k = 0; k < C; k++) begin : g_zero
    assign pr[0][k] = '0;
  end

  for (genvar j = 0; j < M; j++) begin : g_prod
    for (genvar k = 0; k < C; k++) begin : g_col
      if (k >= j && k < j + M) begin : g_mgc
        gf_mgc #(.D(D), .VARIANT(VARIANT)) u_mgc (
          .a(pr[j][k]),
          .b(ad[k-j]),
          .c(bd[j]),
          .s(pr[j+1][k])
        );
      end else begin : g_pass
        assign pr[j+1][k] = pr[j][k];
      end
    end
  end

  // ------------------------ reduction part ---------------------------
  digit_t rd [M][C];     // rd[s]: coefficients before reduction row s

  for (genvar k = 0; k < C; k++) begin : g_init
    assign rd[0][k] = pr[M][k];
  end

  for (genvar s = 0; s + 1 < M; s++) begin : g_red
    localparam int unsigned T = C - 1 - s;   // degree cancelled by row s
    digit_t fv;                              // factor from the F element

    f_elem #(.D(D)) u_f (.a(rd[s][T]), .b(fv));

    for (genvar k = 0; k < C; k++) begin : g_col
      if (k + M >= T && k < T) begin : g_mgc
        gf_mgc #(.D(D), .VARIANT(VARIANT)) u_mgc (
          .a(rd[s][k]),
          .b(fv),
          .c(pd[k+M-T]),
          .s(rd[s+1][k])
        );
      end else begin : g_pass
        assign rd[s+1][k] = rd[s][k];
      end
    end
  end

  for (genvar i = 0; i < M; i++) begin : g_pack
    assign r[i*K +: K] = rd[M-1][i];
  end
endmodule
