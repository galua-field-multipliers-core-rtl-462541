// mgc_gates: Modified Guild Cell built from simple gates (third variant).
//
// s = (a + b*c) mod D, computed in three stages of bit cells, with
// k = ceil(log2 D):
//
//  1. Product array, k rows of k SMn cells. The partial sum starts as a;
//     row j adds (b AND c[j]) << j with a ripple carry whose carry-out
//     lands in bit j+k. The result is the 2k-bit integer x = a + b*c.
//     For valid digits x <= D*(D-1) < D*2^k.
//  2. Non-restoring division of x by D, k rows of k+1 SMch cells. The
//     partial remainder r (k+1 bits, two's complement) starts as the top k
//     bits of x. Each row shifts in the next lower bit of x and adds D (if
//     r was negative) or subtracts it (if not); an Sn node on the row's top
//     position produces the new sign, which selects the operation of the
//     next row. The remainder stays in [-D, D), so k+1 bits hold it.
//  3. Final correction: a SUM_G ripple adder of k full-adder cells forms
//     r + D, and k Rn multiplexers take it instead of r when r is negative
//     (the "one more addition" case).
//
// The units (SMn, SMch, Sn, Rn, SUM_G), their roles and their counts of
// about k^2, k^2, k, k and k come from the document; the way they are
// wired (ripple-carry array, row order, select polarity) is this design's.
// The top carry out of every SMch row and the sum output of its top cell
// are not needed (the Sn node gives the sign), as in any two's-complement
// adder; lint reports them as unused.
//
// Interface: a, b, c in, s out, all k bits, valid values 0..D-1.
// Timing: purely combinational; depth about k rows of ripple adders for
// the product plus k rows for the division plus one adder.
//
// A Verilator build reports UNOPTFLAT ("circular combinational logic") on the
// carry vectors pcy and dcy, and on nets inside the SMn/SMch cells it
// inlines into them: a ripple carry goes from bit i of a vector through a
// cell to bit i+1 of the same vector, which looks like a loop when the
// vector is one variable. There is no real loop; synthesis finds none.
module mgc_gates
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
  localparam logic [K:0] DV = (K+1)'(D);   // divisor, k+1 bits

  // ---------------- stage 1: x = a + b*c with SMn cells ----------------
  logic [K:0][2*K-1:0] acc;    // acc[j]: partial sum before row j
  logic [K-1:0][K:0]   pcy;    // pcy[j][i]: carry into cell i of row j
  logic [2*K-1:0]      x;

  assign acc[0] = {{K{1'b0}}, a};

  for (genvar j = 0; j < K; j++) begin : g_prow
    assign pcy[j][0] = 1'b0;
    for (genvar n = 0; n < 2*K; n++) begin : g_bit
      if (n >= j && n < j + K) begin : g_cell
        smn_cell u_smn (
          .a (acc[j][n]),
          .b (b[n-j]),
          .c (c[j]),
          .ci(pcy[j][n-j]),
          .s (acc[j+1][n]),
          .co(pcy[j][n-j+1])
        );
      end else if (n == j + K) begin : g_carry
        assign acc[j+1][n] = pcy[j][K];
      end else begin : g_pass
        assign acc[j+1][n] = acc[j][n];
      end
    end
  end

  assign x = acc[K];

  // ------------- stage 2: non-restoring division by D -----------------
  logic [K:0][K:0]   rem;      // rem[r]: partial remainder before row r
  logic [K-1:0][K:0] sh;       // shifted remainder fed to row r
  logic [K-1:0][K+1:0] dcy;    // carries of row r
  logic [K:0]        addsel;   // 1: row adds D, 0: row subtracts D

  assign rem[0]    = {1'b0, x[2*K-1:K]};
  assign addsel[0] = 1'b0;     // first remainder is never negative

  for (genvar r = 0; r < K; r++) begin : g_drow
    assign sh[r]     = {rem[r][K-1:0], x[K-1-r]};
    assign dcy[r][0] = ~addsel[r];   // +1 completes two's complement of D
    for (genvar i = 0; i <= K; i++) begin : g_cell
      smch_cell u_smch (
        .a  (sh[r][i]),
        .b  (DV[i]),
        .c  (~DV[i]),
        .sel(addsel[r]),
        .ci (dcy[r][i]),
        .s  (rem[r+1][i]),
        .co (dcy[r][i+1])
      );
    end
    sn_cell u_sn (
      .a (sh[r][K]),
      .b (addsel[r] ? DV[K] : ~DV[K]),
      .ci(dcy[r][K]),
      .s (addsel[r+1])
    );
  end

  // --------- stage 3: one more addition of D when negative ------------
  logic [K-1:0] rfin;
  logic [K-1:0] rplus;
  logic [K:0]   fcy;
  logic         neg;

  assign rfin   = rem[K][K-1:0];
  assign neg    = addsel[K];
  assign fcy[0] = 1'b0;

  for (genvar i = 0; i < K; i++) begin : g_fix
    sumg_cell u_sum (
      .a (rfin[i]),
      .b (DV[i]),
      .ci(fcy[i]),
      .s (rplus[i]),
      .co(fcy[i+1])
    );
    rn_cell u_rn (
      .a  (rfin[i]),
      .b  (rplus[i]),
      .sel(neg),
      .s  (s[i])
    );
  end
endmodule
