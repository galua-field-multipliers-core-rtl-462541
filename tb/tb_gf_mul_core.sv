// tb_gf_mul_core: end-to-end self-check of the multiplier core at its
// default size, GF(7^3), with all three MGC constructions side by side.
//
// Phase 1 applies every pair (a, b) of field elements (343 x 343) with the
// irreducible modulus x^3 + 5 (2 is not a cube modulo 7, so x^3 - 2 has no
// root and, being cubic, no factor). All three outputs are compared with
// gf_ref_pkg::ref_mul. Because the modulus is irreducible the result is a
// field: each nonzero a must have exactly one b with a*b = 1, which is
// checked too. Phase 2 applies random operands with random monic moduli.
//
// The run also counts, through hierarchical references, how often each
// mechanism of the matrix happened: an F element producing a nonzero
// factor for each of the two reduction rows, a top coefficient that needed
// no reduction, a SUM mod 7 wrapping around in the second construction,
// and the final "one more addition" correction inside a gate-level MGC.
// A mechanism that never happened counts as a failure.
module tb_gf_mul_core;
  import gf_ref_pkg::*;

  localparam int unsigned D = 7;
  localparam int unsigned M = 3;
  localparam int unsigned K = 3;
  localparam int NRAND = 3000;

  logic [M*K-1:0] a, b, p, r_whole, r_muladd, r_gates;
  int checks = 0, failures = 0;
  int n_red0 = 0, n_red1 = 0, n_noreduce = 0, n_wrap = 0, n_fix = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  gf_mul_core dut (
    .a(a), .b(b), .p(p),
    .r_whole(r_whole), .r_muladd(r_muladd), .r_gates(r_gates)
  );

  task automatic apply_and_check(digits_t da, digits_t db, digits_t dp,
                                 output bit is_one);
    digits_t exp_r;
    digits_t one;
    one    = fill_digits(0, M);
    one[0] = 1;
    a = (M*K)'(pack(da, K, M));
    b = (M*K)'(pack(db, K, M));
    p = (M*K)'(pack(dp, K, M));
    #1;
    exp_r = ref_mul(D, M, da, db, dp);
    checks += 3;
    if (unpack(512'(r_whole), K, M) != exp_r) begin
      failures++;
      $display("FAIL whole  a=%h b=%h p=%h r=%h", a, b, p, r_whole);
    end
    if (unpack(512'(r_muladd), K, M) != exp_r) begin
      failures++;
      $display("FAIL muladd a=%h b=%h p=%h r=%h", a, b, p, r_muladd);
    end
    if (unpack(512'(r_gates), K, M) != exp_r) begin
      failures++;
      $display("FAIL gates  a=%h b=%h p=%h r=%h", a, b, p, r_gates);
    end
    is_one = (exp_r == one);
    // mechanism counters
    if (dut.u_muladd.g_red[0].fv != '0) n_red0++;
    else                                n_noreduce++;
    if (dut.u_muladd.g_red[1].fv != '0) n_red1++;
    if (dut.u_muladd.g_prod[1].g_col[1].g_mgc.u_mgc.g_muladd.u_cell.u2_sum.sum >= 4'(D))
      n_wrap++;
    if (dut.u_gates.g_red[0].g_col[3].g_mgc.u_mgc.g_gates.u_cell.neg) n_fix++;
  endtask

  initial begin
    digits_t da, db, dp;
    int      inverses;
    bit      is_one;
    dp    = fill_digits(0, M);
    dp[0] = 5;                       // x^3 + 5
    for (int ia = 0; ia < 343; ia++) begin
      inverses = 0;
      for (int ib = 0; ib < 343; ib++) begin
        da = fill_digits(0, M);
        db = fill_digits(0, M);
        for (int i = 0; i < int'(M); i++) begin
          da[i] = (ia / (7 ** i)) % 7;
          db[i] = (ib / (7 ** i)) % 7;
        end
        apply_and_check(da, db, dp, is_one);
        if (is_one) inverses++;
      end
      checks++;
      if (ia != 0 && inverses != 1) begin
        failures++;
        $display("FAIL element %0d has %0d inverses", ia, inverses);
      end
    end
    for (int n = 0; n < NRAND; n++) begin
      apply_and_check(rand_digits(D, M), rand_digits(D, M), rand_digits(D, M), is_one);
    end
    $display("mechanisms: reduce-top=%0d reduce-next=%0d no-reduce=%0d sum-wrap=%0d final-correction=%0d",
             n_red0, n_red1, n_noreduce, n_wrap, n_fix);
    checks += 5;
    if (n_red0 == 0)     begin failures++; $display("FAIL top reduction never happened"); end
    if (n_red1 == 0)     begin failures++; $display("FAIL second reduction never happened"); end
    if (n_noreduce == 0) begin failures++; $display("FAIL zero top coefficient never seen"); end
    if (n_wrap == 0)     begin failures++; $display("FAIL SUM mod d never wrapped"); end
    if (n_fix == 0)      begin failures++; $display("FAIL final correction never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
