// tb_gf_multiplier: self-check of the MGC matrix for several fields and
// all three MGC constructions.
//
// Fields GF(2^8), GF(3^5), GF(5^4), GF(7^3), GF(13^3), each built with
// MGC_WHOLE, MGC_MULADD and MGC_GATES (15 instances). Each instance gets
// corner operands (zero, all digits d-1) and random operands with a random
// monic modulus, and its result is compared with gf_ref_pkg::ref_mul.
// A watchdog ends a stalled run.
module tb_gf_multiplier;
  import gf_pkg::*;
  import gf_ref_pkg::*;

  localparam int NF = 5;
  localparam int unsigned CD [NF] = '{2, 3, 5, 7, 13};
  localparam int unsigned CM [NF] = '{8, 5, 4, 3, 3};
  localparam int NV = 2000;

  int checks = 0, failures = 0, done = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  for (genvar g = 0; g < NF; g++) begin : g_f
    for (genvar v = 1; v <= 3; v++) begin : g_v
      localparam int unsigned D = CD[g];
      localparam int unsigned M = CM[g];
      localparam int unsigned K = digit_bits(D);
      logic [M*K-1:0] a, b, p, r;

      gf_multiplier #(.D(D), .M(M), .VARIANT(mgc_variant_e'(v))) dut (
        .a(a), .b(b), .p(p), .r(r)
      );

      initial begin
        digits_t da, db, dp, exp_r;
        for (int n = 0; n < NV; n++) begin
          da = rand_digits(D, M);
          db = rand_digits(D, M);
          dp = rand_digits(D, M);
          if (n == 0) da = fill_digits(0, M);
          if (n == 1) begin
            da = fill_digits(D-1, M);
            db = fill_digits(D-1, M);
            dp = fill_digits(D-1, M);
          end
          a = (M*K)'(pack(da, K, M));
          b = (M*K)'(pack(db, K, M));
          p = (M*K)'(pack(dp, K, M));
          #1;
          exp_r = ref_mul(D, M, da, db, dp);
          checks++;
          if (unpack(512'(r), K, M) != exp_r) begin
            failures++;
            $display("FAIL GF(%0d^%0d) variant %0d a=%h b=%h p=%h r=%h", D, M, v, a, b, p, r);
          end
        end
        done++;
      end
    end
  end

  initial begin
    wait (done == 3*NF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
