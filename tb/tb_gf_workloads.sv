// tb_gf_workloads: two of the fields of the small-order cost comparison
// (order about 10^15) at full size: GF(7^18) built with MGC_MULADD and
// GF(13^14) built with MGC_GATES. Each gets corner operands and random
// operands with random monic moduli, checked against
// gf_ref_pkg::ref_mul. A watchdog ends a stalled run.
module tb_gf_workloads;
  import gf_pkg::*;
  import gf_ref_pkg::*;

  localparam int NF = 2;
  localparam int unsigned CD [NF] = '{7, 13};
  localparam int unsigned CM [NF] = '{18, 14};
  localparam int unsigned VS [NF] = '{2, 3};
  localparam int NV = 300;

  int checks = 0, failures = 0, done = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  for (genvar g = 0; g < NF; g++) begin : g_f
    begin : g_v
      localparam int unsigned v = VS[g];
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
    wait (done == NF);
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
