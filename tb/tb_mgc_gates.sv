// tb_mgc_gates: exhaustive self-check of mgc_gates, s = (a + b*c) mod D.
// One instance per characteristic D in DS (2, 3, 5, 7, 13, 53); every
// combination of valid digits is applied and the output compared with the
// integer reference computed here.
// It also counts how often the non-restoring division used an add row and
// the final correction, and fails if either never happened. A watchdog ends a stalled run.
module tb_mgc_gates;
  localparam int NF = 6;
  localparam int unsigned DS [NF] = '{2, 3, 5, 7, 13, 53};

  int checks = 0, failures = 0, done = 0;
  int n_sub_only = 0, n_add_row = 0, n_fix = 0;  // mechanism counters
  logic clk = 1'b0;
  always #5 clk = ~clk;

  for (genvar g = 0; g < NF; g++) begin : g_d
    localparam int unsigned D = DS[g];
    localparam int unsigned K = gf_pkg::digit_bits(D);
    logic [K-1:0] a, b, c, s;

    mgc_gates #(.D(D)) dut (.a(a), .b(b), .c(c), .s(s));

    initial begin
      for (int ia = 0; ia < int'(D); ia++) begin
        for (int ib = 0; ib < int'(D); ib++) begin
          for (int ic = 0; ic < int'(D); ic++) begin
            a = K'(ia);
            b = K'(ib);
            c = K'(ic);
            #1;
            checks++;
            if (int'(s) != (ia + ib*ic) % D) begin
              failures++;
              $display("FAIL D=%0d a=%0d b=%0d c=%0d -> s=%0d", D, a, b, c, s);
            end
            if (dut.neg) n_fix++;
            if (int'(dut.addsel) % (1 << K) != 0) n_add_row++;
            else n_sub_only++;
          end
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == NF);
    $display("mechanisms: all-subtract=%0d add-row=%0d final-correction=%0d",
             n_sub_only, n_add_row, n_fix);
    checks++;
    if (n_sub_only == 0 || n_add_row == 0 || n_fix == 0) begin
      failures++;
      $display("FAIL a division mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
