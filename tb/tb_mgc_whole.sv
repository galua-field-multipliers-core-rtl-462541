// tb_mgc_whole: exhaustive self-check of mgc_whole, s = (a + b*c) mod D.
// One instance per characteristic D in DS (2, 3, 5, 7, 13, 53); every
// combination of valid digits is applied and the output compared with the
// integer reference computed here. A watchdog ends a stalled run.
module tb_mgc_whole;
  localparam int NF = 6;
  localparam int unsigned DS [NF] = '{2, 3, 5, 7, 13, 53};

  int checks = 0, failures = 0, done = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  for (genvar g = 0; g < NF; g++) begin : g_d
    localparam int unsigned D = DS[g];
    localparam int unsigned K = gf_pkg::digit_bits(D);
    logic [K-1:0] a, b, c, s;

    mgc_whole #(.D(D)) dut (.a(a), .b(b), .c(c), .s(s));

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
          end
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == NF);
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
