// tb_sn_cell: exhaustive self-check of the Sn node.
// Expected s = parity of (a, b, ci), i.e. bit 0 of a + b + ci.
module tb_sn_cell;
  logic a, b, ci, s;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  sn_cell dut (.a(a), .b(b), .ci(ci), .s(s));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if (s != ((int'(a) + int'(b) + int'(ci)) % 2 == 1)) begin
        failures++;
        $display("FAIL sn a=%b b=%b ci=%b -> s=%b", a, b, ci, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
