// tb_smn_cell: exhaustive self-check of the SMn bit cell.
// Drives all 16 input combinations and compares {co, s} with the integer
// a + b*c + ci. A watchdog ends the run if it stalls.
module tb_smn_cell;
  logic a, b, c, ci, s, co;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  smn_cell dut (.a(a), .b(b), .c(c), .ci(ci), .s(s), .co(co));

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, c, ci} = 4'(v);
      #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b) * int'(c) + int'(ci))) begin
        failures++;
        $display("FAIL smn a=%b b=%b c=%b ci=%b -> co=%b s=%b", a, b, c, ci, co, s);
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
