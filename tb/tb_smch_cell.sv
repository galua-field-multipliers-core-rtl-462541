// tb_smch_cell: exhaustive self-check of the SMch bit cell.
// All 32 input combinations; expected {co, s} = a + (sel ? b : c) + ci.
module tb_smch_cell;
  logic a, b, c, sel, ci, s, co;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  smch_cell dut (.a(a), .b(b), .c(c), .sel(sel), .ci(ci), .s(s), .co(co));

  initial begin
    for (int v = 0; v < 32; v++) begin
      {a, b, c, sel, ci} = 5'(v);
      #1;
      checks++;
      if ({co, s} != 2'(int'(a) + (sel ? int'(b) : int'(c)) + int'(ci))) begin
        failures++;
        $display("FAIL smch a=%b b=%b c=%b sel=%b ci=%b -> co=%b s=%b",
                 a, b, c, sel, ci, co, s);
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
