// tb_rn_cell: exhaustive self-check of the Rn result multiplexer.
// Expected s = b when sel = 1, a otherwise.
module tb_rn_cell;
  logic a, b, sel, s;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  rn_cell dut (.a(a), .b(b), .sel(sel), .s(s));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, sel} = 3'(v);
      #1;
      checks++;
      if (s != (sel == 1'b1 ? b : a)) begin
        failures++;
        $display("FAIL rn a=%b b=%b sel=%b -> s=%b", a, b, sel, s);
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
