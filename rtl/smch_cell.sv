// smch_cell: bit cell SMch of the non-restoring remainder array.
//
// A 2:1 multiplexer picks operand b (sel = 1) or operand c (sel = 0); the
// chosen bit is added to a with carry in ci, giving sum s and carry co.
// In mgc_gates, b carries a bit of the divisor D and c the same bit
// inverted, so one row of these cells adds D (sel = 1, ci = 0 at the low
// end) or subtracts it in two's complement (sel = 0, ci = 1). The five
// inputs, the multiplexer and the adder follow the document's cell
// diagram; which select value picks which input is this design's choice.
//
// Interface: single bits. Timing: purely combinational.
//
// Inlined into the carry chains of mgc_gates, this cell's nets show up in
// the UNOPTFLAT report of Verilator; that is a false loop of the chain vector,
// explained in mgc_gates.
module smch_cell (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic sel,
  input  logic ci,
  output logic s,
  output logic co
);
  logic m;

  always_comb begin
    m  = sel ? b : c;
    s  = a ^ m ^ ci;
    co = (a & m) | (a & ci) | (m & ci);
  end
endmodule
