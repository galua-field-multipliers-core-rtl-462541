// smn_cell: bit cell SMn of the gate-level Modified Guild Cell.
//
// {co, s} = a + (b & c) + ci. It multiplies two bits modulo 2 (an AND),
// adds the product to a partial-sum bit and a carry, and gives result and
// carry outputs: a binary Guild cell with a carry input. A k x k array of
// these cells forms the integer A + B*C inside mgc_gates. The role of the
// cell is the document's; the exact carry-chained form is this design's.
//
// Interface: single bits. Timing: purely combinational.
//
// Inlined into the carry chains of mgc_gates, this cell's nets show up in
// the UNOPTFLAT report of Verilator; that is a false loop of the chain vector,
// explained in mgc_gates.
module smn_cell (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic ci,
  output logic s,
  output logic co
);
  logic pp;

  always_comb begin
    pp = b & c;
    s  = a ^ pp ^ ci;
    co = (a & pp) | (a & ci) | (pp & ci);
  end
endmodule
