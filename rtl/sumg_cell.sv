// sumg_cell: full-adder bit cell of the SUM_G correction adder.
//
// {co, s} = a + b + ci. Chained k times in mgc_gates it forms
// remainder + D, the candidate result when the last partial remainder is
// negative. Two output functions of three inputs, i.e. two LUTs per cell,
// which matches the cost the document assigns to this unit.
//
// Interface: single bits. Timing: purely combinational.
module sumg_cell (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
