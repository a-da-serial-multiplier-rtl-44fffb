// bw_cell: one cell of a Baugh-Wooley array multiplier.
//
// The cell forms the partial product bit a & b and adds it, with a full
// adder, to the sum arriving from the row above (si) and the carry arriving
// from the cell above (ci), producing a sum (so) and a carry (co).  This is
// the AND gate plus full adder cell of the source design.  The inv input
// complements the partial product; the array sets it on the cells of the
// sign row and sign column, where Baugh-Wooley uses the complemented term
// (a NAND cell).  Purely combinational.
module bw_cell (
  input  logic a,    // multiplicand bit
  input  logic b,    // multiplier bit
  input  logic inv,  // 1: use ~(a & b) (sign row / column cell)
  input  logic si,   // sum in
  input  logic ci,   // carry in
  output logic so,   // sum out
  output logic co    // carry out
);
  logic pp;

  always_comb begin
    pp = (a & b) ^ inv;
    so = pp ^ si ^ ci;
    co = (pp & si) | (pp & ci) | (si & ci);
  end
endmodule
