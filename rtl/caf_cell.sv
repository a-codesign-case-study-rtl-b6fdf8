// caf_cell: one cell of the array squaring unit, a full adder combined with a
// 2:1 multiplexer. The full adder adds the partial-square bit A, the
// broadcast operand bit B and the carry Ci. When the row's select bit E is 1
// the cell outputs the adder's sum on S, otherwise it passes A unchanged.
// E and B are passed on to the neighbouring cells. The carry Co leaves the
// full adder directly; a row whose E is 0 only ever loses that carry at its
// leftmost cell, which the array leaves unconnected. Purely combinational.
module caf_cell (
  input  logic a,     // partial-square bit from the row above
  input  logic b,     // operand bit, passed diagonally
  input  logic e,     // row select (the input bit q of this row)
  input  logic ci,    // carry from the cell on the right
  output logic s,     // result bit to the row below
  output logic co,    // carry to the cell on the left
  output logic e_out, // select passed to the right
  output logic b_out  // operand bit passed on diagonally
);
  logic sum;
  always_comb begin
    sum   = a ^ b ^ ci;
    co    = (a & b) | (a & ci) | (b & ci);
    s     = e ? sum : a;
    e_out = e;
    b_out = b;
  end
endmodule
