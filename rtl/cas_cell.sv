// cas_cell: controlled adder-subtractor cell of the square root array. The
// operand bit B is XORed with the row's control P and added to A and the
// carry Ci by a full adder: with P = 1 the row subtracts B (the rightmost
// cell's carry-in is P), with P = 0 it adds B. P and B are passed on.
// Purely combinational.
module cas_cell (
  input  logic a,     // remainder bit (or radicand bit) from above
  input  logic b,     // operand bit, passed diagonally
  input  logic p,     // 1 = subtract, 0 = add
  input  logic ci,    // carry from the cell on the right
  output logic d,     // sum/difference bit to the row below
  output logic co,    // carry to the cell on the left
  output logic p_out, // control passed along the row
  output logic b_out  // operand bit passed on diagonally
);
  logic bx;
  always_comb begin
    bx    = b ^ p;
    d     = a ^ bx ^ ci;
    co    = (a & bx) | (a & ci) | (bx & ci);
    p_out = p;
    b_out = b;
  end
endmodule
