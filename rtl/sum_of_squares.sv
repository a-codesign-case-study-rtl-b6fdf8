// sum_of_squares: the first chip of the vector length unit. Two squaring
// units, each written as an equation with its input split into four pieces,
// feed one ripple carry adder: z = x*x + y*y. The adder's carry out is
// brought out as ovf; it is 1 only when both inputs are large enough that
// the sum needs 2W+1 bits. Interface: x, y (W bits) in, z (2W bits) and ovf
// out. Combinational; the published estimate for this chip is the squaring
// delay plus the adder delay (217 ns + 54 ns). The choice of squarers and the
// ripple carry adder follow the source; bringing out the carry is this
// design's own.
module sum_of_squares #(
  parameter int unsigned W = vecl_pkg::COMP_W
) (
  input  logic [W-1:0]   x,
  input  logic [W-1:0]   y,
  output logic [2*W-1:0] z,
  output logic           ovf
);
  logic [2*W-1:0] xx, yy;

  split4_squarer #(.W(W)) u_sq_x (.x(x), .p(xx));
  split4_squarer #(.W(W)) u_sq_y (.x(y), .p(yy));

  ripple_adder #(.W(2*W)) u_add (
    .a (xx),
    .b (yy),
    .ci(1'b0),
    .s (z),
    .co(ovf)
  );
endmodule
