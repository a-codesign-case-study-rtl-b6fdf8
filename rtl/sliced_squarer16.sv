// sliced_squarer16: 16-bit squaring unit, the 8-bit sliced scheme applied one
// level up. With X = L + 256*H (L, H the low and high bytes):
//   X*X = L*L + 512*(L*H) + 65536*H*H.
// Two 8-bit sliced squarers and one sliced 8x8 multiplier form the terms.
// Bits 8..0 of L*L are output bits 8..0 directly; a 23-bit adder adds
// {H*H, L*L[15:9]} and L*H to give output bits 31..9. Interface: x (16
// bits) in, p = x*x (32 bits) out. Combinational. Only the 16-bit size and
// the method are published; this composition of the 8-bit unit is this
// design's own.
module sliced_squarer16 (
  input  logic [15:0] x,
  output logic [31:0] p
);
  logic [15:0] lo_sq, hi_sq, xprod;
  logic [22:0] upper;

  sliced_squarer8 u_lo  (.x(x[7:0]),  .p(lo_sq));
  sliced_squarer8 u_hi  (.x(x[15:8]), .p(hi_sq));
  sliced_mul8     u_mul (.a(x[7:0]),  .b(x[15:8]), .p(xprod));

  always_comb begin
    upper = {hi_sq, lo_sq[15:9]} + {7'b0, xprod};
    p     = {upper, lo_sq[8:0]};
  end
endmodule
