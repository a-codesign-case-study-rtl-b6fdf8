// sliced_squarer8: 8-bit squaring unit split into nibbles. With
// A = A1 + 16*A2 (A1 the low, A2 the high nibble):
//   A*A = A1*A1 + 32*(A1*A2) + 256*A2*A2.
// Two 4-bit squaring units and one sliced 4x4 multiplier form the terms.
// Bits 4..0 of A1*A1 are output bits 4..0 directly. An 11-bit adder adds
// {A2*A2, A1*A1[7:5]} and the product A1*A2 (its three top bits tied to 0)
// to give output bits 15..5. Interface: x (8 bits) in, p = x*x (16 bits)
// out. Combinational. The structure and the adder's bit assignment follow
// the published block diagram.
module sliced_squarer8 (
  input  logic [7:0]  x,
  output logic [15:0] p
);
  logic [7:0]  lo_sq, hi_sq, xprod;
  logic [10:0] upper;

  sq4         u_lo  (.x(x[3:0]), .p(lo_sq));
  sq4         u_hi  (.x(x[7:4]), .p(hi_sq));
  sliced_mul4 u_mul (.a(x[3:0]), .b(x[7:4]), .p(xprod));

  always_comb begin
    upper = {hi_sq, lo_sq[7:5]} + {3'b000, xprod};
    p     = {upper, lo_sq[4:0]};
  end
endmodule
