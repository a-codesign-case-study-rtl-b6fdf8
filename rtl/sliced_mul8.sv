// sliced_mul8: 8x8-bit multiplier built from four sliced 4x4 multipliers in
// the same arrangement as the 4x4 multiplier is built from 2x2 ones:
//   a*b = L1*L2 + 16*(L1*H2 + H1*L2) + 256*H1*H2
// with L, H the low and high nibbles. The four low bits of L1*L2 go straight
// to the output, an adder sums the middle products, and a 12-bit adder
// forms product bits 15..4. Interface: a, b (8 bits) in, p (16 bits) out.
// Combinational. Applying the published 4x4 scheme one level up is this
// design's choice for the 16-bit sliced squarer.
module sliced_mul8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0]  p11, p12, p21, p22;
  logic [8:0]  mid;
  logic [11:0] hi;

  sliced_mul4 u_11 (.a(a[3:0]), .b(b[3:0]), .p(p11));
  sliced_mul4 u_12 (.a(a[3:0]), .b(b[7:4]), .p(p12));
  sliced_mul4 u_21 (.a(a[7:4]), .b(b[3:0]), .p(p21));
  sliced_mul4 u_22 (.a(a[7:4]), .b(b[7:4]), .p(p22));

  always_comb begin
    mid = 9'(p12) + 9'(p21);
    hi  = {p22, p11[7:4]} + {3'b000, mid};
    p   = {hi, p11[3:0]};
  end
endmodule
