// sliced_mul4: 4x4-bit multiplier split into 2-bit slices.
// With a = X1 + 4*X2 and b = Y1 + 4*Y2 (X1, X2, Y1, Y2 two bits each):
//   a*b = X1*Y1 + 4*(X1*Y2 + X2*Y1) + 16*X2*Y2.
// Four 2x2 multipliers form the partial products. A 4-bit adder (5-bit
// result) sums the two middle products. The two low bits of X1*Y1 go
// straight to the output; a 6-bit adder adds {X2*Y2, X1*Y1[3:2]} and the
// middle sum (its top operand bit tied to 0) to give product bits 7..2.
// Interface: a, b (4 bits) in, p = a*b (8 bits) out. Combinational.
// The decomposition and the adder widths follow the published block
// diagram; nothing here is added to it.
module sliced_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] p11, p12, p21, p22;   // Xi*Yj partial products
  logic [4:0] mid;                  // X1*Y2 + X2*Y1
  logic [5:0] hi;                   // product bits 7..2

  mul2x2 u_11 (.x(a[1:0]), .y(b[1:0]), .p(p11));
  mul2x2 u_12 (.x(a[1:0]), .y(b[3:2]), .p(p12));
  mul2x2 u_21 (.x(a[3:2]), .y(b[1:0]), .p(p21));
  mul2x2 u_22 (.x(a[3:2]), .y(b[3:2]), .p(p22));

  always_comb begin
    mid = 5'(p12) + 5'(p21);
    hi  = {p22, p11[3:2]} + {1'b0, mid};
    p   = {hi, p11[1:0]};
  end
endmodule
