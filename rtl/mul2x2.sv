// mul2x2: 2x2-bit unsigned multiplier, the smallest slice of the sliced
// multiplier. Four inputs and a 4-bit product: a single level of
// look-up-table logic on a 4-input-LUT FPGA. Purely combinational.
module mul2x2 (
  input  logic [1:0] x,
  input  logic [1:0] y,
  output logic [3:0] p
);
  always_comb p = 4'(x) * 4'(y);
endmodule
