// split4_squarer: 16-bit squaring unit written as an arithmetic equation with
// its input split into four 4-bit pieces,
//   X = X1 + 16*X2 + 256*X3 + 4096*X4,
//   X*X = sum_i Xi*Xi * 2^(8(i-1)) + sum_{i<j} 2*Xi*Xj * 2^(4(i+j-2)).
// The equation is left to the synthesis tool to map: four 4-bit squares, six
// 4x4 cross products and one sum. Interface: x (W bits) in, p = x*x (2W bits)
// out. Combinational. The split into four pieces follows the source; W must
// be a multiple of 4, and the piece width W/4 is this design's
// generalisation of the 16-bit case.
module split4_squarer #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   x,
  output logic [2*W-1:0] p
);
  localparam int unsigned PW = W / 4;   // piece width

  always_comb begin
    logic [PW-1:0] xi, xj;
    p = '0;
    for (int i = 0; i < 4; i++) begin
      xi = x[i*PW +: PW];
      p  = p + ((2*W)'(xi) * (2*W)'(xi) << (2*PW*i));
      for (int j = i + 1; j < 4; j++) begin
        xj = x[j*PW +: PW];
        p  = p + ((2*W)'(xi) * (2*W)'(xj) << (PW*(i+j) + 1));
      end
    end
  end
endmodule
