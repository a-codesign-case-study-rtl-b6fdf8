// sq4: 4-bit squaring unit, the smallest slice of the sliced squarer. Each
// of its eight output bits depends on the four input bits only, so it maps
// onto one level of look-up-table logic. Purely combinational.
module sq4 (
  input  logic [3:0] x,
  output logic [7:0] p
);
  always_comb p = 8'(x) * 8'(x);
endmodule
