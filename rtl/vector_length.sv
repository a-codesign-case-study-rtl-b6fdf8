// vector_length: computes the length of a vector, len = floor(sqrt(x*x+y*y)),
// for W-bit unsigned components, one vector per clock.
//
// The datapath is the two-chip arrangement: chip 1 (sum_of_squares) forms
// x*x + y*y with two squaring units and a ripple carry adder, chip 2
// (sqrt_array) extracts the square root with a CAS array. Both are purely
// combinational; the only registers are an input register in front of chip
// 1 and an output register behind chip 2, so the clock period must cover
// the delay of both chips (about 1 us for the published 16-bit unit
// against a budget of 2.5 us per vector).
//
// When x*x + y*y does not fit in 2W bits (both components close to 2^W) the
// sum is saturated to all ones before the root, so len reads 2^W - 1, and
// ovf is set alongside it.
//
// Interface: in_valid/x/y are sampled by the input register on a rising clk
// edge; len/ovf and out_valid are loaded into the output register on the
// next rising edge (two register stages, one clock period for the logic). There is
// no back-pressure: a result is valid for one cycle. rst_n is an active-low
// synchronous reset that clears the valid flags and data registers.
// The input and output registers, the valid flags and the saturation are
// this design's own choices; the chips follow the source.
module vector_length #(
  parameter int unsigned W = vecl_pkg::COMP_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic         out_valid,
  output logic [W-1:0] len,
  output logic         ovf
);
  logic [W-1:0]   x_q, y_q;
  logic           v_q;
  logic [2*W-1:0] z, z_sat;
  logic           z_ovf;
  logic [W-1:0]   root;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_q <= '0;
      y_q <= '0;
      v_q <= 1'b0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        x_q <= x;
        y_q <= y;
      end
    end
  end

  sum_of_squares #(.W(W)) u_chip1 (.x(x_q), .y(y_q), .z(z), .ovf(z_ovf));

  always_comb z_sat = z_ovf ? '1 : z;

  sqrt_array #(.N(2*W)) u_chip2 (.a(z_sat), .q(root));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      len       <= '0;
      ovf       <= 1'b0;
    end else begin
      out_valid <= v_q;
      if (v_q) begin
        len <= root;
        ovf <= z_ovf;
      end
    end
  end
endmodule
