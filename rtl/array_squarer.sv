// array_squarer: triangular array squaring unit of N*N + N CAF cells.
//
// The square is built from the most significant input bit down. With R the
// value of the input bits already consumed and S = R*R, consuming the next
// bit q gives R' = 2R + q and S' = 4S + q*(4R + 1), because q*q = q. Row r
// (r = 1..N, driven by q[N-r]) is a 2r-bit adder that adds the operand
// 4R + 1 to 4S when its q is 1 and passes 4S through when q is 0 (the CAF
// multiplexer). The operand's bits travel diagonally from row to row, its
// constant low bits 01 enter at the right of every row, and the bit just
// consumed enters at position 2. The last row delivers all 2N result bits.
// The carry of each row's leftmost cell is not used: when the row adds, the
// sum always fits in 2r bits.
//
// Interface: q (N bits) in, a = q*q (2N bits) out. Purely combinational;
// the carry ripples through every row, so the delay grows with N*N.
//
// Bit 1 of a square is always 0, so a[1] is constant by arithmetic.
//
// The cell, the cell count N*N + N, the row sizes, the row-by-row order
// and the constants on the top row follow the published array. The
// derivation above, the resulting placement of the operand bits in the
// lower rows and the default size N = 16 are this design's own.
module array_squarer #(
  parameter int unsigned N = 16   // input width
) (
  input  logic [N-1:0]   q,
  output logic [2*N-1:0] a
);
  // Per-row cell outputs, indexed [row][bit]; row 0 is the all-zero start.
  logic [2*N-1:0] s_w  [N+1];
  logic [2*N-1:0] co_w [N+1];
  logic [2*N-1:0] bo_w [N+1];
  logic [2*N-1:0] eo_w [N+1];

  assign s_w[0]  = '0;
  assign co_w[0] = '0;
  assign bo_w[0] = '0;
  assign eo_w[0] = '0;

  for (genvar r = 1; r <= N; r++) begin : g_row
    localparam int unsigned W = 2 * r;   // cells in this row
    logic [W-1:0] a_in, b_in, c_in, e_in;
    for (genvar j = 0; j < W; j++) begin : g_cell
      // Partial square 4S from the row above.
      if (j >= 2) begin : g_a
        assign a_in[j] = s_w[r-1][j-2];
      end else begin : g_a0
        assign a_in[j] = 1'b0;
      end
      // Operand 4R + 1: bit 0 is 1, bit 1 is 0, bit 2 is the bit consumed
      // by the row above, higher bits come diagonally from the row above.
      if (j == 0) begin : g_b0
        assign b_in[j] = 1'b1;
      end else if (j == 1) begin : g_b1
        assign b_in[j] = 1'b0;
      end else if (j == 2) begin : g_b2
        assign b_in[j] = q[N-r+1];
      end else if (j <= W - 2) begin : g_bd
        assign b_in[j] = bo_w[r-1][j-1];
      end else begin : g_bz
        assign b_in[j] = 1'b0;
      end
      // Carry ripples from right to left; the row select is broadcast.
      if (j == 0) begin : g_c0
        assign c_in[j] = 1'b0;
        assign e_in[j] = q[N-r];
      end else begin : g_c
        assign c_in[j] = co_w[r][j-1];
        assign e_in[j] = eo_w[r][j-1];
      end

      caf_cell u_caf (
        .a    (a_in[j]),
        .b    (b_in[j]),
        .e    (e_in[j]),
        .ci   (c_in[j]),
        .s    (s_w[r][j]),
        .co   (co_w[r][j]),
        .e_out(eo_w[r][j]),
        .b_out(bo_w[r][j])
      );
    end
    // Bits of the row's arrays beyond its width are unused.
    if (W < 2 * N) begin : g_pad
      assign s_w[r][2*N-1:W]  = '0;
      assign co_w[r][2*N-1:W] = '0;
      assign bo_w[r][2*N-1:W] = '0;
      assign eo_w[r][2*N-1:W] = '0;
    end
  end

  assign a = s_w[N];
endmodule
