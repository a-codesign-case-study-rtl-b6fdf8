// sqrt_array: non-restoring square root extractor built as a triangular
// array of (N/2)^2 + N/2 controlled adder-subtractor (CAS) cells.
//
// The radicand a (N bits) is consumed two bits at a time from the top. Row
// r (r = 1..N/2) is a 2r-bit adder-subtractor. Its left operand is the
// previous row's remainder shifted up by two, with the next radicand pair
// below it. Its right operand is {Q, ~q, 1}, where Q is the root found so
// far and q its last bit. The row subtracts (4Q + 1) when the previous
// remainder was non-negative (q = 1) and adds (4Q + 3) when it was negative
// (q = 0); the first row always subtracts. The carry out of the leftmost cell
// is the next root bit, and it is also the control P of the row below.
// Root bits q[N/2-1] .. q[0] leave the rows from top to bottom; the remainder
// of the last row is not brought out.
//
// Interface: a (N bits) in, q = floor(sqrt(a)) (N/2 bits) out. Purely
// combinational; every row waits for the row above, so the delay grows
// with (N/2)^2.
//
// The cell, the cell count, the row shape (2, 4, 6, ... cells) and the edge
// constants follow the published array; the operand encoding written out
// above is this design's reading of it. N = 32 is the size used in the
// vector length unit.
module sqrt_array #(
  parameter int unsigned N = 32   // radicand width, even
) (
  input  logic [N-1:0]   a,
  output logic [N/2-1:0] q
);
  localparam int unsigned M = N / 2;

  // Per-row cell outputs, indexed [row][bit].
  logic [N-1:0] d_w  [M+1];
  logic [N-1:0] co_w [M+1];
  logic [N-1:0] bo_w [M+1];
  logic [N-1:0] po_w [M+1];
  logic [M:1]   p_row;          // control of each row, p_row[r]

  assign d_w[0]  = '0;
  assign co_w[0] = '0;
  assign bo_w[0] = '0;
  assign po_w[0] = '0;

  for (genvar r = 1; r <= M; r++) begin : g_row
    localparam int unsigned W = 2 * r;
    logic [W-1:0] a_in, b_in, c_in, p_in;

    // The first row always subtracts; later rows use the previous root bit.
    if (r == 1) begin : g_p1
      assign p_row[r] = 1'b1;
    end else begin : g_pn
      assign p_row[r] = co_w[r-1][2*(r-1)-1];
    end

    for (genvar j = 0; j < W; j++) begin : g_cell
      // Left operand: remainder shifted by two, next radicand pair below.
      if (j >= 2) begin : g_a
        assign a_in[j] = d_w[r-1][j-2];
      end else begin : g_ar
        assign a_in[j] = a[N-2*r+j];
      end
      // Right operand {Q, ~q, 1}.
      if (j == 0) begin : g_b0
        assign b_in[j] = 1'b1;
      end else if (j == 1) begin : g_b1
        assign b_in[j] = ~p_row[r];
      end else if (j == 2) begin : g_b2
        assign b_in[j] = p_row[r];
      end else if (j <= W - 2) begin : g_bd
        assign b_in[j] = bo_w[r-1][j-1];
      end else begin : g_bz
        assign b_in[j] = 1'b0;
      end
      // Carry-in of the rightmost cell is P (two's complement subtract).
      if (j == 0) begin : g_c0
        assign c_in[j] = p_row[r];
        assign p_in[j] = p_row[r];
      end else begin : g_c
        assign c_in[j] = co_w[r][j-1];
        assign p_in[j] = po_w[r][j-1];
      end

      cas_cell u_cas (
        .a    (a_in[j]),
        .b    (b_in[j]),
        .p    (p_in[j]),
        .ci   (c_in[j]),
        .d    (d_w[r][j]),
        .co   (co_w[r][j]),
        .p_out(po_w[r][j]),
        .b_out(bo_w[r][j])
      );
    end
    if (W < N) begin : g_pad
      assign d_w[r][N-1:W]  = '0;
      assign co_w[r][N-1:W] = '0;
      assign bo_w[r][N-1:W] = '0;
      assign po_w[r][N-1:W] = '0;
    end

    assign q[M-r] = co_w[r][W-1];
  end
endmodule
