// ripple_adder: W-bit ripple carry adder, a chain of full adders in which
// each bit waits for the carry of the bit below. Interface: a, b (W bits)
// and ci in, s (W bits) and co out. Combinational, delay linear in W.
module ripple_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;   // c[i] is the carry into bit i

  assign c[0] = ci;
  for (genvar i = 0; i < W; i++) begin : g_bit
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end
  assign co = c[W];
endmodule
