// rca: W-bit ripple carry adder, a chain of W full_adder cells in which
// the carry out of bit i feeds the carry in of bit i+1.
// Interface: a, b (W bits), ci -> s (W bits), co. Combinational; the delay
// grows with W because the carry ripples through every cell.
// One row of four full adders is what each half of the carry select
// adder is built from; the default W = 4 is that row.
module rca #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;
  assign c[0] = ci;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end
  assign co = c[W];
endmodule
