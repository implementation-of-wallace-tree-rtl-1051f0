// partial_products: the AND array of an N x N unsigned multiplier.
// Row i is A AND B[i] placed at bit positions i .. i+N-1 of a 2N-bit row;
// all other positions of the row are zero. N rows of N products each,
// n^2 AND gates in all.
// Interface: a, b (N bits) -> pp (N rows of 2N bits), pp[i] is the row
// weighted by b[i]. Combinational.
module partial_products #(
  parameter int N = 8
) (
  input  logic [N-1:0]          a,
  input  logic [N-1:0]          b,
  output logic [N-1:0][2*N-1:0] pp
);
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < 2*N; j++) begin : g_col
      if (j >= i && j < i + N) begin : g_and
        assign pp[i][j] = a[j-i] & b[i];
      end else begin : g_zero
        assign pp[i][j] = 1'b0;
      end
    end
  end
endmodule
